// table3_workload_tb -- error coverage of the shadow-register compactor
// against the number of selective XOR gates k (checks per cycle) and the
// signature transfer period s.
//
// The compactor is the default one (1050 chains, 12-bit MISR, fan-out 5,
// four selective XORs) at 0.07% X. The tester transfers every s cycles,
// s = 1..4, one sr_workload_driver per s, and each driver runs k = 1..4.
// Every X-canceled bit of a fault-free signature is checked, and the share
// of single-bit errors caught (among those not hidden by the Xs) must match
// 1 - 2^-(k*s): 50% for one check, 75% for two, 93.75% for four, and so on.
module table3_workload_tb;
  logic clk;
  logic rst_n;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  bit done [4];
  int chk [4], fl [4];

  sr_workload_driver #(.NAME("s=1"), .N(1050), .M(12), .F(5), .DENS(70), .NSIG(600), .SFIX(1))
    s1 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  sr_workload_driver #(.NAME("s=2"), .N(1050), .M(12), .F(5), .DENS(70), .NSIG(600), .SFIX(2))
    s2 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  sr_workload_driver #(.NAME("s=3"), .N(1050), .M(12), .F(5), .DENS(70), .NSIG(600), .SFIX(3))
    s3 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  sr_workload_driver #(.NAME("s=4"), .N(1050), .M(12), .F(5), .DENS(70), .NSIG(600), .SFIX(4))
    s4 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]));

  initial begin
    repeat (20000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk.sum(), fl.sum() + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done.and());
    $display("TB_RESULT checks=%0d failures=%0d", chk.sum(), fl.sum());
    $finish;
  end
endmodule
