// fig10_workload_tb -- shadow-register compactor on the 203-chain block
// (3.35% X, fan-out 9) and the 75-chain block (3.28% X, fan-out 7) with
// two and three checks per cycle and several MISR sizes.
//
// A small MISR fills with Xs after few slices, so signatures are transferred
// more often and each gets fewer cycles of checks; a larger one holds more
// Xs and raises coverage. Each configuration runs in its own
// sr_workload_driver, which checks every X-canceled bit against the
// fault-free value and the coverage of single-bit errors against the mean of
// 1 - 2^-(k*s) over the measured transfer periods s. The MISR sizes swept
// (12 to 24 bits, around the 19- and 14-bit sizes of the two blocks; at
// least 16 bits for the 203-chain block, whose slices often carry more Xs
// than a 12-bit MISR can hold) are this testbench's choice. The tester
// transfers when fewer than four X-free combinations would remain.
module fig10_workload_tb;
  logic clk;
  logic rst_n;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  bit done [8];
  int chk [8], fl [8];

  sr_workload_driver #(.NAME("Ckt1-B 22-bit"), .N(203), .M(22), .F(9), .DENS(3350), .NSIG(300), .KLO(2), .KHI(3))
    b22 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  sr_workload_driver #(.NAME("Ckt1-B 16-bit"), .N(203), .M(16), .F(9), .DENS(3350), .NSIG(300), .KLO(2), .KHI(3))
    b16 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  sr_workload_driver #(.NAME("Ckt1-B 19-bit"), .N(203), .M(19), .F(9), .DENS(3350), .NSIG(300), .KLO(2), .KHI(3))
    b19 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  sr_workload_driver #(.NAME("Ckt1-B 24-bit"), .N(203), .M(24), .F(9), .DENS(3350), .NSIG(300), .KLO(2), .KHI(3))
    b24 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  sr_workload_driver #(.NAME("Ckt1-C 12-bit"), .N(75), .M(12), .F(7), .DENS(3280), .NSIG(300), .KLO(2), .KHI(3))
    c12 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  sr_workload_driver #(.NAME("Ckt1-C 14-bit"), .N(75), .M(14), .F(7), .DENS(3280), .NSIG(300), .KLO(2), .KHI(3))
    c14 (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fl[5]));
  sr_workload_driver #(.NAME("Ckt1-C 18-bit"), .N(75), .M(18), .F(7), .DENS(3280), .NSIG(300), .KLO(2), .KHI(3))
    c18 (.clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fl[6]));
  sr_workload_driver #(.NAME("Ckt1-C 24-bit"), .N(75), .M(24), .F(7), .DENS(3280), .NSIG(300), .KLO(2), .KHI(3))
    c24 (.clk, .rst_n, .done(done[7]), .checks(chk[7]), .failures(fl[7]));

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
