// fig9_workload_tb -- time-multiplexing compactor on the 1050-chain block
// (0.07% X) and the 75-chain block (3.28% X) with MISRs of 21 to 32 bits.
//
// Test time is measured for q = 7 checks per signature (a 99.2% target) at
// 21, 24 and 28 bits, and error coverage for every q from 1 to 8 on the
// 32-bit MISR. Each configuration runs in its own tm_workload_driver, which
// checks every X-canceled bit, the normalised test time against
// 1 + n*x*q*beats/(m-q) and the coverage of single-bit errors against
// 1 - 2^-q. All use fan-out 7 and 133 channels (one beat per mask). The
// polynomials come from xc_pkg::primitive_poly.
module fig9_workload_tb;
  logic clk;
  logic rst_n;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  bit done [8];
  int chk [8], fl [8];

  tm_workload_driver #(.NAME("Ckt1-A 21-bit"), .N(1050), .M(21), .F(7), .CH(133), .DENS(70), .NSIG(200), .QLO(7), .QHI(7))
    a21 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  tm_workload_driver #(.NAME("Ckt1-A 24-bit"), .N(1050), .M(24), .F(7), .CH(133), .DENS(70), .NSIG(200), .QLO(7), .QHI(7))
    a24 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  tm_workload_driver #(.NAME("Ckt1-A 28-bit"), .N(1050), .M(28), .F(7), .CH(133), .DENS(70), .NSIG(200), .QLO(7), .QHI(7))
    a28 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  tm_workload_driver #(.NAME("Ckt1-A 32-bit"), .N(1050), .M(32), .F(7), .CH(133), .DENS(70), .NSIG(200), .QLO(1), .QHI(8))
    a32 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  tm_workload_driver #(.NAME("Ckt1-C 21-bit"), .N(75), .M(21), .F(7), .CH(133), .DENS(3280), .NSIG(300), .QLO(7), .QHI(7))
    c21 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  tm_workload_driver #(.NAME("Ckt1-C 24-bit"), .N(75), .M(24), .F(7), .CH(133), .DENS(3280), .NSIG(300), .QLO(7), .QHI(7))
    c24 (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fl[5]));
  tm_workload_driver #(.NAME("Ckt1-C 28-bit"), .N(75), .M(28), .F(7), .CH(133), .DENS(3280), .NSIG(300), .QLO(7), .QHI(7))
    c28 (.clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fl[6]));
  tm_workload_driver #(.NAME("Ckt1-C 32-bit"), .N(75), .M(32), .F(7), .CH(133), .DENS(3280), .NSIG(300), .QLO(1), .QHI(8))
    c32 (.clk, .rst_n, .done(done[7]), .checks(chk[7]), .failures(fl[7]));

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
