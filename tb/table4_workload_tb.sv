// table4_workload_tb -- runs the six time-multiplexing configurations of the
// evaluated designs (three blocks of a 133-channel design with 1050, 203 and
// 75 chains on a 32-bit MISR and fan-out 7; three 64-chain blocks of a
// 16-channel design on a 64-bit MISR, fan-out 6, four beats per mask) at
// their published X densities, for q = 5..8 each, measuring normalised test
// time and single-bit error coverage. The scan contents are
// random with uniformly placed X values, so the measured test time follows
// the estimate formula rather than the published measurements taken on real
// circuits, whose X values are clustered.
module table4_workload_tb;
  logic clk;
  logic rst_n;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  bit done [6];
  int chk [6], fl [6];

  tm_workload_driver #(.NAME("Ckt1-A"), .N(1050), .M(32), .F(7), .CH(133), .DENS(70), .NSIG(400),
    .EST5(1.13), .EST6(1.16), .EST7(1.20), .EST8(1.24), .ACT5(1.16), .ACT6(1.19), .ACT7(1.22), .ACT8(1.25),
    .COV5(96.8), .COV6(98.4), .COV7(99.2), .COV8(99.6))
    c1a (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  tm_workload_driver #(.NAME("Ckt1-B"), .N(203), .M(32), .F(7), .CH(133), .DENS(3350), .NSIG(800),
    .EST5(2.25), .EST6(2.56), .EST7(2.90), .EST8(3.26), .ACT5(2.78), .ACT6(3.13), .ACT7(3.49), .ACT8(3.85),
    .COV5(96.8), .COV6(98.4), .COV7(99.2), .COV8(99.6))
    c1b (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  tm_workload_driver #(.NAME("Ckt1-C"), .N(75), .M(32), .F(7), .CH(133), .DENS(3280), .NSIG(500),
    .EST5(1.45), .EST6(1.56), .EST7(1.68), .EST8(1.82), .ACT5(1.57), .ACT6(1.68), .ACT7(1.80), .ACT8(1.91),
    .COV5(96.6), .COV6(98.2), .COV7(99.0), .COV8(99.6))
    c1c (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  tm_workload_driver #(.NAME("Ckt2-A"), .N(64), .M(64), .F(6), .CH(16), .DENS(2010), .NSIG(400),
    .EST5(1.43), .EST6(1.52), .EST7(1.62), .EST8(1.73), .ACT5(1.44), .ACT6(1.54), .ACT7(1.64), .ACT8(1.74),
    .COV5(96.7), .COV6(98.3), .COV7(99.1), .COV8(99.5))
    c2a (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  tm_workload_driver #(.NAME("Ckt2-B"), .N(64), .M(64), .F(6), .CH(16), .DENS(670), .NSIG(400),
    .EST5(1.22), .EST6(1.27), .EST7(1.32), .EST8(1.38), .ACT5(1.23), .ACT6(1.28), .ACT7(1.33), .ACT8(1.39),
    .COV5(96.7), .COV6(98.3), .COV7(99.1), .COV8(99.6))
    c2b (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  tm_workload_driver #(.NAME("Ckt2-C"), .N(64), .M(64), .F(6), .CH(16), .DENS(2740), .NSIG(400),
    .EST5(1.59), .EST6(1.72), .EST7(1.86), .EST8(2.00), .ACT5(1.60), .ACT6(1.74), .ACT7(1.87), .ACT8(2.01),
    .COV5(96.6), .COV6(98.2), .COV7(99.0), .COV8(99.6))
    c2c (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fl[5]));

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
