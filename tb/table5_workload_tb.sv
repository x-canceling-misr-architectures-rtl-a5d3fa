// table5_workload_tb -- runs the shadow-register configurations of the
// evaluated designs: a 1050-chain block on a 12-bit MISR (fan-out 5, 0.07%
// X), a 203-chain block on a 19-bit MISR (fan-out 9, 3.35% X), a 75-chain
// block on a 14-bit MISR (fan-out 7 as in its time-multiplexing
// configuration, 3.28% X) and 64-chain blocks on a 16-bit MISR
// (fan-out 7) at 2.01%, 0.67% and 2.74% X, each with 1 to 4 checks per
// cycle. Coverage depends on the transfer period, which depends on when the
// tester decides the MISR is full; here that is when fewer than four X-free
// combinations would remain, so the figures can differ from the published
// ones, whose transfer rule is not known. Errors whose effect on the
// signature lies in the span of the X columns cannot be seen by any X-free
// combination; they are counted apart.
module table5_workload_tb;
  logic clk;
  logic rst_n;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  bit done [6];
  int chk [6], fl [6];

  sr_workload_driver #(.NAME("Ckt1-A 12-bit"), .N(1050), .M(12), .F(5), .DENS(70), .NSIG(300),
    .PE1(93.7), .PE2(99.6), .PE3(99.9), .PE4(99.9), .PA1(93.7), .PA2(98.2), .PA3(99.1), .PA4(99.4))
    c1a (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  sr_workload_driver #(.NAME("Ckt1-B 19-bit"), .N(203), .M(19), .F(9), .DENS(3350), .NSIG(300),
    .PE1(75.0), .PE2(93.7), .PE3(98.4), .PE4(99.6), .PA1(74.4), .PA2(90.2), .PA3(97.9), .PA4(98.9))
    c1b (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  sr_workload_driver #(.NAME("Ckt1-C 14-bit"), .N(75), .M(14), .F(7), .DENS(3280), .NSIG(300),
    .PE1(87.5), .PE2(98.4), .PE3(99.8), .PE4(99.9), .PA1(87.3), .PA2(95.8), .PA3(97.6), .PA4(98.8))
    c1c (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  sr_workload_driver #(.NAME("Ckt2-A 16-bit"), .N(64), .M(16), .F(7), .DENS(2010), .NSIG(300),
    .PE1(93.75), .PE2(99.60), .PE3(99.97), .PE4(99.99), .PA1(93.60), .PA2(98.01), .PA3(98.92), .PA4(99.20))
    c2a (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  sr_workload_driver #(.NAME("Ckt2-B 16-bit"), .N(64), .M(16), .F(7), .DENS(670), .NSIG(300),
    .PE1(93.75), .PE2(99.60), .PE3(99.97), .PE4(99.99), .PA1(93.67), .PA2(98.07), .PA3(98.96), .PA4(99.24))
    c2b (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]));
  sr_workload_driver #(.NAME("Ckt2-C 16-bit"), .N(64), .M(16), .F(7), .DENS(2740), .NSIG(300),
    .PE1(93.75), .PE2(99.60), .PE3(99.97), .PE4(99.99), .PA1(93.63), .PA2(98.20), .PA3(99.10), .PA4(99.39))
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
