// shadow_register_tb -- random load pulses into a 12-bit shadow register; the
// output must hold the last loaded word and ignore data while load is low.
module shadow_register_tb;
  logic clk = 1'b0;
  logic rst_n, load;
  logic [11:0] d, q, expect_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shadow_register dut (.clk, .rst_n, .load, .d, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; d = '0; expect_q = '0;
    #12 rst_n = 1'b1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      d = 12'($urandom);
      load = ($urandom % 5) == 0;
      if (load) expect_q = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== expect_q) begin failures++; $display("q=%h expected %h", q, expect_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
