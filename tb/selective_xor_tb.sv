// selective_xor_tb -- random masks and signatures on a 32-bit selective XOR;
// the output must equal the parity of the selected bits, counted bit by bit.
module selective_xor_tb;
  int checks = 0, failures = 0;
  logic [31:0] sig, mask;
  logic        parity;

  selective_xor dut (.sig, .mask, .parity);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int ones;
      sig  = $urandom;
      mask = (t < 32) ? (32'h1 << t) : $urandom;
      #1;
      ones = 0;
      for (int i = 0; i < 32; i++) if (sig[i] && mask[i]) ones++;
      checks++;
      if (parity !== ones[0]) begin
        failures++;
        $display("sig=%h mask=%h parity=%b", sig, mask, parity);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
