// misr_tb -- self-checking test of the MISR.
//
// Two instances: an 8-bit MISR and the 32-bit default. Random data, enable
// and clear are applied for many cycles and the signature is compared every
// cycle with a bit-serial model of an internal-feedback MISR written here.
// The 8-bit MISR is also run as an autonomous LFSR from state 1 to check
// that its default polynomial is primitive (period 2^8 - 1).
module misr_tb;
  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  localparam int unsigned MA = 8, MB = 32;
  localparam logic [MA-1:0] PA = 8'b0111_0001;                 // x^8+x^6+x^5+x^4+1
  localparam logic [MB-1:0] PB = 32'h0040_0007;                // x^32+x^22+x^2+x+1

  logic          clr_a, en_a, clr_b, en_b;
  logic [MA-1:0] d_a, sig_a, ref_a;
  logic [MB-1:0] d_b, sig_b, ref_b;

  misr #(.M(MA)) dut_a (.clk, .rst_n, .clear(clr_a), .en(en_a), .d(d_a), .sig(sig_a));
  misr           dut_b (.clk, .rst_n, .clear(clr_b), .en(en_b), .d(d_b), .sig(sig_b));

  function automatic logic [63:0] model(int m, logic [63:0] poly, logic [63:0] s,
                                        logic [63:0] d, logic clr, logic en);
    logic [63:0] n;
    logic top;
    if (clr) s = '0;
    if (!en) return s;
    top = s[m-1];
    n = '0;
    for (int i = m - 1; i >= 1; i--) n[i] = s[i-1] ^ d[i] ^ (top & poly[i]);
    n[0] = top ^ d[0];
    return n;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    rst_n = 1'b0;
    {clr_a, en_a, clr_b, en_b} = '0;
    d_a = '0;
    d_b = '0;
    ref_a = '0;
    ref_b = '0;
    #12 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      d_a   = MA'($urandom);
      d_b   = $urandom;
      en_a  = ($urandom % 8) != 0;
      en_b  = ($urandom % 8) != 0;
      clr_a = ($urandom % 50) == 0;
      clr_b = ($urandom % 50) == 0;
      ref_a = MA'(model(MA, 64'(PA), 64'(ref_a), 64'(d_a), clr_a, en_a));
      ref_b = MB'(model(MB, 64'(PB), 64'(ref_b), 64'(d_b), clr_b, en_b));
      @(posedge clk);
      #1;
      checks += 2;
      if (sig_a !== ref_a) begin failures++; $display("8-bit mismatch %h vs %h", sig_a, ref_a); end
      if (sig_b !== ref_b) begin failures++; $display("32-bit mismatch %h vs %h", sig_b, ref_b); end
    end
    // Period of the 8-bit register as an LFSR: clear, inject 1, then free-run.
    @(negedge clk);
    clr_a = 1'b1; en_a = 1'b1; d_a = 8'h01;
    @(negedge clk);
    clr_a = 1'b0; d_a = '0;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (sig_a != 8'h01 && period < 400);
    checks++;
    if (period != 255) begin failures++; $display("period %0d, expected 255", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
