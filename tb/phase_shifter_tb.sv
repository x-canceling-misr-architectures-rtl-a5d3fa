// phase_shifter_tb -- checks the phase shifter at a small size (40 chains,
// 8-bit MISR, fan-out 3) and at the default size (1050 chains, 32 bits,
// fan-out 7).
//  * a single 1 on chain i must reach exactly F MISR inputs, namely those of
//    the published tap pattern xc_pkg::ps_mask;
//  * for random slices each output must be the XOR of the chains tapping it,
//    computed here chain by chain.
module phase_shifter_tb;
  int checks = 0, failures = 0;

  localparam int unsigned NA = 40,   MA = 8,  FA = 3;
  localparam int unsigned NB = 1050, MB = 32, FB = 7;

  logic [NA-1:0] ca;
  logic [MA-1:0] oa;
  logic [NB-1:0] cb;
  logic [MB-1:0] ob;

  phase_shifter #(.N(NA), .M(MA), .F(FA)) dut_a (.chain_in(ca), .misr_in(oa));
  phase_shifter                            dut_b (.chain_in(cb), .misr_in(ob));

  function automatic logic [63:0] expect_out(int n, int m, int f, const ref logic [NB-1:0] c);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < n; i++) begin
      logic [63:0] t;
      t = xc_pkg::ps_mask(m, f, i);
      if (c[i]) for (int o = 0; o < m; o++) if (t[o]) r[o] = ~r[o];
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] wide;
    for (int i = 0; i < NB; i++) begin
      cb = '0; cb[i] = 1'b1;
      ca = '0; if (i < NA) ca[i] = 1'b1;
      #1;
      checks++;
      if ($countones(ob) != FB || 64'(ob) != xc_pkg::ps_mask(MB, FB, i)) begin
        failures++; $display("chain %0d reaches %h", i, ob);
      end
      if (i < NA) begin
        checks++;
        if ($countones(oa) != FA || 64'(oa) != xc_pkg::ps_mask(MA, FA, i)) begin
          failures++; $display("small: chain %0d reaches %h", i, oa);
        end
      end
    end
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NB; i++) wide[i] = 1'($urandom);
      cb = wide;
      ca = wide[NA-1:0];
      #1;
      checks += 2;
      if (64'(ob) != expect_out(NB, MB, FB, wide)) begin failures++; $display("random mismatch (big)"); end
      wide[NB-1:NA] = '0;
      if (64'(oa) != expect_out(NA, MA, FA, wide)) begin failures++; $display("random mismatch (small)"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
