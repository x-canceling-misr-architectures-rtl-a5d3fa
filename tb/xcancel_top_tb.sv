// xcancel_top_tb -- end-to-end test of the top level at its default sizes:
// the time-multiplexing compactor (1050 chains, 32-bit MISR, fan-out 7, 133
// channels, one beat per mask) and the shadow-register compactor (1050
// chains, 12-bit MISR, fan-out 5, 4 checks/cycle) run concurrently, each
// driven by its own tester process.
//
// Scan slices have random values with X positions at a density of 0.07%,
// the lowest-X block of the evaluated designs; X positions get random values
// in the DUT and are tracked symbolically by xc_tb_pkg::xc_model, which also
// finds the X-free masks by Gauss-Jordan elimination.
//  * time-multiplexing side: Q = 8 combinations per signature; the MISR is
//    processed before a slice would push it past M-Q = 24 unknowns. Checks:
//    each returned bit, scan_hold, xc_valid timing, Q cycles per processing
//    phase, and the measured normalised test time against the estimate
//    1 + n*x*Q/(m-Q) (about 1.25 here).
//  * shadow-register side: transfer when a slice would pass M-4 = 8
//    unknowns; K = 4 random X-free combinations per cycle are checked
//    against the shadow register's fault-free value. Shifting never stops.
//  * on both sides some signatures carry one flipped non-X bit, which must be
//    caught; every mechanism (stop/resume with MISR restart, capture cycles,
//    transfer with MISR restart, error detection) must occur.
module xcancel_top_tb;
  import xc_tb_pkg::*;

  localparam int unsigned TN = 1050, TM = 32, TF = 7, TCH = 133, TQ = 8;
  localparam int unsigned SN = 1050, SM = 12, SF = 5, SK = 4, SQMIN = 4;
  localparam int unsigned XDENS = 70;      // X density in units of 0.001%
  localparam int unsigned T_SIGS = 40, S_SIGS = 60;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [TN-1:0]         tm_scan_out;
  logic                  tm_scan_shift, tm_stop;
  logic [TCH-1:0]        tm_tester_in, tm_decomp_ch;
  logic                  tm_scan_hold, tm_xc_out, tm_xc_valid;
  logic [TM-1:0]         tm_signature;
  logic [SN-1:0]         sr_scan_out;
  logic                  sr_scan_shift, sr_transfer;
  logic [SK-1:0][SM-1:0] sr_mask_in;
  logic [SK-1:0]         sr_xc_out;
  logic [SM-1:0]         sr_signature, sr_shadow;

  xcancel_top dut (.*);

  int checks = 0, failures = 0;
  bit tm_done = 0, sr_done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic void rand_slice(ref bit val [], ref bit xm [], input int limit);
    int nxs = 0;
    foreach (val[i]) begin
      val[i] = 1'($urandom);
      xm[i]  = (($urandom % 100000) < XDENS) && (nxs < limit);
      nxs += xm[i];
    end
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    tm_scan_out = '0; tm_scan_shift = 0; tm_stop = 0; tm_tester_in = '0;
    sr_scan_out = '0; sr_scan_shift = 0; sr_transfer = 0; sr_mask_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  end

  // ---------------- time-multiplexing compactor ----------------
  int t_shift = 0, t_proc = 0, t_phases = 0, t_capture = 0, t_faulty = 0, t_detected = 0;

  initial begin : tm_tester
    xc_model mdl;
    bit val [], xm [];
    int xs;
    mdl = new(TN, TM, TF, vec_t'(xc_pkg::primitive_poly(TM)));
    val = new[TN];
    xm  = new[TN];
    @(posedge rst_n);
    @(posedge clk);
    #1;
    for (int s = 0; s < T_SIGS; s++) begin
      automatic bit faulty = (s % 4) == 3;
      int start;
      vec_t masks [$];
      automatic bit miss = 0;
      rand_slice(val, xm, TM - TQ);
      xs = xc_model::count_x(xm);
      while (mdl.nx + xs <= int'(TM - TQ)) begin
        logic [TN-1:0] w;
        if (($urandom % 20) == 0) begin
          tm_scan_shift = 0; tm_stop = 0;
          @(posedge clk);
          #1;
          t_capture++;
          check(!tm_scan_hold, "tm: no hold in capture");
          continue;
        end
        for (int i = 0; i < int'(TN); i++) w[i] = xm[i] ? 1'($urandom) : val[i];
        tm_scan_out = w; tm_scan_shift = 1; tm_stop = 0; tm_tester_in = TCH'({$urandom, $urandom, $urandom, $urandom, $urandom});
        mdl.step(val, xm);
        @(posedge clk);
        #1;
        t_shift++;
        check(tm_decomp_ch == tm_tester_in && !tm_scan_hold, "tm: channels feed decompressor");
        rand_slice(val, xm, TM - TQ);
        xs = xc_model::count_x(xm);
      end
      if (faulty) begin
        logic [TN-1:0] w;
        int pos;
        foreach (xm[i]) xm[i] = 0;
        for (int i = 0; i < int'(TN); i++) w[i] = val[i];
        pos = $urandom % TN;
        w[pos] = ~w[pos];
        tm_scan_out = w; tm_scan_shift = 1; tm_stop = 0;
        mdl.step(val, xm);
        @(posedge clk);
        #1;
        t_shift++;
      end
      // signature processing phase: Q masks, one beat each
      mdl.xfree_masks(masks);
      check(masks.size() >= TQ, "tm: enough X-free combinations");
      start = t_proc;
      for (int j = 0; j < int'(TQ); j++) begin
        automatic vec_t mk = masks[j];
        bit e;
        foreach (masks[b]) if ($urandom % 2 == 1) mk ^= masks[b];
        if (mk == 0) mk = masks[j];
        e = mdl.expected(mk);
        tm_stop = 1; tm_scan_shift = 0; tm_tester_in = TCH'(mk);
        @(posedge clk);
        #1;
        t_proc++;
        check(tm_scan_hold && tm_xc_valid, "tm: hold and one result per cycle");
        if (!faulty) check(tm_xc_out == e, "tm: X-canceled bit equals fault-free value");
        else if (tm_xc_out != e) miss = 1;
      end
      check(t_proc - start == int'(TQ), "tm: processing lasts Q cycles");
      if (faulty) begin
        t_faulty++;
        if (miss) t_detected++;
      end
      t_phases++;
      mdl.clear();
    end
    tm_stop = 0;
    tm_done = 1;
  end

  // ---------------- shadow-register compactor ----------------
  int s_transfers = 0, s_capture = 0, s_faulty = 0, s_detected = 0, s_checks = 0, s_cycles = 0;

  initial begin : sr_tester
    xc_model mdl;
    bit val [], xm [];
    vec_t sh_masks [$];
    vec_t sh_s0;
    static bit sh_valid = 0, sh_faulty = 0, sh_hit = 0, cur_faulty = 0;
    int xs;
    mdl = new(SN, SM, SF, vec_t'(xc_pkg::primitive_poly(SM)));
    val = new[SN];
    xm  = new[SN];
    @(posedge rst_n);
    @(posedge clk);
    #1;
    rand_slice(val, xm, SM - SQMIN);
    for (int s = 0; s < int'(S_SIGS); s++) begin
      automatic bit want_fault = (s % 3) == 1;
      automatic bit flipped = 0;
      automatic bit last = 0;
      while (!last) begin
        logic [SN-1:0] w;
        bit shift, xfer, flip, pf;
        bit pexp [SK];
        logic [SM-1:0] sig_before;
        bit pv;
        xs = xc_model::count_x(xm);
        shift = ($urandom % 20) != 0;
        xfer = shift && (mdl.nx + xs > int'(SM - SQMIN));
        flip = shift && !xfer && want_fault && !flipped;
        if (!shift) foreach (xm[i]) xm[i] = 0;
        for (int i = 0; i < int'(SN); i++) w[i] = xm[i] ? 1'($urandom) : val[i];
        if (flip) begin
          int pos;
          do pos = $urandom % SN; while (xm[pos]);
          w[pos] = ~w[pos];
        end
        for (int k = 0; k < int'(SK); k++) begin
          automatic vec_t mk = '0;
          if (sh_valid && sh_masks.size() > 0) begin
            foreach (sh_masks[b]) if ($urandom % 2 == 1) mk ^= sh_masks[b];
            if (mk == 0) mk = sh_masks[0];
            pexp[k] = ^(sh_s0 & mk);
          end else mk = vec_t'($urandom);
          sr_mask_in[k] = SM'(mk);
        end
        pf = sh_faulty;
        pv = sh_valid && sh_masks.size() > 0;
        sr_scan_out = w; sr_scan_shift = shift; sr_transfer = xfer;
        sig_before = sr_signature;
        if (xfer) begin
          mdl.xfree_masks(sh_masks);
          sh_s0 = mdl.s0;
          sh_faulty = cur_faulty;
          cur_faulty = 0;
          mdl.clear();
          s_transfers++;
          last = 1;
        end
        if (shift) mdl.step(val, xm);
        if (flip) begin cur_faulty = 1; flipped = 1; end
        if (!shift) s_capture++;
        @(posedge clk);
        #1;
        s_cycles++;
        if (pv) begin
          for (int k = 0; k < int'(SK); k++) begin
            s_checks++;
            if (!pf) check(sr_xc_out[k] == pexp[k], "sr: X-canceled bit equals fault-free value");
            else if (sr_xc_out[k] != pexp[k]) sh_hit = 1;
          end
        end
        if (xfer) begin
          check(sr_shadow == sig_before, "sr: shadow takes the signature");
          if (sh_valid && pf) begin
            s_faulty++;
            if (sh_hit) s_detected++;
          end
          sh_hit = 0;
          sh_valid = 1;
        end
        if (shift || xfer) rand_slice(val, xm, SM - SQMIN);
      end
    end
    sr_done = 1;
  end

  initial begin
    real norm, est;
    wait (tm_done && sr_done);
    norm = real'(t_shift + t_proc) / real'(t_shift);
    est  = 1.0 + real'(TN) * (real'(XDENS) / 100000.0) * real'(TQ) / real'(TM - TQ);
    $display("tm: phases=%0d capture=%0d faulty=%0d detected=%0d shift=%0d proc=%0d normalised time %0.3f (estimate %0.3f)",
             t_phases, t_capture, t_faulty, t_detected, t_shift, t_proc, norm, est);
    $display("sr: transfers=%0d capture=%0d faulty=%0d detected=%0d checks=%0d cycles=%0d",
             s_transfers, s_capture, s_faulty, s_detected, s_checks, s_cycles);
    check(t_phases > 0 && t_capture > 0, "tm: stop/resume and capture happened");
    check(s_transfers > 0 && s_capture > 0 && s_checks > 0, "sr: transfer, capture, checks happened");
    check(t_detected > 0 && t_detected >= t_faulty / 2, "tm: injected errors detected");
    check(s_detected > 0 && s_detected >= s_faulty / 2, "sr: injected errors detected");
    check(norm > est - 0.15 && norm < est + 0.25, "tm: normalised test time near estimate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
