// tm_xcancel_misr_tb -- end-to-end test of the time-multiplexing X-canceling
// MISR at a reduced size: 64 chains, 16-bit MISR, fan-out 3 and only 6
// tester channels, so each mask takes ceil(16/6) = 3 beats.
//
// The testbench acts as tester and test-generation software. Scan slices with
// random values and about 3% X positions are shifted in (with occasional
// capture cycles where scan_shift is low). X positions get random values in
// the DUT and are tracked symbolically in xc_tb_pkg::xc_model. Before a slice
// would push the MISR past M-Q unknowns, stop is raised: Q X-free masks from
// Gauss-Jordan elimination are loaded beat by beat and every returned bit is
// compared with the fault-free prediction. In some signatures a single
// non-X bit is flipped in the DUT's data only; those signatures should be
// caught by at least one of the Q combinations (probability 1 - 2^-Q each).
// Also checked: scan_hold follows stop, decomp_ch carries the channels,
// xc_valid comes exactly once per mask, one cycle after its last beat, so a
// processing phase lasts Q*BEATS cycles, and X-free signature bits match.
module tm_xcancel_misr_tb;
  import xc_tb_pkg::*;

  localparam int unsigned N = 64, M = 16, F = 3, CH = 6, Q = 4;
  localparam int unsigned BEATS = (M + CH - 1) / CH;
  localparam int unsigned NSIG = 60;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [N-1:0]  scan_out;
  logic          scan_shift, stop;
  logic [CH-1:0] tester_in, decomp_ch;
  logic          scan_hold, xc_out, xc_valid;
  logic [M-1:0]  signature;

  tm_xcancel_misr #(.N(N), .M(M), .F(F), .CH(CH)) dut (
    .clk, .rst_n, .scan_out, .scan_shift, .tester_in, .stop,
    .decomp_ch, .scan_hold, .xc_out, .xc_valid, .signature
  );

  int checks = 0, failures = 0;
  int n_phases = 0, n_faulty = 0, n_detected = 0, n_capture = 0, n_multibeat = 0;
  int shift_cycles = 0, proc_cycles = 0;

  xc_model mdl;
  bit val [], xm [];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // make a random slice with at most limit Xs
  task automatic new_slice(int limit);
    int nxs = 0;
    for (int i = 0; i < N; i++) begin
      val[i] = 1'($urandom);
      xm[i]  = (($urandom % 100) < 3) && (nxs < limit);
      nxs += xm[i];
    end
  endtask

  // drive one shift cycle (or a capture cycle) for one clock
  task automatic shift_slice(bit flip, bit restart);
    logic [N-1:0] w;
    int pos;
    for (int i = 0; i < N; i++) w[i] = xm[i] ? 1'($urandom) : val[i];
    if (flip) begin
      do pos = $urandom % N; while (xm[pos]);
      w[pos] = ~w[pos];
    end
    scan_out   = w;
    scan_shift = 1'b1;
    stop       = 1'b0;
    tester_in  = CH'($urandom);
    if (restart) mdl.clear();
    mdl.step(val, xm);
    @(posedge clk);
    #1;
    shift_cycles++;
    check(decomp_ch == tester_in && !scan_hold, "channels go to decompressor");
  endtask

  task automatic process(bit faulty);
    vec_t masks [$];
    bit mismatch = 0;
    mdl.xfree_masks(masks);
    check(masks.size() >= Q, "enough X-free combinations");
    for (int r = 0; r < M; r++)
      if (mdl.known_bit(r)) check(signature[r] == mdl.s0[r] || faulty, "X-free signature bit");
    for (int j = 0; j < Q; j++) begin
      vec_t mk;
      bit   e;
      // random nonzero combination of the basis is X-free as well
      mk = masks[j];
      for (int b = 0; b < masks.size(); b++) if ($urandom % 2 == 1) mk ^= masks[b];
      if (mk == 0) mk = masks[j];
      e = mdl.expected(mk);
      for (int b = 0; b < BEATS; b++) begin
        stop = 1'b1;
        scan_shift = 1'b0;
        tester_in = CH'(mk >> (b * CH));
        scan_out = N'($urandom);
        @(posedge clk);
        #1;
        proc_cycles++;
        check(scan_hold == 1'b1, "scan held while processing");
        check(xc_valid == (b == BEATS - 1), "xc_valid once per mask, after last beat");
      end
      if (!faulty) check(xc_out == e, "X-canceled bit equals fault-free value");
      else if (xc_out != e) mismatch = 1;
    end
    if (BEATS > 1) n_multibeat++;
    if (faulty) begin
      n_faulty++;
      if (mismatch) n_detected++;
    end
    n_phases++;
  endtask

  initial begin
    int xs;
    bit faulty, restart;
    int start_cycles;
    mdl = new(N, M, F, vec_t'(xc_pkg::primitive_poly(M)));
    val = new[N];
    xm  = new[N];
    rst_n = 1'b0;
    scan_out = '0; scan_shift = 1'b0; stop = 1'b0; tester_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    restart = 0;
    for (int s = 0; s < NSIG; s++) begin
      faulty = (s % 3) == 2;
      new_slice(M - Q);
      xs = xc_model::count_x(xm);
      // fill the MISR until the next slice would exceed M-Q Xs
      while (mdl.nx + xs <= int'(M - Q)) begin
        if (($urandom % 10) == 0) begin
          // capture cycle: nothing is compacted
          scan_shift = 1'b0;
          stop = 1'b0;
          scan_out = N'($urandom);
          @(posedge clk);
          #1;
          n_capture++;
          check(!scan_hold, "no hold during capture");
          continue;
        end
        shift_slice(1'b0, restart);
        restart = 0;
        new_slice(M - Q);
        xs = xc_model::count_x(xm);
      end
      start_cycles = proc_cycles;
      if (faulty) begin
        // inject one error in a fresh X-free slice
        for (int i = 0; i < N; i++) xm[i] = 0;
        shift_slice(1'b1, restart);
        restart = 0;
      end
      process(faulty);
      check(proc_cycles - start_cycles == int'(Q * BEATS), "processing lasts Q*BEATS cycles");
      // the DUT clears its MISR on the first cycle with stop low
      mdl.clear();
    end
    $display("phases=%0d faulty=%0d detected=%0d capture=%0d multibeat=%0d shift=%0d proc=%0d (normalized time %0.3f)",
             n_phases, n_faulty, n_detected, n_capture, n_multibeat, shift_cycles, proc_cycles,
             real'(shift_cycles + proc_cycles) / real'(shift_cycles));
    check(n_phases > 0 && n_capture > 0 && n_multibeat > 0, "all mechanisms exercised");
    check(n_detected > 0 && n_detected >= n_faulty / 2, "injected errors detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
