// sr_xcancel_misr_tb -- end-to-end test of the shadow-register X-canceling
// MISR at a reduced size: 64 chains, 12-bit MISR, fan-out 3, 2 checks/cycle.
//
// The testbench acts as tester and test-generation software. Scan shifting
// never stops (apart from occasional capture cycles). Slices carry about 3%
// X values (random in the DUT, symbolic in xc_tb_pkg::xc_model). When the
// next slice would push the main MISR past M-QMIN unknowns, transfer is
// raised: the model's signature moves to a "shadow" copy and its X-free
// masks are computed by Gauss-Jordan elimination. During the following
// transfer period each of the K selective XORs gets a random nonzero
// combination of those masks every cycle, and each xc_out bit is compared
// one cycle later with the fault-free value. Some signatures carry one
// flipped non-X bit; they must be flagged by some check while they sit in
// the shadow register. Also checked: the shadow register equals the MISR
// value at transfer, the MISR restarts with the slice of the transfer cycle,
// and scan shifting is never held (no test-time cost).
module sr_xcancel_misr_tb;
  import xc_tb_pkg::*;

  localparam int unsigned N = 64, M = 12, F = 3, K = 2, QMIN = 3;
  localparam int unsigned NSIG = 80;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [N-1:0]        scan_out;
  logic                scan_shift, transfer;
  logic [K-1:0][M-1:0] mask_in;
  logic [K-1:0]        xc_out;
  logic [M-1:0]        signature, shadow;

  sr_xcancel_misr #(.N(N), .M(M), .F(F), .K(K)) dut (
    .clk, .rst_n, .scan_out, .scan_shift, .transfer, .mask_in, .xc_out,
    .signature, .shadow
  );

  int checks = 0, failures = 0;
  int n_transfers = 0, n_faulty = 0, n_detected = 0, n_capture = 0, n_xchecks = 0;
  int cycles = 0;

  xc_model mdl;
  bit   val [], xm [];
  vec_t sh_masks [$];   // X-free masks of the signature in the shadow register
  vec_t sh_s0;          // its fault-free known part
  bit   sh_valid, sh_faulty, sh_hit, cur_faulty;
  bit   pend_valid [K];
  bit   pend_exp [K];
  bit   pend_faulty;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_slice(int limit);
    int nxs = 0;
    for (int i = 0; i < N; i++) begin
      val[i] = 1'($urandom);
      xm[i]  = (($urandom % 100) < 3) && (nxs < limit);
      nxs += xm[i];
    end
  endtask

  // drive selective-XOR masks for this cycle; remember what to expect
  task automatic drive_masks();
    pend_faulty = sh_faulty;
    for (int k = 0; k < K; k++) begin
      automatic vec_t mk = '0;
      pend_valid[k] = sh_valid && sh_masks.size() > 0;
      if (pend_valid[k]) begin
        foreach (sh_masks[b]) if ($urandom % 2 == 1) mk ^= sh_masks[b];
        if (mk == 0) mk = sh_masks[$urandom % sh_masks.size()];
        pend_exp[k] = ^(sh_s0 & mk);
      end else begin
        mk = vec_t'($urandom);
      end
      mask_in[k] = M'(mk);
    end
  endtask

  task automatic check_outputs();
    for (int k = 0; k < K; k++) begin
      if (!pend_valid[k]) continue;
      n_xchecks++;
      if (!pend_faulty) check(xc_out[k] == pend_exp[k], "X-canceled bit equals fault-free value");
      else if (xc_out[k] != pend_exp[k]) sh_hit = 1;
    end
  endtask

  // one clock: a shift (flip selects an error) or a capture cycle
  task automatic cycle(bit shift, bit do_transfer, bit flip);
    logic [N-1:0] w;
    logic [M-1:0] sig_before;
    int pos;
    for (int i = 0; i < N; i++) w[i] = xm[i] ? 1'($urandom) : val[i];
    if (flip) begin
      do pos = $urandom % N; while (xm[pos]);
      w[pos] = ~w[pos];
    end
    scan_out   = w;
    scan_shift = shift;
    transfer   = do_transfer;
    drive_masks();
    sig_before = signature;
    if (do_transfer) begin
      mdl.xfree_masks(sh_masks);
      sh_s0 = mdl.s0;
      sh_valid = 1;
      sh_faulty = cur_faulty;
      cur_faulty = 0;
      mdl.clear();
      n_transfers++;
    end
    if (shift) mdl.step(val, xm);
    if (flip) cur_faulty = 1;
    @(posedge clk);
    #1;
    cycles++;
    check_outputs();
    // the signature that just left the shadow register is finished
    if (do_transfer) begin
      if (pend_faulty) begin
        n_faulty++;
        if (sh_hit) n_detected++;
      end
      sh_hit = 0;
    end
    if (do_transfer) check(shadow == sig_before, "shadow takes the signature");
    for (int r = 0; r < int'(M); r++)
      if (mdl.known_bit(r)) check(signature[r] == mdl.s0[r] || cur_faulty, "X-free MISR bit");
  endtask

  initial begin
    int xs;
    bit want_fault, flipped;
    mdl = new(N, M, F, vec_t'(xc_pkg::primitive_poly(M)));
    val = new[N];
    xm  = new[N];
    sh_valid = 0; sh_faulty = 0; sh_hit = 0; cur_faulty = 0;
    rst_n = 1'b0;
    scan_out = '0; scan_shift = 1'b0; transfer = 1'b0; mask_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    new_slice(M - QMIN);
    for (int s = 0; s < NSIG; s++) begin
      want_fault = (s % 3) == 1;
      flipped = 0;
      while (1) begin
        xs = xc_model::count_x(xm);
        if (($urandom % 10) == 0) begin
          for (int i = 0; i < N; i++) xm[i] = 0;
          cycle(1'b0, 1'b0, 1'b0);
          n_capture++;
          new_slice(M - QMIN);
          continue;
        end
        if (mdl.nx + xs > int'(M - QMIN)) break;
        cycle(1'b1, 1'b0, want_fault && !flipped);
        flipped |= want_fault;
        new_slice(M - QMIN);
      end
      // this slice goes into the restarted MISR in the transfer cycle
      cycle(1'b1, 1'b1, 1'b0);
      new_slice(M - QMIN);
    end
    $display("transfers=%0d checks_done=%0d faulty=%0d detected=%0d capture=%0d cycles=%0d",
             n_transfers, n_xchecks, n_faulty, n_detected, n_capture, cycles);
    check(n_transfers > 0 && n_capture > 0 && n_xchecks > 0, "all mechanisms exercised");
    check(n_detected > 0 && n_detected >= n_faulty / 2, "injected errors detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
