// sr_workload_driver -- tester model that runs one evaluated configuration
// of the shadow-register X-canceling MISR and measures its error coverage.
//
// It instantiates sr_xcancel_misr with K = 4 selective XORs and, for
// k = KLO..KHI checks per cycle in turn (the unused mask channels held at zero),
// shifts NSIG signatures' worth of random slices with X positions at a
// density of DENS thousandths of a percent, without ever stopping the scan.
// The tester transfers the signature to the shadow register when the next
// slice would leave fewer than QMIN X-free combinations in the MISR. While a
// signature sits in the shadow register, every cycle each active gate gets a
// random combination of its X-free masks (Gauss-Jordan elimination in
// xc_tb_pkg::xc_model); results of fault-free signatures must equal the
// predicted values. Half of the signatures carry one flipped non-X bit.
// A second model follows the error alone, to tell whether the error is
// observable at all (not hidden in the span of the X columns); for those
// that are, the fraction caught must match the mean of 1 - 2^-(k*s), s being
// the signature's transfer period: the coverage recurrence of the scheme.
// With SFIX > 0 the tester instead transfers at a fixed period of SFIX
// cycles, so every signature gets exactly k*SFIX checks.
// The published estimated and measured coverages, where given (PE*, PA*),
// are printed alongside.
module sr_workload_driver #(
  parameter string       NAME = "cfg",
  parameter int unsigned N = 64,
  parameter int unsigned M = 16,
  parameter int unsigned F = 7,
  parameter int unsigned DENS = 1000,
  parameter int unsigned QMIN = 4,
  parameter int unsigned NSIG = 200,
  parameter int unsigned KLO = 1,
  parameter int unsigned KHI = 4,
  parameter int unsigned SFIX = 0,   // >0: transfer every SFIX cycles, scan never idle
  parameter real PE1 = 0.0, parameter real PE2 = 0.0, parameter real PE3 = 0.0, parameter real PE4 = 0.0,
  parameter real PA1 = 0.0, parameter real PA2 = 0.0, parameter real PA3 = 0.0, parameter real PA4 = 0.0
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   checks,
  output int   failures
);
  import xc_tb_pkg::*;

  localparam int unsigned K = 4;

  logic [N-1:0]       scan_out;
  logic               scan_shift, transfer;
  logic [K-1:0][M-1:0] mask_in;
  logic [K-1:0]       xc_out;
  logic [M-1:0]       signature, shadow;

  sr_xcancel_misr #(.N(N), .M(M), .F(F), .K(K)) dut (
    .clk, .rst_n, .scan_out, .scan_shift, .transfer, .mask_in, .xc_out,
    .signature, .shadow
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %s (t=%0t)", NAME, what, $time);
    end
  endtask

  function automatic void rand_slice(ref bit val [], ref bit xm [], input int limit);
    int nxs = 0;
    foreach (val[i]) begin
      val[i] = 1'($urandom);
      xm[i]  = (($urandom % 100000) < DENS) && (nxs < limit);
      nxs += xm[i];
    end
  endfunction

  initial begin
    xc_model mdl, emdl;
    bit val [], xm [], ev [], ez [];
    real pe [4], pa [4];
    pe = '{PE1, PE2, PE3, PE4};
    pa = '{PA1, PA2, PA3, PA4};
    done = 0; checks = 0; failures = 0;
    scan_out = '0; scan_shift = 0; transfer = 0; mask_in = '0;
    mdl  = new(N, M, F, vec_t'(xc_pkg::primitive_poly(M)));
    emdl = new(N, M, F, vec_t'(xc_pkg::primitive_poly(M)));
    val = new[N]; xm = new[N]; ev = new[N]; ez = new[N];
    @(posedge rst_n);
    @(posedge clk);
    #1;
    for (int k = int'(KLO); k <= int'(KHI); k++) begin
      // shadow-side state: signature being checked
      vec_t sh_masks [$];
      vec_t sh_s0, sh_e;
      bit   sh_valid, sh_faulty, sh_hit;
      int   sh_period, since;
      // main-MISR-side state
      bit   cur_faulty, flipped, want_fault;
      int   n_obs, n_det, n_hidden, n_sig;
      real  pred_sum, cov, pred, sigma, s_sum;
      since = 0;
      sh_valid = 0; sh_faulty = 0; sh_hit = 0; sh_period = 0; sh_e = '0; sh_s0 = '0;
      cur_faulty = 0; flipped = 0; want_fault = ($urandom % 2) == 1;
      n_obs = 0; n_det = 0; n_hidden = 0; n_sig = 0; pred_sum = 0.0; s_sum = 0.0;
      mdl.clear();
      emdl.clear();
      // restart the DUT's MISR too: a transfer with no slice empties it
      mask_in = '0;
      transfer = 1;
      scan_shift = 0;
      @(posedge clk);
      #1;
      transfer = 0;
      rand_slice(val, xm, M - QMIN);
      while (n_sig < int'(NSIG)) begin
        logic [N-1:0] w;
        bit shift, xfer, flip, pv, pf, nwant;
        bit pexp [K];
        int xs;
        xs = xc_model::count_x(xm);
        since++;
        shift = (SFIX > 0) || (($urandom % 20) != 0);
        if (!shift) foreach (xm[i]) xm[i] = 0;
        if (SFIX > 0) xfer = since >= int'(SFIX);
        else xfer = shift && (mdl.nx + xs > int'(M - QMIN));
        // the slice of a transfer cycle already belongs to the next signature
        nwant = ($urandom % 2) == 1;
        flip = shift && (xfer ? nwant : (want_fault && !flipped));
        for (int i = 0; i < int'(N); i++) w[i] = xm[i] ? 1'($urandom) : val[i];
        foreach (ev[i]) ev[i] = 0;
        if (flip) begin
          int pos;
          do pos = $urandom % N; while (xm[pos]);
          w[pos] = ~w[pos];
          ev[pos] = 1;
        end
        // masks for the signature currently in the shadow register
        pv = sh_valid && sh_masks.size() > 0;
        pf = sh_faulty;
        for (int g = 0; g < int'(K); g++) begin
          automatic vec_t mk = '0;
          if (pv && g < k) begin
            foreach (sh_masks[b]) if ($urandom % 2 == 1) mk ^= sh_masks[b];
            if (mk == 0) mk = sh_masks[$urandom % sh_masks.size()];
          end
          pexp[g] = ^(sh_s0 & mk);
          mask_in[g] = M'(mk);
        end
        if (pv) sh_period++;
        scan_out = w; scan_shift = shift; transfer = xfer;
        if (xfer) begin
          // the signature leaving the shadow register is complete
          if (sh_valid && pf) begin
            automatic bit observable = 0;
            foreach (sh_masks[b]) if (^(sh_e & sh_masks[b])) observable = 1;
            if (observable) begin
              n_obs++;
              pred_sum += 1.0 - 2.0 ** (-(k * sh_period));
            end else n_hidden++;
          end
          if (sh_valid) begin
            n_sig++;
            s_sum += real'(sh_period);
          end
          mdl.xfree_masks(sh_masks);
          sh_s0 = mdl.s0;
          sh_e = emdl.s0;
          sh_faulty = cur_faulty;
          sh_period = 0;
          since = 0;
          mdl.clear();
          emdl.clear();
          cur_faulty = 0;
          flipped = 0;
          want_fault = nwant;
        end
        if (shift) begin
          mdl.step(val, xm);
          emdl.step(ev, ez);
        end
        if (flip) begin
          cur_faulty = 1;
          flipped = 1;
        end
        @(posedge clk);
        #1;
        if (pv) begin
          for (int g = 0; g < k; g++) begin
            if (!pf) check(xc_out[g] == pexp[g], "X-canceled bit equals fault-free value");
            else if (xc_out[g] != pexp[g]) sh_hit = 1;
          end
        end
        if (xfer) begin
          if (pf && sh_hit) n_det++;
          sh_hit = 0;
          sh_valid = 1;
        end
        if (shift) rand_slice(val, xm, M - QMIN);
      end
      cov = real'(n_det) / real'(n_obs);
      pred = pred_sum / real'(n_obs);
      sigma = $sqrt(pred * (1.0 - pred) / real'(n_obs));
      if (pe[k-1] > 0.0)
        $display("%s k=%0d: mean transfer period %0.1f cycles, coverage of observable errors %0.1f%% (predicted %0.1f%%), all errors %0.1f%% over %0d; published estimate %0.1f%%, measured %0.1f%%",
                 NAME, k, s_sum / real'(n_sig), 100.0 * cov, 100.0 * pred,
                 100.0 * real'(n_det) / real'(n_obs + n_hidden), n_obs + n_hidden, pe[k-1], pa[k-1]);
      else
        $display("%s k=%0d: mean transfer period %0.1f cycles, coverage of observable errors %0.1f%% (predicted %0.1f%%), all errors %0.1f%% over %0d",
                 NAME, k, s_sum / real'(n_sig), 100.0 * cov, 100.0 * pred,
                 100.0 * real'(n_det) / real'(n_obs + n_hidden), n_obs + n_hidden);
      check(n_obs > 0 && cov > pred - 4.0 * sigma - 0.01 && cov < pred + 4.0 * sigma + 0.01,
            "coverage follows 1 - 2^-(k*s)");
      transfer = 0;
      scan_shift = 0;
      @(posedge clk);
      #1;
    end
    done = 1;
  end
endmodule
