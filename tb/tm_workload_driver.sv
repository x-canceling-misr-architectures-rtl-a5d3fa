// tm_workload_driver -- tester model that runs one evaluated configuration
// of the time-multiplexing X-canceling MISR and measures its test time.
//
// It instantiates tm_xcancel_misr with the given size and, for q = QLO..QHI
// in turn, shifts NSIG signatures' worth of random slices with X positions at a
// density of DENS thousandths of a percent, raising stop before a slice
// would push the MISR past M-q unknowns, then sending q X-free masks of
// ceil(M/CH) beats each. Every returned bit is checked against the
// fault-free value from xc_tb_pkg::xc_model. The normalised test time,
// (shift cycles + processing cycles) / shift cycles, is compared with the
// estimate 1 + n*x*q*beats/(m-q) and must lie between it (less a small
// statistical margin) and a bound for slice granularity; it may exceed the estimate because the
// MISR is processed a whole slice early when the next slice would overflow
// it, which the estimate ignores. In half of the signatures one non-X scan
// cell is flipped; the fraction caught (error coverage) must match 1 - 2^-q
// within four standard deviations. EST5..EST8 and ACT5..ACT8 are the
// published estimated and measured test times, COV5..COV8 the published
// measured coverages for this configuration; they are printed next to the
// simulated values for q = 5..8.
module tm_workload_driver #(
  parameter string       NAME = "cfg",
  parameter int unsigned N = 64,
  parameter int unsigned M = 16,
  parameter int unsigned F = 3,
  parameter int unsigned CH = 16,
  parameter int unsigned DENS = 1000,    // X density in 0.001% units
  parameter int unsigned NSIG = 40,
  parameter int unsigned QLO = 5,
  parameter int unsigned QHI = 8,
  parameter real EST5 = 0.0, parameter real EST6 = 0.0,   // 0: none given
  parameter real EST7 = 0.0, parameter real EST8 = 0.0,
  parameter real ACT5 = 0.0, parameter real ACT6 = 0.0,
  parameter real ACT7 = 0.0, parameter real ACT8 = 0.0,
  parameter real COV5 = 0.0, parameter real COV6 = 0.0,
  parameter real COV7 = 0.0, parameter real COV8 = 0.0
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   checks,
  output int   failures
);
  import xc_tb_pkg::*;

  localparam int unsigned BEATS = (M + CH - 1) / CH;

  logic [N-1:0]  scan_out;
  logic          scan_shift, stop;
  logic [CH-1:0] tester_in, decomp_ch;
  logic          scan_hold, xc_out, xc_valid;
  int            hold_errs = 0;

  // scan_hold must follow stop and the decompressor must see the channels
  always @(negedge clk) if (scan_hold != stop || decomp_ch != tester_in) hold_errs++;
  logic [M-1:0]  signature;

  tm_xcancel_misr #(.N(N), .M(M), .F(F), .CH(CH)) dut (
    .clk, .rst_n, .scan_out, .scan_shift, .tester_in, .stop,
    .decomp_ch, .scan_hold, .xc_out, .xc_valid, .signature
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
    real est [4], act [4], cov_pub [4];
    est = '{EST5, EST6, EST7, EST8};
    cov_pub = '{COV5, COV6, COV7, COV8};
    act = '{ACT5, ACT6, ACT7, ACT8};
    done = 0; checks = 0; failures = 0;
    scan_out = '0; scan_shift = 0; stop = 0; tester_in = '0;
    mdl = new(N, M, F, vec_t'(xc_pkg::primitive_poly(M)));
    emdl = new(N, M, F, vec_t'(xc_pkg::primitive_poly(M)));
    ev = new[N];
    ez = new[N];
    val = new[N];
    xm  = new[N];
    @(posedge rst_n);
    @(posedge clk);
    #1;
    for (int q = int'(QLO); q <= int'(QHI); q++) begin
      automatic int shift_c = 0;
      automatic int proc_c = 0;
      automatic int n_faulty = 0;
      automatic int n_det = 0;
      automatic int n_undet = 0;
      real cov, cov_obs, sigma;
      real norm, formula;
      mdl.clear();
      for (int s = 0; s < int'(NSIG); s++) begin
        int xs;
        vec_t masks [$];
        bit faulty, flipped, miss;
        faulty = ($urandom % 2) == 1;
        flipped = 0;
        miss = 0;
        rand_slice(val, xm, M - q);
        xs = xc_model::count_x(xm);
        while (mdl.nx + xs <= int'(M) - q) begin
          logic [N-1:0] w;
          for (int i = 0; i < int'(N); i++) w[i] = xm[i] ? 1'($urandom) : val[i];
          foreach (ev[i]) ev[i] = 0;
          if (faulty && !flipped) begin
            int pos;
            do pos = $urandom % N; while (xm[pos]);
            w[pos] = ~w[pos];
            ev[pos] = 1;
            flipped = 1;
          end
          emdl.step(ev, ez);
          scan_out = w; scan_shift = 1; stop = 0; tester_in = CH'($urandom);
          mdl.step(val, xm);
          @(posedge clk);
          #1;
          shift_c++;
          rand_slice(val, xm, M - q);
          xs = xc_model::count_x(xm);
        end
        mdl.xfree_masks(masks);
        check(masks.size() >= q, "enough X-free combinations");
        for (int j = 0; j < q; j++) begin
          vec_t mk;
          bit e;
          mk = masks[j];
          foreach (masks[b]) if ($urandom % 2 == 1) mk ^= masks[b];
          if (mk == 0) mk = masks[j];
          e = mdl.expected(mk);
          for (int b = 0; b < int'(BEATS); b++) begin
            stop = 1; scan_shift = 0; tester_in = CH'(mk >> (b * CH));
            @(posedge clk);
            #1;
            proc_c++;
          end
          check(xc_valid, "one result per mask");
          if (!faulty) check(xc_out == e, "X-canceled bit equals fault-free value");
          else if (xc_out != e) miss = 1;
        end
        if (faulty) begin
          automatic bit detectable = 0;
          foreach (masks[b]) if (emdl.expected(masks[b])) detectable = 1;
          n_faulty++;
          if (miss) n_det++;
          if (!detectable) n_undet++;
        end
        mdl.clear();
        emdl.clear();
      end
      norm = real'(shift_c + proc_c) / real'(shift_c);
      formula = 1.0 + real'(N) * real'(DENS) / 100000.0 * real'(q * BEATS) / real'(int'(M) - q);
      if (q >= 5 && q <= 8 && est[q-5] > 0.0)
        $display("%s q=%0d: normalised test time %0.2f (formula %0.2f, published estimate %0.2f, published measured %0.2f)",
                 NAME, q, norm, formula, est[q-5], act[q-5]);
      else
        $display("%s q=%0d: normalised test time %0.2f (formula %0.2f)", NAME, q, norm, formula);
      // error coverage: single-bit errors in half of the signatures. An error
      // whose signature effect lies in the span of the X columns is invisible
      // to every X-free combination; 1 - 2^-q applies to the others.
      cov = real'(n_det) / real'(n_faulty);
      cov_obs = real'(n_det) / real'(n_faulty - n_undet);
      sigma = $sqrt((1.0 - 2.0 ** (-q)) * (2.0 ** (-q)) / real'(n_faulty - n_undet));
      if (q >= 5 && q <= 8 && cov_pub[q-5] > 0.0)
        $display("%s q=%0d: error coverage %0.1f%% over %0d errors, %0.1f%% of the %0d not hidden by Xs (1 - 2^-q = %0.1f%%, published measured %0.1f%%)",
                 NAME, q, 100.0 * cov, n_faulty, 100.0 * cov_obs, n_faulty - n_undet,
                 100.0 * (1.0 - 2.0 ** (-q)), cov_pub[q-5]);
      else
        $display("%s q=%0d: error coverage %0.1f%% over %0d errors, %0.1f%% of the %0d not hidden by Xs (1 - 2^-q = %0.1f%%)",
                 NAME, q, 100.0 * cov, n_faulty, 100.0 * cov_obs, n_faulty - n_undet,
                 100.0 * (1.0 - 2.0 ** (-q)));
      check(cov_obs > 1.0 - 2.0 ** (-q) - 4.0 * sigma - 0.01 && cov_obs < 1.0 - 2.0 ** (-q) + 4.0 * sigma + 0.01,
            "error coverage matches 1 - 2^-q");
      check(norm > formula - 0.1 && norm < formula + 0.6 * (formula - 1.0) + 0.1,
            "measured time between the estimate and the slice-granularity bound");
      stop = 0;
      @(posedge clk);
      #1;
    end
    check(hold_errs == 0, "scan_hold and decompressor channels");
    done = 1;
  end
endmodule
