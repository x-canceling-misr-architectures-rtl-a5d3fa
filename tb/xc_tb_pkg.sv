// xc_tb_pkg -- reference model of an X-canceling MISR used by the testbenches.
//
// xc_model plays the part of the test-generation software: it simulates the
// phase shifter and MISR symbolically. Every X entering the compactor gets a
// new symbol; for each MISR bit the model keeps
//   s0[r]   the bit's value with every X taken as 0 (the known part), and
//   dep[r]  the set of X symbols the bit depends on (one bit per symbol).
// Gauss-Jordan elimination over GF(2) on the rows dep[r], carrying an identity
// matrix alongside, yields every combination of MISR bits whose X dependence
// cancels; the X-free combination's value is the parity of s0 under its mask.
// The MISR here is written independently of the RTL (per-bit shift with the
// feedback applied stage by stage); only the phase-shifter tap pattern,
// xc_pkg::ps_mask, is shared, as it is the wiring specification.
package xc_tb_pkg;

  typedef bit [63:0] vec_t;

  class xc_model;
    int   n, m, f;
    vec_t poly;
    vec_t mmask;
    vec_t s0;
    vec_t dep [64];
    int   nx;
    vec_t tap [];

    function new(int n_, int m_, int f_, vec_t poly_);
      n = n_;
      m = m_;
      f = f_;
      poly = poly_;
      mmask = (m == 64) ? '1 : ((vec_t'(1) << m) - 1);
      tap = new[n];
      for (int i = 0; i < n; i++) tap[i] = vec_t'(xc_pkg::ps_mask(m, f, i));
      clear();
    endfunction

    function void clear();
      s0 = '0;
      nx = 0;
      for (int r = 0; r < 64; r++) dep[r] = '0;
    endfunction

    // Number of X values in a slice.
    static function int count_x(const ref bit xm []);
      int c = 0;
      foreach (xm[i]) c += xm[i];
      return c;
    endfunction

    // One shift cycle: val[i] is chain i's value, xm[i] marks it unknown.
    function void step(const ref bit val [], const ref bit xm []);
      vec_t d0;
      vec_t dx [64];
      vec_t ns;
      vec_t ndep [64];
      bit   fb;
      d0 = '0;
      for (int o = 0; o < 64; o++) dx[o] = '0;
      for (int i = 0; i < n; i++) begin
        if (xm[i]) begin
          for (int o = 0; o < m; o++) if (tap[i][o]) dx[o][nx] = 1'b1;
          nx++;
        end else if (val[i]) begin
          d0 ^= tap[i];
        end
      end
      fb = s0[m-1];
      for (int r = 0; r < m; r++) begin
        if (r == 0) begin
          ns[r]   = d0[0] ^ fb;
          ndep[r] = dx[0] ^ dep[m-1];
        end else begin
          ns[r]   = d0[r] ^ s0[r-1] ^ (fb & poly[r]);
          ndep[r] = dx[r] ^ dep[r-1] ^ (poly[r] ? dep[m-1] : vec_t'(0));
        end
      end
      s0 = ns & mmask;
      for (int r = 0; r < m; r++) dep[r] = ndep[r];
    endfunction

    // Gauss-Jordan elimination: returns a basis of X-free masks.
    function void xfree_masks(ref vec_t masks [$]);
      vec_t a  [64];
      vec_t id [64];
      vec_t t;
      int rank = 0;
      masks.delete();
      for (int r = 0; r < m; r++) begin
        a[r]  = dep[r];
        id[r] = vec_t'(1) << r;
      end
      for (int c = 0; c < nx && rank < m; c++) begin
        int p = -1;
        for (int r = rank; r < m; r++) if (a[r][c] && p < 0) p = r;
        if (p < 0) continue;
        t = a[p];  a[p]  = a[rank];  a[rank]  = t;
        t = id[p]; id[p] = id[rank]; id[rank] = t;
        for (int r = 0; r < m; r++) begin
          if (r != rank && a[r][c]) begin
            a[r]  ^= a[rank];
            id[r] ^= id[rank];
          end
        end
        rank++;
      end
      for (int r = rank; r < m; r++) masks.push_back(id[r]);
    endfunction

    function bit expected(vec_t mask);
      return ^(s0 & mask & mmask);
    endfunction

    // True when signature bit r carries no X.
    function bit known_bit(int r);
      return dep[r] == '0;
    endfunction
  endclass

endpackage
