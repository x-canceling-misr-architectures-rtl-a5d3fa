// xc_pkg -- constants and elaboration-time helpers shared by the X-canceling
// MISR compactors.
//
// MAX_M bounds the MISR width (64 bits) so that feedback polynomials and
// phase-shifter fan-out masks can travel as 64-bit constants.
//
// primitive_poly(m) returns a primitive feedback polynomial of degree m. Bit i
// of the result is the coefficient of x^i for i < m; x^m is implicit. The
// design only requires "a primitive polynomial"; which one is this design's
// choice, taken from the well-known table of maximal-length LFSR taps
// (x^32 + x^22 + x^2 + x + 1 for the 32-bit MISR, for example).
//
// ps_mask(m, f, chain) returns the set of MISR inputs that scan chain `chain`
// feeds through the phase shifter: f distinct positions out of m, drawn with
// an integer hash of (chain, draw number), skipping positions already taken.
// The fan-out f follows the design; the tap pattern is this design's own
// choice, since only the fan-out count is specified. Pseudo-random subsets
// matter: a regular pattern (an arithmetic progression, say) maps onto the
// pattern of another chain after one MISR shift, so an error on one chain
// could be hidden by an X on another one slice later, which is exactly the
// shift correlation the phase shifter exists to remove.
package xc_pkg;

  localparam int unsigned MAX_M = 64;

  typedef logic [MAX_M-1:0] wide_mask_t;

  function automatic wide_mask_t primitive_poly(input int unsigned m);
    wide_mask_t p;
    p = '0;
    p[0] = 1'b1;
    case (m)
      2:  p[1] = 1'b1;
      3:  p[2] = 1'b1;
      4:  p[3] = 1'b1;
      5:  p[3] = 1'b1;
      6:  p[5] = 1'b1;
      7:  p[6] = 1'b1;
      8:  begin p[6] = 1'b1; p[5] = 1'b1; p[4] = 1'b1; end
      9:  p[5] = 1'b1;
      10: p[7] = 1'b1;
      11: p[9] = 1'b1;
      12: begin p[6] = 1'b1; p[4] = 1'b1; p[1] = 1'b1; end
      13: begin p[4] = 1'b1; p[3] = 1'b1; p[1] = 1'b1; end
      14: begin p[5] = 1'b1; p[3] = 1'b1; p[1] = 1'b1; end
      15: p[14] = 1'b1;
      16: begin p[15] = 1'b1; p[13] = 1'b1; p[4] = 1'b1; end
      17: p[14] = 1'b1;
      18: p[11] = 1'b1;
      19: begin p[6] = 1'b1; p[2] = 1'b1; p[1] = 1'b1; end
      20: p[17] = 1'b1;
      21: p[19] = 1'b1;
      22: p[21] = 1'b1;
      23: p[18] = 1'b1;
      24: begin p[23] = 1'b1; p[22] = 1'b1; p[17] = 1'b1; end
      25: p[22] = 1'b1;
      26: begin p[6] = 1'b1; p[2] = 1'b1; p[1] = 1'b1; end
      27: begin p[5] = 1'b1; p[2] = 1'b1; p[1] = 1'b1; end
      28: p[25] = 1'b1;
      29: p[27] = 1'b1;
      30: begin p[6] = 1'b1; p[4] = 1'b1; p[1] = 1'b1; end
      31: p[28] = 1'b1;
      32: begin p[22] = 1'b1; p[2] = 1'b1; p[1] = 1'b1; end
      48: begin p[47] = 1'b1; p[21] = 1'b1; p[20] = 1'b1; end
      64: begin p[63] = 1'b1; p[61] = 1'b1; p[60] = 1'b1; end
      default: p[m-1] = 1'b1;  // not in the table: pass POLY explicitly
    endcase
    return p;
  endfunction

  // 32-bit integer mixer used to draw phase-shifter taps.
  function automatic int unsigned mix32(input int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7FEB_352D;
    h = h ^ (h >> 15);
    h = h * 32'h846C_A68B;
    h = h ^ (h >> 16);
    return h;
  endfunction

  function automatic wide_mask_t ps_mask(input int unsigned m, input int unsigned f,
                                         input int unsigned chain);
    wide_mask_t mk;
    int unsigned draw, idx, taken;
    mk = '0;
    draw = 0;
    taken = 0;
    while (taken < f && taken < m) begin
      idx = mix32(chain * 32'h9E37_79B9 + draw) % m;
      draw = draw + 1;
      if ((mk & (wide_mask_t'(1) << idx)) == '0) begin
        mk = mk | (wide_mask_t'(1) << idx);
        taken = taken + 1;
      end
    end
    return mk;
  endfunction

endpackage
