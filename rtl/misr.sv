// misr -- M-bit multiple-input signature register.
//
// An internal-feedback (Galois) LFSR with a primitive characteristic
// polynomial POLY, with one data input per stage. Each enabled cycle the
// register shifts up by one position, the bit leaving the top stage is fed
// back into every stage whose POLY coefficient is 1, and the M-bit input word
// is XORed in:
//   next[0] = d[0] ^ s[M-1]
//   next[i] = d[i] ^ s[i-1] ^ (s[M-1] & POLY[i])     for 0 < i < M
// A synchronous clear empties the register at the same edge; if en is also
// high, the word d of that cycle is compacted into the emptied register, so a
// signature can be taken and a new one started without losing a scan slice.
// Without en the register holds (scan shifting halted).
//
// The design calls for an m-bit MISR with a primitive polynomial; the Galois
// form, the polynomial table and the clear/enable behaviour are this design's
// choices. Timing: sig shows the state after the last rising clock edge.
module misr #(
  parameter int unsigned M = 32,
  parameter logic [M-1:0] POLY = M'(xc_pkg::primitive_poly(M))
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low: signature = 0
  input  logic         clear,   // synchronous restart of the signature
  input  logic         en,      // compact d this cycle
  input  logic [M-1:0] d,
  output logic [M-1:0] sig
);

  logic [M-1:0] base, stepped;

  always_comb begin
    base = clear ? '0 : sig;
    stepped = {base[M-2:0], 1'b0} ^ (base[M-1] ? POLY : '0) ^ d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sig <= '0;
    else if (en) sig <= stepped;
    else if (clear) sig <= '0;
  end

endmodule
