// phase_shifter -- XOR network that spreads N scan-chain outputs over the M
// inputs of the MISR.
//
// Every scan chain fans out to F XOR gates, i.e. it feeds F distinct MISR
// inputs, and every MISR input is the XOR of all chains that tap it. This
// breaks the shift correlation between neighbouring chains and compacts the
// N-bit slice into an M-bit word when N > M. The network is purely
// combinational and costs about N*F two-input XOR gates. The fan-out count F
// follows the design; which inputs a chain taps is given by xc_pkg::ps_mask
// (this design's own pseudo-random pattern).
//
// Interface: chain_in[i] is the bit leaving scan chain i in the current shift
// cycle; misr_in is the word presented to the MISR in the same cycle.
module phase_shifter #(
  parameter int unsigned N = 1050,  // scan chains
  parameter int unsigned M = 32,    // MISR width, at most xc_pkg::MAX_M
  parameter int unsigned F = 7      // fan-out of each chain, at most M
) (
  input  logic [N-1:0] chain_in,
  output logic [M-1:0] misr_in
);

  logic [M-1:0] term [N];

  for (genvar i = 0; i < N; i++) begin : g_chain
    localparam xc_pkg::wide_mask_t TAPS = xc_pkg::ps_mask(M, F, i);
    assign term[i] = chain_in[i] ? TAPS[M-1:0] : '0;
  end

  always_comb begin
    misr_in = '0;
    for (int i = 0; i < N; i++) misr_in ^= term[i];
  end

  initial begin
    assert (M <= xc_pkg::MAX_M && F >= 1 && F <= M)
      else $error("phase_shifter: need 1 <= F <= M <= %0d", xc_pkg::MAX_M);
  end

endmodule
