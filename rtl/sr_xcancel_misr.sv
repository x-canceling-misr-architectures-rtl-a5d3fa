// sr_xcancel_misr -- shadow-register X-canceling MISR compactor.
//
// Scan shifting never stops. Each shift cycle (scan_shift) the slice of the N
// scan chains passes through the phase shifter into the M-bit main MISR.
// When the tester raises the transfer control channel, the MISR signature is
// copied into the shadow register at that edge and the MISR is cleared at the
// same edge, with the slice of that cycle compacted into the emptied MISR, so
// no slice is lost. While the next signature builds up, K selective XOR
// gates, each fed by its own M dedicated mask channels, extract K
// X-canceled combinations per cycle from the shadow register: xc_out[k] is
// the XOR of the shadow bits selected by mask_in[k] in the previous cycle.
// Over a signature transfer period of s cycles this checks K*s combinations.
//
// Follows the design: MISR, shadow register, K selective XORs with M*K mask
// channels, one transfer channel, K output channels. This design's choices:
// the registered outputs (one cycle latency) and clearing the MISR on the
// transfer edge itself.
module sr_xcancel_misr #(
  parameter int unsigned N = 1050,  // scan chains
  parameter int unsigned M = 12,    // MISR / shadow register width
  parameter int unsigned F = 5,     // phase-shifter fan-out per chain
  parameter int unsigned K = 4,     // selective XOR gates = checks per cycle
  parameter logic [M-1:0] POLY = M'(xc_pkg::primitive_poly(M))
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      scan_out,    // current slice of the scan chains
  input  logic              scan_shift,  // slice is valid
  input  logic              transfer,    // control channel: MISR -> shadow
  input  logic [K-1:0][M-1:0] mask_in,   // M*K dedicated mask channels
  output logic [K-1:0]      xc_out,      // K output channels
  output logic [M-1:0]      signature,   // main MISR (observation only)
  output logic [M-1:0]      shadow       // shadow register (observation only)
);

  logic [M-1:0] ps_word;
  logic [K-1:0] comb_bits;

  phase_shifter #(.N(N), .M(M), .F(F)) u_ps (
    .chain_in(scan_out),
    .misr_in (ps_word)
  );

  misr #(.M(M), .POLY(POLY)) u_misr (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(transfer),
    .en   (scan_shift),
    .d    (ps_word),
    .sig  (signature)
  );

  shadow_register #(.M(M)) u_shadow (
    .clk  (clk),
    .rst_n(rst_n),
    .load (transfer),
    .d    (signature),
    .q    (shadow)
  );

  for (genvar k = 0; k < K; k++) begin : g_sx
    selective_xor #(.M(M)) u_sx (
      .sig   (shadow),
      .mask  (mask_in[k]),
      .parity(comb_bits[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) xc_out <= '0;
    else        xc_out <= comb_bits;
  end

endmodule
