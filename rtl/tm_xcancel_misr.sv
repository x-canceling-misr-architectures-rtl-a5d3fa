// tm_xcancel_misr -- time-multiplexing X-canceling MISR compactor.
//
// The tester input channels are shared, over time, between two phases,
// chosen by one extra control channel (stop):
//
//  * test-vector application phase (stop = 0): the channels drive the scan
//    vector decompressor (decomp_ch) and, on each shift cycle (scan_shift),
//    the slice leaving the N scan chains goes through the phase shifter into
//    the M-bit MISR. This continues over as many shift cycles and vectors as
//    the MISR can absorb X values (at most M-q for q checked combinations).
//
//  * signature processing phase (stop = 1): scan_hold tells the scan and
//    decompressor clocking to pause, the MISR holds its signature, and the
//    channels carry selection masks instead. Each mask takes BEATS cycles,
//    BEATS = ceil(M/CH); the beat of cycle b supplies mask bits
//    [b*CH +: CH]. After the last beat of a mask, xc_out carries the XOR of
//    the selected signature bits (one X-canceled combination) and xc_valid
//    pulses for one cycle. q masks thus cost q*BEATS cycles.
//
// When stop returns to 0 the MISR is cleared at that same edge and the slice
// of that cycle, if any, is compacted into the empty register, so a new
// signature starts without losing data. A partly loaded mask is discarded
// when stop drops.
//
// Follows the design: phase shifter + MISR + selective XOR, one control
// channel to stop/resume, one output channel, MISR reset after processing.
// This design's choices: the multi-beat mask loading when there are fewer
// channels than MISR bits, the registered output (one cycle after the last
// beat), and the port-level handshake. decomp_ch and scan_hold are plain
// wires (tester_in and stop): they are ports so that the channel sharing is
// visible at the compactor's boundary, and carry no logic of their own.
module tm_xcancel_misr #(
  parameter int unsigned N  = 1050,  // scan chains
  parameter int unsigned M  = 32,    // MISR width
  parameter int unsigned F  = 7,     // phase-shifter fan-out per chain
  parameter int unsigned CH = 133,   // decompressor (shared) tester channels
  parameter logic [M-1:0] POLY = M'(xc_pkg::primitive_poly(M))
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  scan_out,    // current slice of the scan chains
  input  logic          scan_shift,  // slice is valid (scan shift cycle)
  input  logic [CH-1:0] tester_in,   // shared tester input channels
  input  logic          stop,        // control channel: 1 = process signature
  output logic [CH-1:0] decomp_ch,   // channels towards the decompressor
  output logic          scan_hold,   // pause scan shifting / decompressor
  output logic          xc_out,      // output channel: X-canceled bit
  output logic          xc_valid,    // xc_out holds a new combination
  output logic [M-1:0]  signature    // MISR contents (observation only)
);

  localparam int unsigned BEATS = (M + CH - 1) / CH;
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [M-1:0]        ps_word;
  logic                stop_q;
  logic                restart;
  logic [BW-1:0]       beat;
  logic [BEATS*CH-1:0] mask_buf, mask_full;
  logic                last_beat;
  logic                comb_bit;

  phase_shifter #(.N(N), .M(M), .F(F)) u_ps (
    .chain_in(scan_out),
    .misr_in (ps_word)
  );

  // The MISR restarts on the first application-phase cycle after processing.
  assign restart = stop_q && !stop;

  misr #(.M(M), .POLY(POLY)) u_misr (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(restart),
    .en   (scan_shift && !stop),
    .d    (ps_word),
    .sig  (signature)
  );

  always_comb begin
    mask_full = mask_buf;
    mask_full[beat*CH +: CH] = tester_in;
  end

  assign last_beat = (beat == BW'(BEATS - 1));

  selective_xor #(.M(M)) u_sx (
    .sig   (signature),
    .mask  (mask_full[M-1:0]),
    .parity(comb_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stop_q   <= 1'b0;
      beat     <= '0;
      mask_buf <= '0;
      xc_out   <= 1'b0;
      xc_valid <= 1'b0;
    end else begin
      stop_q   <= stop;
      xc_valid <= 1'b0;
      if (!stop) begin
        beat     <= '0;
        mask_buf <= '0;
      end else if (last_beat) begin
        beat     <= '0;
        mask_buf <= '0;
        xc_out   <= comb_bit;
        xc_valid <= 1'b1;
      end else begin
        beat     <= beat + 1'b1;
        mask_buf <= mask_full;
      end
    end
  end

  assign decomp_ch = tester_in;
  assign scan_hold = stop;

endmodule
