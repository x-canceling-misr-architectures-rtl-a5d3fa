// xcancel_top -- the two X-canceling MISR compactors side by side.
//
// The time-multiplexing compactor (tm_*) is sized for a 1050-chain block with
// a 32-bit MISR, fan-out 7 and 133 decompressor channels: 134 tester inputs
// (133 + stop) and a single tester output. The shadow-register compactor
// (sr_*) is sized for the same 1050 chains with a 12-bit MISR, fan-out 5 and
// 4 checks per cycle: 4*12 mask channels + 1 transfer channel and 4 outputs.
// The two are independent; each has its own clock domain inputs and ports.
// The scan vector decompressor and the circuit under test sit outside: the
// decompressor channels and the scan-chain outputs are ports.
module xcancel_top #(
  parameter int unsigned TM_N  = 1050,
  parameter int unsigned TM_M  = 32,
  parameter int unsigned TM_F  = 7,
  parameter int unsigned TM_CH = 133,
  parameter int unsigned SR_N  = 1050,
  parameter int unsigned SR_M  = 12,
  parameter int unsigned SR_F  = 5,
  parameter int unsigned SR_K  = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // time-multiplexing compactor
  input  logic [TM_N-1:0]             tm_scan_out,
  input  logic                        tm_scan_shift,
  input  logic [TM_CH-1:0]            tm_tester_in,
  input  logic                        tm_stop,
  output logic [TM_CH-1:0]            tm_decomp_ch,
  output logic                        tm_scan_hold,
  output logic                        tm_xc_out,
  output logic                        tm_xc_valid,
  output logic [TM_M-1:0]             tm_signature,
  // shadow-register compactor
  input  logic [SR_N-1:0]             sr_scan_out,
  input  logic                        sr_scan_shift,
  input  logic                        sr_transfer,
  input  logic [SR_K-1:0][SR_M-1:0]   sr_mask_in,
  output logic [SR_K-1:0]             sr_xc_out,
  output logic [SR_M-1:0]             sr_signature,
  output logic [SR_M-1:0]             sr_shadow
);

  tm_xcancel_misr #(.N(TM_N), .M(TM_M), .F(TM_F), .CH(TM_CH)) u_tm (
    .clk       (clk),
    .rst_n     (rst_n),
    .scan_out  (tm_scan_out),
    .scan_shift(tm_scan_shift),
    .tester_in (tm_tester_in),
    .stop      (tm_stop),
    .decomp_ch (tm_decomp_ch),
    .scan_hold (tm_scan_hold),
    .xc_out    (tm_xc_out),
    .xc_valid  (tm_xc_valid),
    .signature (tm_signature)
  );

  sr_xcancel_misr #(.N(SR_N), .M(SR_M), .F(SR_F), .K(SR_K)) u_sr (
    .clk       (clk),
    .rst_n     (rst_n),
    .scan_out  (sr_scan_out),
    .scan_shift(sr_scan_shift),
    .transfer  (sr_transfer),
    .mask_in   (sr_mask_in),
    .xc_out    (sr_xc_out),
    .signature (sr_signature),
    .shadow    (sr_shadow)
  );

endmodule
