// selective_xor -- selective XOR network of an X-canceling MISR.
//
// Produces one X-canceled signature bit: the XOR of the signature bits whose
// mask bit is 1. When the mask is a linearly dependent combination of MISR
// bits found by Gauss-Jordan elimination, all unknown (X) contributions cancel
// and the result is deterministic. Purely combinational: an AND gate per bit
// followed by an (M-1)-gate XOR tree, as costed in the design.
module selective_xor #(
  parameter int unsigned M = 32
) (
  input  logic [M-1:0] sig,    // MISR or shadow-register contents
  input  logic [M-1:0] mask,   // which bits to combine, from tester channels
  output logic         parity  // X-canceled combination
);

  assign parity = ^(sig & mask);

endmodule
