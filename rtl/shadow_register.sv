// shadow_register -- holding register behind the main MISR in the
// shadow-register X-canceling scheme.
//
// When load is high at a rising clock edge it captures the MISR signature;
// otherwise it holds it, so the selective XOR gates can keep extracting
// X-canceled combinations from the saved signature while the main MISR is
// already compacting the next one. Asynchronous active-low reset to zero is
// this design's choice.
module shadow_register #(
  parameter int unsigned M = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] d,
  output logic [M-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (load) q <= d;
  end

endmodule
