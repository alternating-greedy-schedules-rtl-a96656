// simd_mul: the SIMD multiplier lanes that feed the accumulation unit.
//
// Multiplies two LANES-element vectors pairwise in one cycle, producing LANES
// signed partial products w[i]*x[i]. Weights are signed (zero weight offset) and
// activations are signed after their quantisation offset has moved them into
// [-2^(A_W-1), 2^(A_W-1)-1], so each product needs W_W+A_W bits.
// Purely combinational; the surrounding unit registers its result.
// The lane count (8) and operand widths (5-bit weights, 7-bit activations) follow
// the evaluated configuration; using full-width signed products is this design's choice.
module simd_mul #(
  parameter int unsigned LANES = ags_pkg::LANES,
  parameter int unsigned W_W   = ags_pkg::W_W,
  parameter int unsigned A_W   = ags_pkg::A_W,
  localparam int unsigned PP_W = W_W + A_W
) (
  input  logic signed [W_W-1:0]  w  [LANES],
  input  logic signed [A_W-1:0]  x  [LANES],
  output logic signed [PP_W-1:0] pp [LANES]
);
  always_comb begin
    for (int i = 0; i < int'(LANES); i++) begin
      pp[i] = PP_W'(w[i]) * PP_W'(x[i]);
    end
  end
endmodule
