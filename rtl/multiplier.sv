// multiplier: one fixed-point multiplier of the multiplier array.
//
// k = round(y * z / 2**FRAC), with y a signed W-bit data word and z a signed
// CW-bit constant with FRAC fraction bits. Rounding is to nearest, ties
// towards +infinity (add 2**(FRAC-1), then shift arithmetically); the result
// is truncated to W bits. The rounding rule is this design's own choice.
// Purely combinational.
module multiplier #(
  parameter int unsigned W    = 32,
  parameter int unsigned CW   = 32,
  parameter int unsigned FRAC = 30
) (
  input  logic signed [W-1:0]  y,
  input  logic signed [CW-1:0] z,
  output logic signed [W-1:0]  k
);
  localparam int unsigned PW = W + CW;
  logic signed [PW-1:0] p;
  logic signed [PW-1:0] r;

  always_comb begin
    p = PW'(y) * PW'(z);
    r = (p + (PW'(1) <<< (FRAC - 1))) >>> FRAC;
    k = r[W-1:0];
  end
endmodule
