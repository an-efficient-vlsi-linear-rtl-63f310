// multiplier_array: the multiplier array (MA) of four multipliers.
//
// Multiplier i forms y[i] * z[i] (fixed point, see multiplier.sv); the four
// products are captured in the product registers k[i] on a clock edge with
// en high, so a product formed in one step is used by the adders in the
// next step. The product registers are this design's pipeline boundary
// between the multiplication and the addition steps. Latency: one clock.
module multiplier_array #(
  parameter int unsigned W    = 32,
  parameter int unsigned CW   = 32,
  parameter int unsigned FRAC = 30
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic [3:0][W-1:0]   y,
  input  logic [3:0][CW-1:0]  z,
  output logic [3:0][W-1:0]   k
);
  logic [3:0][W-1:0] p;

  for (genvar i = 0; i < 4; i++) begin : g_mul
    multiplier #(.W(W), .CW(CW), .FRAC(FRAC)) u_mul (.y(y[i]), .z(z[i]), .k(p[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  k <= '0;
    else if (en) k <= p;
  end
endmodule
