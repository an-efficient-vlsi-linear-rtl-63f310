// csa_array: the CSA array (CA) of eight adder lanes, each with an output
// latch.
//
// Lane i computes s[i] <= b[i] + a[i], or b[i] - a[i] when sub[i] is set,
// and holds the result until its next enabled clock edge. With b[i] fed back
// from s[i] a lane accumulates; the operand choice is made outside. The
// latches are edge-triggered registers here, and the subtract option (an
// inverted operand with carry-in 1) is this design's own choice; it is used
// by the IDCT, whose output x = R^-1 * z needs +/- terms.
// Latency: one clock. Wraps modulo 2**W.
module csa_array #(
  parameter int unsigned W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        en,
  input  logic [7:0]        sub,
  input  logic [7:0][W-1:0] a,
  input  logic [7:0][W-1:0] b,
  output logic [7:0][W-1:0] s
);
  for (genvar i = 0; i < 8; i++) begin : g_lane
    always_ff @(posedge clk) begin
      if (!rst_n)     s[i] <= '0;
      else if (en[i]) s[i] <= b[i] + (sub[i] ? ~a[i] : a[i]) + W'(sub[i]);
    end
  end
endmodule
