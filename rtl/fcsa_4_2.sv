// fcsa_4_2: the full CSA(4,2) that forms z = Fh^-1 * C in the IDCT.
//
// Four signed products are summed by a CSA(3,2) on k0, k1, k2, a second
// CSA(3,2) that adds k3, and one carry-propagate adder:
//   sum = k0 + k1 + k2 + k3.
// The IDCT also needs, in one step, the two separate sums of the 2x2
// rotation, z[2] = k0 + k1 and z[3] = k2 + k3. With pair = 1 the first
// CSA(3,2) gets k2 = 0 and the second gets k3 = 0, so sum = k0 + k1, and a
// second adder gives sum_hi = k2 + k3. That second adder is this design's
// own addition; sum_hi is zero when pair = 0. Wraps modulo 2**W.
// Purely combinational.
module fcsa_4_2 #(
  parameter int unsigned W = 32
) (
  input  logic [3:0][W-1:0] k,
  input  logic              pair,
  output logic [W-1:0]      sum,
  output logic [W-1:0]      sum_hi
);
  logic [W-1:0] k2g, k3g, s1, c1, s2, c2;

  always_comb begin
    k2g = pair ? '0 : k[2];
    k3g = pair ? '0 : k[3];
  end

  csa_3_2 #(.W(W)) u_c1 (.a(k[0]), .b(k[1]), .c(k2g), .sum(s1), .carry(c1));
  csa_3_2 #(.W(W)) u_c2 (.a(k3g),  .b(s1),   .c(c1),  .sum(s2), .carry(c2));

  always_comb begin
    sum    = s2 + c2;
    sum_hi = pair ? k[2] + k[3] : '0;
  end
endmodule
