// fast_adder: the fast adder (FA) that evaluates one row of y = R * x.
//
// Each of the eight inputs is added or subtracted according to neg[i]
// (R has only +1/-1 entries). The signed terms are reduced by six CSA(3,2)
// cells and one carry-propagate adder in the tree drawn for this unit:
//   t6,t5,t4 -> CSA A;  A's two outputs + t7 -> CSA B
//   t3,t2,t1 -> CSA C;  C's two outputs + t0 -> CSA D
//   D's two outputs + B's sum -> CSA E;  E's two outputs + B's carry -> CSA F
//   F's two outputs -> final adder (the "CSA" cell of the drawing).
// Subtraction is done by inverting a term; the eight "+1" corrections are
// collected into a constant that enters the final adder as its carry-in
// word (popcount of neg). That correction path is this design's own choice.
// Arithmetic wraps modulo 2**W; the caller keeps 3 bits of headroom.
// Purely combinational: one row per clock step.
module fast_adder #(
  parameter int unsigned W = 32
) (
  input  logic [7:0][W-1:0] x,
  input  logic [7:0]        neg,
  output logic [W-1:0]      sum
);
  logic [7:0][W-1:0] t;
  logic [W-1:0] as_, ac, bs, bc, cs, cc, ds, dc, es, ec, fs, fc;
  logic [3:0]   ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < 8; i++) begin
      t[i] = neg[i] ? ~x[i] : x[i];
      ones = ones + {3'b000, neg[i]};
    end
  end

  csa_3_2 #(.W(W)) u_a (.a(t[6]), .b(t[5]), .c(t[4]), .sum(as_), .carry(ac));
  csa_3_2 #(.W(W)) u_b (.a(t[7]), .b(as_),  .c(ac),   .sum(bs),  .carry(bc));
  csa_3_2 #(.W(W)) u_c (.a(t[3]), .b(t[2]), .c(t[1]), .sum(cs),  .carry(cc));
  csa_3_2 #(.W(W)) u_d (.a(t[0]), .b(cs),   .c(cc),   .sum(ds),  .carry(dc));
  csa_3_2 #(.W(W)) u_e (.a(bs),   .b(ds),   .c(dc),   .sum(es),  .carry(ec));
  csa_3_2 #(.W(W)) u_f (.a(bc),   .b(es),   .c(ec),   .sum(fs),  .carry(fc));

  assign sum = fs + fc + W'(ones);
endmodule
