// csa_3_2: carry-save adder CSA(3,2), the basic cell of the fast adder and of
// the full CSA(4,2).
//
// Three W-bit operands are reduced to two W-bit vectors with one full adder
// per bit and no carry propagation: sum = a ^ b ^ c and carry = majority of
// a, b, c moved up one bit. So a + b + c == sum + carry modulo 2**W, which
// makes the cell valid for two's-complement operands. Purely combinational.
module csa_3_2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[W-2:0], 1'b0};
  end
endmodule
