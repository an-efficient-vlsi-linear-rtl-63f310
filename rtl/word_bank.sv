// word_bank: an 8-word register bank; two of them make up the processor's
// 16 words of intermediate storage.
//
// All eight words can be loaded at once (load, from d_all), or up to two
// words written individually (we0/addr0/d0 and we1/addr1/d1; port 1 wins if
// both address the same word). Every word is readable at all times on q.
// A write takes effect at the clock edge. Reset clears the bank.
module word_bank #(
  parameter int unsigned W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [7:0][W-1:0] d_all,
  input  logic              we0,
  input  logic [2:0]        addr0,
  input  logic [W-1:0]      d0,
  input  logic              we1,
  input  logic [2:0]        addr1,
  input  logic [W-1:0]      d1,
  output logic [7:0][W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= '0;
    end else if (load) begin
      q <= d_all;
    end else begin
      if (we0) q[addr0] <= d0;
      if (we1) q[addr1] <= d1;
    end
  end
endmodule
