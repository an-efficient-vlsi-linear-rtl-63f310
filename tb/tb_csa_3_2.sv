// tb_csa_3_2: checks the CSA(3,2) cell on random and corner operands:
// sum must be the bitwise XOR of the operands and sum + carry must equal
// a + b + c modulo 2**W (two's-complement wrap).
module tb_csa_3_2;
  localparam int W = 32;
  logic [W-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa_3_2 #(.W(W)) dut (.a, .b, .c, .sum(s), .carry(cy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom; c = $urandom;
      if (i == 0) begin a = '1; b = '1; c = '1; end
      if (i == 1) begin a = 32'h8000_0000; b = 32'h8000_0000; c = 32'h7fff_ffff; end
      #1;
      checks++;
      if (W'(s + cy) !== W'(a + b + c)) begin
        failures++;
        $display("FAIL: %h+%h+%h: sum %h carry %h", a, b, c, s, cy);
      end
      checks++;
      if (s !== (a ^ b ^ c)) failures++;
      checks++;
      if (cy[0] !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
