// tb_fcsa_4_2: checks the full CSA(4,2): with pair = 0 sum = k0+k1+k2+k3;
// with pair = 1 sum = k0+k1 and sum_hi = k2+k3 (modulo 2**W).
module tb_fcsa_4_2;
  localparam int W = 32;
  logic [3:0][W-1:0] k;
  logic pair;
  logic [W-1:0] sum, sum_hi;
  int checks = 0, failures = 0;

  fcsa_4_2 #(.W(W)) dut (.k, .pair, .sum, .sum_hi);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      for (int j = 0; j < 4; j++) k[j] = $urandom;
      pair = i[0];
      #1;
      checks++;
      if (!pair && sum !== W'(k[0] + k[1] + k[2] + k[3])) begin
        failures++;
        $display("FAIL: full sum %h", sum);
      end
      if (pair && (sum !== W'(k[0] + k[1]) || sum_hi !== W'(k[2] + k[3]))) begin
        failures++;
        $display("FAIL: pair sums %h %h", sum, sum_hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
