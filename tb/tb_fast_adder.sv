// tb_fast_adder: checks the fast adder against a direct signed sum.
// Random words and random sign masks, all eight rows of R, and the extreme
// cases of no and all inputs subtracted; the sum is compared modulo 2**W.
module tb_fast_adder;
  import sbdct_pkg::*;
  localparam int W = 32;
  logic [7:0][W-1:0] x;
  logic [7:0]        neg;
  logic [W-1:0]      sum;
  int checks = 0, failures = 0;

  fast_adder #(.W(W)) dut (.x, .neg, .sum);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint ref_sum;
      for (int j = 0; j < 8; j++) x[j] = $urandom;
      if (i < 8) begin
        for (int j = 0; j < 8; j++) neg[j] = r_neg(3'(i), 3'(j));
      end else if (i == 8) neg = 8'h00;
      else if (i == 9) neg = 8'hFF;
      else neg = 8'($urandom);
      #1;
      ref_sum = 0;
      for (int j = 0; j < 8; j++)
        ref_sum += neg[j] ? -longint'($signed(x[j])) : longint'($signed(x[j]));
      checks++;
      if (sum !== W'(ref_sum)) begin
        failures++;
        $display("FAIL: neg %b sum %h expected %h", neg, sum, W'(ref_sum));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
