// tb_multiplier_array: checks the four multipliers and their product
// registers. Products are compared with round(y * z / 2**30) computed in
// floating point (operands limited so the product is exact in a double);
// with en low the registers must hold their value, and each result appears
// one clock after the operands.
module tb_multiplier_array;
  localparam int W = 32, CW = 32, FRAC = 30;
  logic clk = 1'b0, rst_n, en;
  logic [3:0][W-1:0]  y, k;
  logic [3:0][CW-1:0] z;
  logic [3:0][W-1:0]  hold;
  int checks = 0, failures = 0;

  multiplier_array #(.W(W), .CW(CW), .FRAC(FRAC)) dut (.clk, .rst_n, .en, .y, .z, .k);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd_round(longint a, longint b);
    real r;
    r = (real'(a) * real'(b)) / (2.0 ** FRAC);
    return longint'($floor(r + 0.5));
  endfunction

  initial begin
    rst_n = 1'b0; en = 1'b0; y = '0; z = '0;
    @(posedge clk); @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (k !== '0) failures++;
    for (int t = 0; t < 1000; t++) begin
      longint ev [4];
      for (int i = 0; i < 4; i++) begin
        y[i] = W'(int'($urandom_range(0, 2 * 1048575)) - 1048575);
        z[i] = $urandom;
        ev[i] = rnd_round(longint'($signed(y[i])), longint'($signed(z[i])));
      end
      en = (t % 7 != 3);
      hold = k;
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (en) begin
          if ($signed(k[i]) != W'(ev[i])) begin
            failures++;
            $display("FAIL: %0d * %h -> %0d expected %0d", $signed(y[i]), z[i], $signed(k[i]), ev[i]);
          end
        end else if (k[i] !== hold[i]) begin
          failures++;
          $display("FAIL: product register changed with en low");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
