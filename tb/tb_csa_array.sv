// tb_csa_array: drives the eight CSA-array lanes with random enables,
// add/subtract flags and operands (including accumulation with b fed back
// from s) and compares every lane, every clock, with a reference model.
module tb_csa_array;
  localparam int W = 32;
  logic clk = 1'b0, rst_n;
  logic [7:0] en, sub;
  logic [7:0][W-1:0] a, b, s, m;
  int checks = 0, failures = 0;

  csa_array #(.W(W)) dut (.clk, .rst_n, .en, .sub, .a, .b, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = '0; sub = '0; a = '0; b = '0;
    @(posedge clk); @(negedge clk);
    rst_n = 1'b1;
    m = '0;
    for (int t = 0; t < 3000; t++) begin
      en  = 8'($urandom);
      sub = 8'($urandom);
      for (int l = 0; l < 8; l++) begin
        a[l] = $urandom;
        b[l] = (t % 2 == 0) ? s[l] : W'($urandom);
      end
      for (int l = 0; l < 8; l++)
        if (en[l]) m[l] = sub[l] ? W'(b[l] - a[l]) : W'(b[l] + a[l]);
      @(negedge clk);
      for (int l = 0; l < 8; l++) begin
        checks++;
        if (s[l] !== m[l]) begin
          failures++;
          $display("FAIL: lane %0d = %h expected %h", l, s[l], m[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
