// tb_word_bank: random parallel loads and single-word writes on both ports
// of the 8-word bank, compared with a reference array after every clock.
module tb_word_bank;
  localparam int W = 32;
  logic clk = 1'b0, rst_n;
  logic load, we0, we1;
  logic [2:0] addr0, addr1;
  logic [W-1:0] d0, d1;
  logic [7:0][W-1:0] d_all, q, m;
  int checks = 0, failures = 0;

  word_bank #(.W(W)) dut (.clk, .rst_n, .load, .d_all, .we0, .addr0, .d0, .we1, .addr1, .d1, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 0; we0 = 0; we1 = 0; addr0 = 0; addr1 = 0; d0 = 0; d1 = 0; d_all = '0;
    @(posedge clk); @(negedge clk);
    rst_n = 1'b1;
    m = '0;
    checks++;
    if (q !== m) failures++;
    for (int t = 0; t < 3000; t++) begin
      load = ($urandom_range(0, 9) == 0);
      we0 = 1'($urandom); we1 = 1'($urandom);
      addr0 = 3'($urandom); addr1 = 3'($urandom);
      d0 = $urandom; d1 = $urandom;
      for (int i = 0; i < 8; i++) d_all[i] = $urandom;
      if (load) m = d_all;
      else begin
        if (we0) m[addr0] = d0;
        if (we1) m[addr1] = d1;
      end
      @(negedge clk);
      checks++;
      if (q !== m) begin
        failures++;
        $display("FAIL: bank mismatch at step %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
