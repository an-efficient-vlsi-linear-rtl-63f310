// tb_dct2d_8x8: the 8x8 two-dimensional DCT of JPEG and MPEG-1/2 image
// blocks, computed row-column with the 8-point processor at its default
// sizes. The testbench holds the 64-word transpose buffer itself: it sends
// the eight rows of a block, transposes the results, sends the eight
// columns, and compares with a floating-point 2-D DCT (times 8, the square
// of the processor's 2*sqrt(2) scaling). It then runs the 2-D IDCT the same
// way on the hardware coefficients and checks that 64 * x comes back. Image
// samples are random level-shifted 8-bit pixels (-128..127); every fourth
// block is a smooth ramp. The tolerance of 20 LSB covers the rounding of the
// row pass (up to 2 LSB per word) amplified by the column pass (gain up to
// 8). The eight passes of each half are streamed back to back, so a 2-D DCT
// takes about 16 * 10 clocks and a 2-D IDCT 16 * 8, which is checked.
module tb_dct2d_8x8;
  localparam int W = 32;
  localparam int NBLOCKS = 40;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n;
  logic in_valid, in_ready, in_mode, out_valid, out_mode;
  logic [7:0][W-1:0] din, dout;
  int checks = 0, failures = 0;
  longint cycle = 0;

  subband_dct_idct dut (.clk, .rst_n, .in_valid, .in_ready, .in_mode, .din, .out_valid, .out_mode, .dout);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NBLOCKS * 2 * 16 * 12 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Results are collected in order as they come out.
  logic [7:0][W-1:0] res [$];
  always @(posedge clk) if (rst_n && out_valid) res.push_back(dout);

  function automatic real alpha(int k);
    return (k == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0);
  endfunction

  // Runs eight 1-D transforms of the given mode on the rows of m, streamed
  // back to back, and returns the eight result rows.
  task automatic pass8(input logic mode, input logic [7:0][W-1:0] m [8], output logic [7:0][W-1:0] r [8],
                       output longint clocks);
    longint t0;
    res.delete();
    t0 = cycle;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      in_valid = 1'b1; in_mode = mode; din = m[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    wait (res.size() == 8);
    clocks = cycle - t0;
    for (int i = 0; i < 8; i++) r[i] = res[i];
  endtask

  function automatic void transpose(input logic [7:0][W-1:0] a [8], output logic [7:0][W-1:0] t [8]);
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) t[j][i] = a[i][j];
  endfunction

  initial begin
    logic [7:0][W-1:0] x [8], rows [8], tr [8], coef [8], back [8];
    real ref2 [8][8];
    longint c1, c2;
    in_valid = 1'b0; in_mode = 1'b0; din = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    for (int blk = 0; blk < NBLOCKS; blk++) begin
      // image block
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          x[i][j] = (blk % 4 == 3) ? W'(8 * i + 4 * j - 100) : W'(int'($urandom_range(0, 255)) - 128);

      // 2-D DCT: rows, transpose, columns. Result is coef[v][u] = X[u][v].
      pass8(1'b0, x, rows, c1);
      transpose(rows, tr);
      pass8(1'b0, tr, coef, c2);
      checks++;
      if (c1 > 90 || c2 > 90) begin
        failures++;
        $display("FAIL: 8 DCT passes took %0d / %0d clocks", c1, c2);
      end

      // floating-point reference X[u][v] = sum x[i][j] cos.. cos..
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real acc;
          acc = 0.0;
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++)
              acc += real'($signed(x[i][j])) * $cos((2.0 * i + 1.0) * u * PI / 16.0)
                                             * $cos((2.0 * j + 1.0) * v * PI / 16.0);
          ref2[u][v] = 8.0 * alpha(u) * alpha(v) * acc;
        end
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real g;
          g = real'($signed(coef[v][u]));
          checks++;
          if (g - ref2[u][v] > 20.0 || ref2[u][v] - g > 20.0) begin
            failures++;
            $display("FAIL: block %0d X[%0d][%0d] = %0d expected %f", blk, u, v, $signed(coef[v][u]), ref2[u][v]);
          end
        end

      // 2-D IDCT of the hardware coefficients: columns, then rows.
      pass8(1'b1, coef, tr, c1);
      transpose(tr, rows);
      pass8(1'b1, rows, back, c2);
      checks++;
      if (c1 > 74 || c2 > 74) begin
        failures++;
        $display("FAIL: 8 IDCT passes took %0d / %0d clocks", c1, c2);
      end
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          longint d;
          d = longint'($signed(back[i][j])) - 64 * longint'($signed(x[i][j]));
          checks++;
          if (d > 64 || d < -64) begin
            failures++;
            $display("FAIL: block %0d x[%0d][%0d]: %0d vs 64*%0d", blk, i, j, $signed(back[i][j]), $signed(x[i][j]));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
