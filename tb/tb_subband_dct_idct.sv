// tb_subband_dct_idct: end-to-end test of the 8-point DCT/IDCT processor at
// its default sizes (32-bit data, 32-bit constants with 30 fraction bits).
//
// Random DCT and IDCT blocks are offered with random gaps, including blocks
// sent back to back and blocks whose mode differs from the previous one.
// Every result is compared with a floating-point DCT/IDCT computed here
// (orthonormal transform times 2*sqrt(2), the processor's scaling), within a
// tolerance of a few LSBs from the product rounding. Blocks are also chained
// DCT -> IDCT to check that the round trip returns 8*x. The latency from the
// accepting edge to out_valid is checked: 11 clocks for a DCT, 9 for an IDCT,
// and the spacing of back-to-back blocks: 10 (DCT) and 8 (IDCT) clocks.
// Counts how often each mechanism occurred; one that never occurred fails.
module tb_subband_dct_idct;
  localparam int W = 32;
  localparam int NBLK = 400;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_ready, in_mode, out_valid, out_mode;
  logic [7:0][W-1:0] din, dout;

  int checks = 0, failures = 0;
  int n_dct = 0, n_idct = 0, n_switch = 0, n_b2b = 0, n_hold = 0, n_round = 0;
  longint cycle = 0;

  subband_dct_idct dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_mode, .din, .out_valid, .out_mode, .dout
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected results, in issue order.
  typedef struct {
    logic        mode;
    real         exp [8];
    longint      t_acc;
    int          chain;   // 1: this DCT result feeds the next IDCT block
    logic [7:0][W-1:0] x0;  // original input of a chained DCT
  } exp_t;
  exp_t q[$];

  function automatic real alpha(int k);
    return (k == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0);
  endfunction

  function automatic void ref_tf(input logic mode, input logic [7:0][W-1:0] d, output real r [8]);
    for (int o = 0; o < 8; o++) begin
      real acc = 0.0;
      for (int i = 0; i < 8; i++) begin
        real v = real'($signed(d[i]));
        if (mode == 1'b0) acc += alpha(o) * v * $cos((2.0 * i + 1.0) * o * PI / 16.0);
        else              acc += alpha(i) * v * $cos((2.0 * o + 1.0) * i * PI / 16.0);
      end
      r[o] = acc * 2.0 * $sqrt(2.0);
    end
  endfunction

  // Random signed word with |v| < 2**bits.
  function automatic logic [W-1:0] rnd(int bits);
    int v;
    v = int'($urandom_range(0, (1 << (bits + 1)) - 2)) - ((1 << bits) - 1);
    return W'(v);
  endfunction

  logic [7:0][W-1:0] last_dct_out;
  logic [7:0][W-1:0] chain_x;
  bit                chain_pending = 0;

  // Monitor.
  longint last_out_t = -100;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected out_valid at cycle %0d", cycle);
      end else begin
        real tol;
        e = q.pop_front();
        tol = (e.mode == 1'b0) ? 3.0 : 12.0;
        checks++;
        if (out_mode !== e.mode) begin
          failures++;
          $display("FAIL: out_mode %0b expected %0b", out_mode, e.mode);
        end
        checks++;
        if (cycle - e.t_acc != ((e.mode == 1'b0) ? 11 : 9)) begin
          failures++;
          $display("FAIL: latency %0d (mode %0b)", cycle - e.t_acc, e.mode);
        end
        for (int k = 0; k < 8; k++) begin
          real got;
          got = real'($signed(dout[k]));
          checks++;
          if (got - e.exp[k] > tol || e.exp[k] - got > tol) begin
            failures++;
            $display("FAIL: mode %0b out[%0d] = %0d expected %f", e.mode, k, $signed(dout[k]), e.exp[k]);
          end
        end
        if (e.chain == 2) begin
          // IDCT of a DCT result: should be 8 * x within the rounding error.
          for (int k = 0; k < 8; k++) begin
            longint d;
            d = longint'($signed(dout[k])) - 8 * longint'($signed(e.x0[k]));
            checks++;
            if (d > 16 || d < -16) begin
              failures++;
              $display("FAIL: round trip x[%0d]: %0d vs 8*%0d", k, $signed(dout[k]), $signed(e.x0[k]));
            end
          end
          n_round++;
        end
        if (e.chain == 1) begin
          chain_x = e.x0;
          last_dct_out = dout;
          chain_pending = 1;
        end
      end
      last_out_t = cycle;
    end
  end

  // Watchdog.
  initial begin
    repeat (NBLK * 40 + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic mode, input logic [7:0][W-1:0] d, input int chain, input logic [7:0][W-1:0] x0);
    exp_t e;
    longint t_prev_acc;
    @(negedge clk);
    in_valid = 1'b1;
    in_mode  = mode;
    din      = d;
    @(posedge clk);
    while (!in_ready) begin
      n_hold++;
      @(posedge clk);
    end
    // accepted at this edge (in_ready sampled high before it)
    e.mode  = mode;
    ref_tf(mode, d, e.exp);
    e.t_acc = cycle;
    e.chain = chain;
    e.x0    = x0;
    q.push_back(e);
    if (mode == 1'b0) n_dct++; else n_idct++;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  logic prev_mode;
  longint prev_acc = -100;
  int     prev_len = 0;

  initial begin
    logic [7:0][W-1:0] d;
    logic mode;
    in_valid = 1'b0;
    in_mode  = 1'b0;
    din      = '0;
    rst_n    = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Directed: DC and single-cosine inputs.
    for (int i = 0; i < 8; i++) d[i] = W'(1000);
    send(1'b0, d, 0, d);
    for (int i = 0; i < 8; i++) d[i] = (i == 3) ? W'(5000) : '0;
    send(1'b1, d, 0, d);

    prev_mode = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      int gap;
      int chain;
      mode  = 1'($urandom_range(0, 1));
      chain = 0;
      for (int i = 0; i < 8; i++) d[i] = rnd((b % 3 == 0) ? 26 : 12);
      if (b % 5 == 0) begin
        mode  = 1'b0;
        chain = 1;
      end
      gap = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 12)) : 0;
      repeat (gap) @(posedge clk);
      begin
        send(mode, d, chain, d);
        if (mode != prev_mode) n_switch++;
        if (q.size() >= 1 && prev_len != 0 && q[q.size()-1].t_acc - prev_acc == prev_len) begin
          n_b2b++;
          checks++;
        end
        prev_acc  = q[q.size()-1].t_acc;
        prev_len  = (mode == 1'b0) ? 10 : 8;
        prev_mode = mode;
      end
      if (chain == 1) begin
        // wait for the DCT result, then send its IDCT
        wait (q.size() == 0 && chain_pending);
        chain_pending = 0;
        send(1'b1, last_dct_out, 2, chain_x);
        prev_mode = 1'b1;
        prev_acc  = q[q.size()-1].t_acc;
        prev_len  = 8;
      end
    end
    wait (q.size() == 0);
    repeat (15) @(posedge clk);

    $display("mechanisms: dct=%0d idct=%0d mode_switch=%0d back_to_back=%0d input_held=%0d round_trip=%0d",
             n_dct, n_idct, n_switch, n_b2b, n_hold, n_round);
    if (n_dct == 0)    begin failures++; $display("FAIL: no DCT block"); end
    if (n_idct == 0)   begin failures++; $display("FAIL: no IDCT block"); end
    if (n_switch == 0) begin failures++; $display("FAIL: no mode switch"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL: no back-to-back blocks"); end
    if (n_hold == 0)   begin failures++; $display("FAIL: input never held off"); end
    if (n_round == 0)  begin failures++; $display("FAIL: no round trip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
