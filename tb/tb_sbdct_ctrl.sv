// tb_sbdct_ctrl: checks the sequencer. Random DCT and IDCT blocks are
// offered with random gaps. For every block it checks the handshake
// (in_ready low while a block is in its middle steps), the number of steps
// (10 for a DCT, 8 for an IDCT), the one-clock out_valid pulse and its
// mode, and the work issued over the block: five multiplication steps in
// both modes, the rotation first among them, eight fast-adder rows and the
// CSA-array lane writes of the DCT data-flow table, and for the IDCT the
// z writes (2 passed, 2 paired, 4 full sums) and seven accumulation steps.
module tb_sbdct_ctrl;
  import sbdct_pkg::*;
  logic clk = 1'b0, rst_n, in_valid, in_ready, load_in, busy, out_valid;
  mode_e in_mode, mode, out_mode;
  logic [3:0] step;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  longint cycle = 0;

  sbdct_ctrl dut (.clk, .rst_n, .in_valid, .in_mode, .in_ready, .load_in, .mode, .busy,
                  .step, .ctrl, .out_valid, .out_mode);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-block tallies, gathered on every clock of a block.
  int n_steps, n_mul, n_fa, n_pass, n_pair, n_full, n_acc, first_mul;
  int lane_w [8];
  mode_e cur;
  longint t_acc;
  int blocks = 0;
  bit pending = 0;
  longint exp_out = -1;
  mode_e exp_mode;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (out_valid) begin
        check(cycle == exp_out, "out_valid timing");
        check(out_mode == exp_mode, "out_mode");
      end else if (cycle == exp_out) begin
        check(0, "missing out_valid");
      end
      if (busy) begin
        n_steps++;
        if (ctrl.ma_en) begin
          n_mul++;
          if (first_mul < 0) first_mul = ctrl.ma_rot ? 1 : 0;
        end
        if (ctrl.y_we) n_fa++;
        if (ctrl.fc_op == FC_PASS) n_pass++;
        if (ctrl.fc_op == FC_PAIR) n_pair++;
        if (ctrl.fc_op == FC_FULL) n_full++;
        if (ctrl.ca_en == 8'hFF) n_acc++;
        for (int l = 0; l < 8; l++) if (ctrl.ca_en[l]) lane_w[l]++;
        check(step == 4'(n_steps - 1), "step counter");
        if (in_valid && !(step == ((mode == MODE_DCT) ? 9 : 7))) check(!in_ready, "in_ready low mid-block");
      end
      if (busy && step == ((mode == MODE_DCT) ? 9 : 7)) begin
        // last step of the block: check the tallies
        if (mode == MODE_DCT) begin
          check(n_steps == 10, "DCT step count");
          check(n_fa == 8, "DCT fast-adder rows");
          check(lane_w[0] == 1 && lane_w[1] == 1 && lane_w[2] == 1 && lane_w[3] == 1, "DCT lanes 0-3");
          check(lane_w[4] == 4 && lane_w[5] == 4 && lane_w[6] == 4 && lane_w[7] == 4, "DCT lanes 4-7");
        end else begin
          check(n_steps == 8, "IDCT step count");
          check(n_pass == 1 && n_pair == 1 && n_full == 4, "IDCT z writes");
          check(n_acc == 7, "IDCT accumulation steps");
        end
        check(n_mul == 5, "five multiplication steps");
        check(first_mul == 1, "rotation is the first multiplication");
        exp_out  = cycle + 1;
        exp_mode = mode;
        blocks++;
      end
      if (load_in) begin
        check(in_valid && in_ready, "load only on handshake");
        n_steps = 0; n_mul = 0; n_fa = 0; n_pass = 0; n_pair = 0; n_full = 0; n_acc = 0;
        first_mul = -1;
        for (int l = 0; l < 8; l++) lane_w[l] = 0;
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_mode = MODE_DCT;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    check(in_ready && !busy, "idle after reset");
    for (int b = 0; b < 300; b++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_mode  = mode_e'($urandom_range(0, 1));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
      repeat ($urandom_range(0, 2) == 0 ? $urandom_range(0, 12) : 0) @(negedge clk);
    end
    repeat (15) @(posedge clk);
    check(blocks == 300, "all blocks finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
