// sbdct_ctrl: sequencer of the DCT/IDCT linear array. All control signals
// are generated here, on chip.
//
// A block is accepted when in_valid and in_ready are both high; its mode
// (DCT or IDCT) is sampled with it and the input bank is loaded at that
// clock edge. The block then runs one clock per step:
//   DCT  (10 steps): Add1 Add2 Add3 Mul1 Add4 Mul2 Mul3 Mul4 Mul5 Add5
//   IDCT ( 8 steps): Mul1 Mul2 Mul3 Mul4 Mul5 Add1 Add2 Add3
// and the control word ctrl says, for the current step, which row of R the
// fast adder forms, what the multiplier array multiplies, what the full
// CSA(4,2) writes and what each CSA-array lane adds (see the step tables in
// the body). in_ready is high when idle and in the last step of a block, so
// blocks can follow each other with no gap: one block per 10 (DCT) or 8
// (IDCT) clocks. out_valid is high for exactly one clock, the one after the
// last step, while the CSA array holds the result; out_mode tells its mode.
// The step order follows the data-flow tables of the design; mapping each
// step to one clock, and the handshake, are this design's own choices.
module sbdct_ctrl
  import sbdct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  mode_e in_mode,
  output logic  in_ready,
  output logic  load_in,     // load the input bank this edge
  output mode_e mode,        // mode of the block in progress
  output logic  busy,
  output logic [3:0] step,
  output ctrl_t ctrl,
  output logic  out_valid,
  output mode_e out_mode
);
  logic last;
  logic accept;

  assign last     = busy && (step == ((mode == MODE_DCT) ? 4'd9 : 4'd7));
  assign in_ready = !busy || last;
  assign accept   = in_valid && in_ready;
  assign load_in  = accept;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      step      <= '0;
      mode      <= MODE_DCT;
      out_valid <= 1'b0;
      out_mode  <= MODE_DCT;
    end else begin
      out_valid <= last;
      if (last) out_mode <= mode;
      if (accept) begin
        busy <= 1'b1;
        step <= '0;
        mode <= in_mode;
      end else if (last) begin
        busy <= 1'b0;
        step <= '0;
      end else if (busy) begin
        step <= step + 4'd1;
      end
    end
  end

  // Control word of the current step.
  always_comb begin
    ctrl = '0;
    ctrl.ca_a = CA_A_FA;
    ctrl.ca_b = CB_ZERO;
    ctrl.fc_op = FC_NONE;
    if (busy && mode == MODE_DCT) begin
      // Fast adder: y[step] in steps 0..7, written to bank B.
      if (step <= 4'd7) begin
        ctrl.fa_row = step[2:0];
        ctrl.y_we   = 1'b1;
        ctrl.y_addr = step[2:0];
      end
      unique case (step)
        4'd0: begin ctrl.ca_en = 8'h01; ctrl.ca_a = CA_A_FA; ctrl.ca_b = CB_ZERO; end  // Add1: C[0]
        4'd1: begin ctrl.ca_en = 8'h02; ctrl.ca_a = CA_A_FA; ctrl.ca_b = CB_ZERO; end  // Add2: C[1]
        4'd2: ;                                                                         // Add3
        4'd3: begin ctrl.ma_en = 1'b1; ctrl.ma_rot = 1'b1; end                          // Mul1: y2, y3 rotation
        4'd4: begin ctrl.ca_en = 8'h0C; ctrl.ca_a = CA_A_PROD; ctrl.ca_b = CB_PROD_HI; end // Add4: C[2], C[3]
        4'd5: begin ctrl.ma_en = 1'b1; ctrl.ma_col = 2'd0; end                          // Mul2: y4 column
        4'd6: begin ctrl.ma_en = 1'b1; ctrl.ma_col = 2'd1;                              // Mul3: y5 column
                    ctrl.ca_en = 8'hF0; ctrl.ca_a = CA_A_PROD; ctrl.ca_b = CB_ZERO; end
        4'd7: begin ctrl.ma_en = 1'b1; ctrl.ma_col = 2'd2;                              // Mul4: y6 column
                    ctrl.ca_en = 8'hF0; ctrl.ca_a = CA_A_PROD; ctrl.ca_b = CB_SELF; end
        4'd8: begin ctrl.ma_en = 1'b1; ctrl.ma_col = 2'd3;                              // Mul5: y7 column
                    ctrl.ca_en = 8'hF0; ctrl.ca_a = CA_A_PROD; ctrl.ca_b = CB_SELF; end
        4'd9: begin ctrl.ca_en = 8'hF0; ctrl.ca_a = CA_A_PROD; ctrl.ca_b = CB_SELF; end // Add5: C[4..7]
        default: ;
      endcase
    end else if (busy) begin
      unique case (step)
        4'd0: begin ctrl.ma_en = 1'b1; ctrl.ma_rot = 1'b1;                              // Mul1
                    ctrl.fc_op = FC_PASS; ctrl.z_addr = 3'd0; end                       //   z[0], z[1]
        4'd1: begin ctrl.ma_en = 1'b1; ctrl.ma_col = 2'd0;                              // Mul2
                    ctrl.fc_op = FC_PAIR; ctrl.z_addr = 3'd2;                           //   z[2], z[3]
                    ctrl.ca_en = 8'hFF; ctrl.ca_a = CA_A_Z; ctrl.ca_b = CB_Z;
                    ctrl.ca_zk = 3'd1; end                         //   z0 +/- z1
        4'd2: begin ctrl.ma_en = 1'b1; ctrl.ma_col = 2'd1;                              // Mul3
                    ctrl.fc_op = FC_FULL; ctrl.z_addr = 3'd4;
                    ctrl.ca_en = 8'hFF; ctrl.ca_a = CA_A_Z; ctrl.ca_b = CB_SELF; ctrl.ca_zk = 3'd2; end
        4'd3: begin ctrl.ma_en = 1'b1; ctrl.ma_col = 2'd2;                              // Mul4
                    ctrl.fc_op = FC_FULL; ctrl.z_addr = 3'd5;
                    ctrl.ca_en = 8'hFF; ctrl.ca_a = CA_A_Z; ctrl.ca_b = CB_SELF; ctrl.ca_zk = 3'd3; end
        4'd4: begin ctrl.ma_en = 1'b1; ctrl.ma_col = 2'd3;                              // Mul5
                    ctrl.fc_op = FC_FULL; ctrl.z_addr = 3'd6;
                    ctrl.ca_en = 8'hFF; ctrl.ca_a = CA_A_Z; ctrl.ca_b = CB_SELF; ctrl.ca_zk = 3'd4; end
        4'd5: begin ctrl.fc_op = FC_FULL; ctrl.z_addr = 3'd7;                           // Add1
                    ctrl.ca_en = 8'hFF; ctrl.ca_a = CA_A_Z; ctrl.ca_b = CB_SELF; ctrl.ca_zk = 3'd5; end
        4'd6: begin ctrl.ca_en = 8'hFF; ctrl.ca_a = CA_A_Z; ctrl.ca_b = CB_SELF; ctrl.ca_zk = 3'd6; end // Add2
        4'd7: begin ctrl.ca_en = 8'hFF; ctrl.ca_a = CA_A_Z; ctrl.ca_b = CB_SELF; ctrl.ca_zk = 3'd7; end // Add3: x
        default: ;
      endcase
    end
  end

  // A new block is only taken in when the array is idle or finishing.
  a_accept_ok: assert property (@(posedge clk) disable iff (!rst_n)
                                (in_valid && busy && !last) |-> !in_ready);
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 busy |-> step <= 4'd9);
endmodule
