// subband_dct_idct: 8-point DCT/IDCT linear-array processor based on
// subband decomposition.
//
// DCT:  C = Fh * (R * x).  The fast adder (FA) forms one y[k] = row k of R
// times x per step, with additions only. The multiplier array (MA, four
// multipliers, constants from a 10-word ROM) applies Fh: y[0] and y[1] pass
// straight to the CSA array (CA); y[2], y[3] go through a 2x2 rotation
// (4 products in one step); y[4..7] each give one column of the 4x4 block
// (4 products per step) that four CA lanes accumulate. 10 steps per block.
// IDCT: x = R^T * (Fh^T * C). The MA and the full CSA(4,2) (FCSA) form
// z = Fh^T * C, one z word per step into bank B; then all eight CA lanes
// accumulate x[n] += +/- z[k] (R^T has +/-1 entries). 8 steps per block.
// Storage: bank A (8 words) holds the input block, bank B (8 words) holds
// y or z, the CA lanes hold the result: 16 words plus the 8 CA latches.
//
// Interface: din/dout are eight signed DATA_W-bit words in natural order
// (x[0..7] and C[0..7]); in_mode = 0 selects DCT, 1 IDCT. A block is taken
// when in_valid && in_ready; out_valid rises for one clock, 11 (DCT) or 9
// (IDCT) clocks after the accepting edge, and dout is only meaningful then.
// Blocks can be sent back to back (in_ready is high in a block's last
// step); there is no output back-pressure.
// Scaling: the outputs are 2*sqrt(2) times the orthonormal DCT/IDCT, as the
// constant factors of R and Fh are not applied; keep |din| below
// 2**(DATA_W-4) so the sums of eight terms cannot wrap. Internally the CA
// lanes hold the DCT coefficients in the order X0 X4 X2 X6 X1 X7 X3 X5 (the
// block-diagonal order of Fh); the ports re-order them by wiring.
// The factorisation, the unit set (FA, MA, FCSA, CA), the constants and the
// step order follow the design; fixed-point format, rounding, handshake and
// one step per clock are this implementation's choices.
module subband_dct_idct
  import sbdct_pkg::*;
#(
  parameter int unsigned DATA_W    = sbdct_pkg::DEF_DATA_W,
  parameter int unsigned COEF_W    = sbdct_pkg::DEF_COEF_W,
  parameter int unsigned COEF_FRAC = sbdct_pkg::DEF_COEF_FRAC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic                   in_mode,
  input  logic [7:0][DATA_W-1:0] din,
  output logic                   out_valid,
  output logic                   out_mode,
  output logic [7:0][DATA_W-1:0] dout
);
  localparam int unsigned W = DATA_W;

  mode_e             mode, omode;
  logic              load_in;
  ctrl_t             ctrl;

  logic [7:0][W-1:0] din_lane, qa, qb, ca_s, ca_a, ca_b;
  logic [7:0]        ca_sub;
  logic [7:0]        fa_neg;
  logic [W-1:0]      fa_sum;
  logic [3:0][W-1:0] ma_y, ma_k;
  logic [3:0][COEF_W-1:0] ma_z;
  ksel_t [3:0]       ksel;
  logic [W-1:0]      fc_sum, fc_hi;
  logic              bwe0, bwe1;
  logic [2:0]        baddr0, baddr1;
  logic [W-1:0]      bd0, bd1;

  sbdct_ctrl u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_mode(mode_e'(in_mode)), .in_ready,
    .load_in, .mode, .busy(), .step(), .ctrl,
    .out_valid, .out_mode(omode)
  );
  assign out_mode = omode;

  // Input re-ordering: the IDCT takes C in lane order.
  always_comb begin
    for (int l = 0; l < 8; l++) begin
      din_lane[l] = (in_mode == MODE_IDCT) ? din[lane_to_k(3'(l))] : din[l];
    end
  end

  // Bank A: the input block.
  word_bank #(.W(W)) u_bank_a (
    .clk, .rst_n, .load(load_in), .d_all(din_lane),
    .we0(1'b0), .addr0(3'd0), .d0('0), .we1(1'b0), .addr1(3'd0), .d1('0),
    .q(qa)
  );

  // Fast adder: row ctrl.fa_row of R applied to x.
  always_comb begin
    for (int n = 0; n < 8; n++) fa_neg[n] = r_neg(ctrl.fa_row, 3'(n));
  end
  fast_adder #(.W(W)) u_fa (.x(qa), .neg(fa_neg), .sum(fa_sum));

  // Multiplier array operands and constants.
  always_comb begin
    if (ctrl.ma_rot) begin
      // y2*c8, y2*(-s8), y3*s8, y3*c8 (DCT); C2*c8, C3*(-s8), C2*s8, C3*c8 (IDCT)
      ksel[0] = '{K_C8, 1'b0};
      ksel[1] = '{K_S8, 1'b1};
      ksel[2] = '{K_S8, 1'b0};
      ksel[3] = '{K_C8, 1'b0};
      if (mode == MODE_DCT) begin
        ma_y = {fa_sum, fa_sum, qb[2], qb[2]};
      end else begin
        ma_y = {qa[3], qa[2], qa[3], qa[2]};
      end
    end else begin
      for (int i = 0; i < 4; i++) begin
        ksel[i] = blk_coef(2'(i), ctrl.ma_col);
        ma_y[i] = (mode == MODE_DCT) ? qb[4 + ctrl.ma_col] : qa[4 + i];
      end
    end
  end

  coef_rom #(.CW(COEF_W), .FRAC(COEF_FRAC)) u_rom (.sel(ksel), .z(ma_z));

  multiplier_array #(.W(W), .CW(COEF_W), .FRAC(COEF_FRAC)) u_ma (
    .clk, .rst_n, .en(ctrl.ma_en), .y(ma_y), .z(ma_z), .k(ma_k)
  );

  // Full CSA(4,2): z = Fh^T * C from the registered products.
  fcsa_4_2 #(.W(W)) u_fcsa (.k(ma_k), .pair(ctrl.fc_op == FC_PAIR), .sum(fc_sum), .sum_hi(fc_hi));

  // Bank B: y (DCT) or z (IDCT).
  always_comb begin
    bwe0 = 1'b0; baddr0 = '0; bd0 = '0;
    bwe1 = 1'b0; baddr1 = '0; bd1 = '0;
    if (ctrl.y_we) begin
      bwe0 = 1'b1; baddr0 = ctrl.y_addr; bd0 = fa_sum;
    end
    unique case (ctrl.fc_op)
      FC_PASS: begin
        bwe0 = 1'b1; baddr0 = 3'd0; bd0 = qa[0];
        bwe1 = 1'b1; baddr1 = 3'd1; bd1 = qa[1];
      end
      FC_PAIR: begin
        bwe0 = 1'b1; baddr0 = ctrl.z_addr; bd0 = fc_sum;
        bwe1 = 1'b1; baddr1 = ctrl.z_addr + 3'd1; bd1 = fc_hi;
      end
      FC_FULL: begin
        bwe0 = 1'b1; baddr0 = ctrl.z_addr; bd0 = fc_sum;
      end
      default: ;
    endcase
  end

  word_bank #(.W(W)) u_bank_b (
    .clk, .rst_n, .load(1'b0), .d_all('0),
    .we0(bwe0), .addr0(baddr0), .d0(bd0), .we1(bwe1), .addr1(baddr1), .d1(bd1),
    .q(qb)
  );

  // CSA array operands.
  always_comb begin
    for (int l = 0; l < 8; l++) begin
      ca_sub[l] = 1'b0;
      unique case (ctrl.ca_a)
        CA_A_FA:   ca_a[l] = fa_sum;
        CA_A_PROD: ca_a[l] = (l < 4) ? ma_k[(l - 2) & 3] : ma_k[l - 4];
        CA_A_Z:    ca_a[l] = qb[ctrl.ca_zk];
        default:   ca_a[l] = '0;
      endcase
      unique case (ctrl.ca_b)
        CB_ZERO:    ca_b[l] = '0;
        CB_SELF:    ca_b[l] = ca_s[l];
        CB_PROD_HI: ca_b[l] = ma_k[l & 3];
        CB_Z:       ca_b[l] = qb[0];
        default:    ca_b[l] = '0;
      endcase
      if (ctrl.ca_a == CA_A_Z) ca_sub[l] = r_neg(ctrl.ca_zk, 3'(l));
    end
  end

  csa_array #(.W(W)) u_ca (
    .clk, .rst_n, .en(ctrl.ca_en), .sub(ca_sub), .a(ca_a), .b(ca_b), .s(ca_s)
  );

  // Output re-ordering: DCT lanes hold X0 X4 X2 X6 X1 X7 X3 X5. The lane
  // order is its own inverse, so X[k] sits in lane lane_to_k(k).
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      dout[k] = (omode == MODE_DCT) ? ca_s[lane_to_k(3'(k))] : ca_s[k];
    end
  end
endmodule
