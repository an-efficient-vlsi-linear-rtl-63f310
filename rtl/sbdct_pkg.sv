// sbdct_pkg: types, constants and tables shared by the subband-decomposition
// 8-point DCT/IDCT linear array.
//
// The transform is factored as C = Fh * R * x. R is an 8x8 matrix of +1/-1
// entries (a Hadamard-type matrix, here without its sqrt(2)/8 factor) and is
// evaluated by the fast adder with additions only. Fh is block diagonal: a 1,
// a 1, a 2x2 rotation by pi/8 and a 4x4 orthonormal block, so it needs 4 + 16
// = 20 multiplications. The rows of R are taken in the order that makes Fh
// block diagonal; in that order the processor's output lanes hold the DCT
// coefficients X0, X4, X2, X6, X1, X7, X3, X5 (table LANE_TO_K).
//
// The arithmetic is unnormalised: the datapath computes 2*sqrt(2) times the
// orthonormal DCT (and 2*sqrt(2) times the orthonormal IDCT), because the
// sqrt(2)/8 factor of R and the factor 2 in front of Fh are not applied. A DCT
// followed by an IDCT therefore returns 8 * x.
//
// The ten constants of Fh are products of cos/sin of pi/8 with cos/sin of
// pi/16 and 3*pi/16, stored as signed fixed point with COEF_FRAC fraction bits
// (value = round(constant * 2**30) at the default width).
package sbdct_pkg;

  parameter int unsigned DEF_DATA_W    = 32;  // data bus width
  parameter int unsigned DEF_COEF_W    = 32;  // coefficient width
  parameter int unsigned DEF_COEF_FRAC = 30;  // fraction bits of a coefficient
  parameter int unsigned NCOEF         = 10;  // words in the constant ROM

  typedef enum logic {MODE_DCT = 1'b0, MODE_IDCT = 1'b1} mode_e;

  // Constant ROM addresses. c8 = cos(pi/8), s8 = sin(pi/8),
  // c1/s1 = cos/sin(pi/16), c3/s3 = cos/sin(3*pi/16).
  typedef enum logic [3:0] {
    K_C8   = 4'd0,  // c8           0.9239
    K_S8   = 4'd1,  // s8           0.3827
    K_C1C8 = 4'd2,  // c1*c8        0.9061
    K_C1S8 = 4'd3,  // c1*s8        0.3753
    K_S1C8 = 4'd4,  // s1*c8        0.1802
    K_S1S8 = 4'd5,  // s1*s8        0.0747
    K_C3C8 = 4'd6,  // c3*c8        0.7682
    K_C3S8 = 4'd7,  // c3*s8        0.3182
    K_S3C8 = 4'd8,  // s3*c8        0.5133
    K_S3S8 = 4'd9   // s3*s8        0.2126
  } kaddr_e;

  // Signed selection of one constant: value = neg ? -ROM[addr] : ROM[addr].
  typedef struct packed {
    kaddr_e addr;
    logic   neg;
  } ksel_t;

  // Sign of R[row][col] in the processor's row order: 1 means -1.
  // Rows are y[0..7]; columns are x[0..7].
  function automatic logic r_neg(input logic [2:0] row, input logic [2:0] col);
    logic [7:0] r;
    case (row)
      3'd0: r = 8'b0000_0000;  // + + + + + + + +
      3'd1: r = 8'b0110_0110;  // + - - + + - - +
      3'd2: r = 8'b0011_1100;  // + + - - - - + +
      3'd3: r = 8'b0101_1010;  // + - + - - + - +
      3'd4: r = 8'b1111_0000;  // + + + + - - - -
      3'd5: r = 8'b1100_1100;  // + + - - + + - -
      3'd6: r = 8'b1010_1010;  // + - + - + - + -
      default: r = 8'b1001_0110;  // + - - + - + + -
    endcase
    return r[col];
  endfunction

  // Entry (4+i, j) of the 4x4 block of Fh, i = 0..3 (output lane 4+i),
  // j = 4..7 (input y[j]):
  //   [ c1c8  c1s8  s1c8 -s1s8 ]
  //   [-s1c8 -s1s8  c1c8 -c1s8 ]
  //   [-c3s8  c3c8  s3s8  s3c8 ]
  //   [ s3s8 -s3c8  c3s8  c3c8 ]
  function automatic ksel_t blk_coef(input logic [1:0] i, input logic [1:0] j);
    ksel_t k;
    unique case ({i, j})
      4'h0: k = '{K_C1C8, 1'b0};
      4'h1: k = '{K_C1S8, 1'b0};
      4'h2: k = '{K_S1C8, 1'b0};
      4'h3: k = '{K_S1S8, 1'b1};
      4'h4: k = '{K_S1C8, 1'b1};
      4'h5: k = '{K_S1S8, 1'b1};
      4'h6: k = '{K_C1C8, 1'b0};
      4'h7: k = '{K_C1S8, 1'b1};
      4'h8: k = '{K_C3S8, 1'b1};
      4'h9: k = '{K_C3C8, 1'b0};
      4'hA: k = '{K_S3S8, 1'b0};
      4'hB: k = '{K_S3C8, 1'b0};
      4'hC: k = '{K_S3S8, 1'b0};
      4'hD: k = '{K_S3C8, 1'b1};
      4'hE: k = '{K_C3S8, 1'b0};
      default: k = '{K_C3C8, 1'b0};
    endcase
    return k;
  endfunction

  // Output lane -> natural DCT coefficient index.
  function automatic logic [2:0] lane_to_k(input logic [2:0] lane);
    logic [2:0] k;
    case (lane)
      3'd0: k = 3'd0;
      3'd1: k = 3'd4;
      3'd2: k = 3'd2;
      3'd3: k = 3'd6;
      3'd4: k = 3'd1;
      3'd5: k = 3'd7;
      3'd6: k = 3'd3;
      default: k = 3'd5;
    endcase
    return k;
  endfunction

  // Operand sources of the CSA array lanes.
  typedef enum logic [1:0] {CA_A_FA, CA_A_PROD, CA_A_Z} ca_a_e;
  typedef enum logic [1:0] {CB_ZERO, CB_SELF, CB_PROD_HI, CB_Z} ca_b_e;
  // Work of the full CSA(4,2) in a step.
  typedef enum logic [1:0] {FC_NONE, FC_PASS, FC_PAIR, FC_FULL} fcsa_op_e;

  // Control word issued by the controller for one clock step.
  typedef struct packed {
    logic      [2:0] fa_row;   // row of R evaluated by the fast adder
    logic            y_we;     // DCT: write fast-adder result to bank B
    logic      [2:0] y_addr;   // bank B address of that write
    logic            ma_en;    // load the multiplier-array product registers
    logic            ma_rot;   // 1: 2x2 rotation products, 0: 4x4 block column
    logic      [1:0] ma_col;   // column j-4 of the 4x4 block
    fcsa_op_e        fc_op;    // IDCT: what the FCSA(4,2) writes to bank B
    logic      [2:0] z_addr;   // bank B address of the FCSA result
    logic      [7:0] ca_en;    // lane enables of the CSA array
    ca_a_e           ca_a;     // operand A source
    ca_b_e           ca_b;     // operand B source
    logic      [2:0] ca_zk;    // IDCT: index k of z[k] added this step
  } ctrl_t;

endpackage
