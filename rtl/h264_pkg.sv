// h264_pkg: types, sizes and helper functions shared by the decoder blocks.
// Pixels are unsigned 8-bit. A 4x4 block is held as 16 pixels in raster
// order inside the block (index = 4*row + col). The deblocking threshold
// tables (alpha, beta, tc0 indexed by QP) are the values of the H.264
// standard; they are this design's addition, the decoder description only
// names the boundary strength that selects the filter.
package h264_pkg;

  typedef logic [7:0] pix_t;
  typedef pix_t [15:0] blk4x4_t;          // [4*row+col]
  typedef logic signed [15:0] coef_t;      // dequantised / residual sample
  typedef coef_t [15:0] cblk4x4_t;

  // Luma interpolator input: one column of 9 integer pixels (rows y-2 .. y+6)
  typedef pix_t [8:0] col9_t;
  // Luma interpolator output: one column of 4 predicted pixels (rows 0..3)
  typedef pix_t [3:0] col4_t;

  // Intra 4x4 prediction modes, numbered as in the H.264 standard
  typedef enum logic [3:0] {
    I4_VERT = 4'd0, I4_HOR = 4'd1, I4_DC = 4'd2, I4_DDL = 4'd3, I4_DDR = 4'd4,
    I4_VR = 4'd5, I4_HD = 4'd6, I4_VL = 4'd7, I4_HU = 4'd8
  } i4_mode_e;

  // Clip a signed value to the 8-bit pixel range
  function automatic pix_t clip_pix(input logic signed [19:0] v);
    if (v < 0) return 8'd0;
    else if (v > 255) return 8'd255;
    else return v[7:0];
  endfunction

  // Deblocking edge thresholds, H.264 Table 8-16 (indexA / indexB = QP here)
  function automatic logic [7:0] db_alpha(input logic [5:0] qp);
    logic [7:0] t [0:35];
    t = '{4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,
          80,90,101,113,127,144,162,182,203,226,255,255};
    return (qp < 16) ? 8'd0 : t[qp - 6'd16];
  endfunction

  function automatic logic [4:0] db_beta(input logic [5:0] qp);
    logic [4:0] t [0:35];
    t = '{2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,
          15,15,16,16,17,17,18,18};
    return (qp < 16) ? 5'd0 : t[qp - 6'd16];
  endfunction

  // tc0 for bS = 1, 2, 3 (H.264 Table 8-17)
  function automatic logic [4:0] db_tc0(input logic [5:0] qp, input logic [2:0] bs);
    logic [4:0] t1 [0:34];
    logic [4:0] t2 [0:34];
    logic [4:0] t3 [0:34];
    t1 = '{0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13};
    t2 = '{0,0,0,0,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17,17};
    t3 = '{1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25,25};
    if (qp < 17 || bs == 3'd0) return 5'd0;
    case (bs)
      3'd1: return t1[qp - 6'd17];
      3'd2: return t2[qp - 6'd17];
      default: return t3[qp - 6'd17];
    endcase
  endfunction

  // Dequantisation scale v(qp%6, class), H.264 8.5.12.1 (4x4 residual)
  function automatic logic [4:0] levelscale(input logic [2:0] qpm6, input logic [3:0] idx);
    logic [1:0] cls;
    logic [1:0] r, c;
    r = idx[3:2];
    c = idx[1:0];
    // class 0: both row and column even; class 1: both odd; class 2: mixed
    if (!r[0] && !c[0]) cls = 2'd0;
    else if (r[0] && c[0]) cls = 2'd1;
    else cls = 2'd2;
    case (qpm6)
      3'd0: return (cls == 0) ? 5'd10 : (cls == 1) ? 5'd16 : 5'd13;
      3'd1: return (cls == 0) ? 5'd11 : (cls == 1) ? 5'd18 : 5'd14;
      3'd2: return (cls == 0) ? 5'd13 : (cls == 1) ? 5'd20 : 5'd16;
      3'd3: return (cls == 0) ? 5'd14 : (cls == 1) ? 5'd23 : 5'd18;
      3'd4: return (cls == 0) ? 5'd16 : (cls == 1) ? 5'd25 : 5'd20;
      default: return (cls == 0) ? 5'd18 : (cls == 1) ? 5'd29 : 5'd23;
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Tokens passed between the pipeline units
  // ---------------------------------------------------------------------
  typedef logic signed [13:0] mv_t;        // quarter-pel motion vector

  // One 4x4 luma block as delivered by the entropy decoder
  typedef struct packed {
    logic [7:0]  mb_x;        // macroblock column
    logic [7:0]  mb_y;        // macroblock row
    logic [3:0]  blk_idx;     // 4x4 index inside the MB, zig-zag order
    logic        intra;       // 1: spatial prediction, 0: temporal
    i4_mode_e    i4_mode;
    mv_t         mv_x;
    mv_t         mv_y;
    logic [2:0]  ref_idx;     // reference frame slot in the frame buffer
    logic        coded;       // any non-zero coefficient
    logic [5:0]  qp;
    logic [2:0]  bs_left;     // boundary strength of the block's left edge
    logic [2:0]  bs_top;      // boundary strength of the block's top edge
    cblk4x4_t    level;       // quantised coefficients, [4*row+col]
  } blk_cmd_t;

  // Motion-compensation read request, core -> memory controller
  typedef struct packed {
    logic signed [15:0] x_int;   // integer reference position (pixels)
    logic signed [15:0] y_int;
    logic [1:0]  xf;
    logic [1:0]  yf;
    logic [2:0]  ref_idx;
    logic        sel;            // interpolator MC0 / MC1
  } mc_req_t;

  // Chroma motion-compensation request, core -> chroma memory controller.
  // Position is the integer chroma reference position of a 2x2 block; the
  // request covers the same block in both chroma planes (Cb, then Cr).
  typedef struct packed {
    logic signed [15:0] x_int;
    logic signed [15:0] y_int;
    logic [2:0]  dx;             // eighth-pel fraction
    logic [2:0]  dy;
    logic [2:0]  ref_idx;
  } cmc_req_t;

  // One 3x3 chroma reference window, chroma memory controller -> core
  typedef struct packed {
    logic        plane;          // 0 = Cb, 1 = Cr
    logic [2:0]  dx;
    logic [2:0]  dy;
    pix_t [8:0]  win;            // [3*row+col]
  } cmc_win_t;

  // One reference column, memory controller -> interpolator
  typedef struct packed {
    logic        first;
    logic [1:0]  xf;
    logic [1:0]  yf;
    col9_t       col;
  } mc_col_t;

  // One deblocked 4x4 block, DB -> memory controller
  typedef struct packed {
    logic [9:0]  bx;             // block column (4-pixel units)
    logic [9:0]  by;             // block row
    blk4x4_t     pix;
  } db_out_t;

  // 4x4 block position inside a macroblock for a zig-zag index
  function automatic logic [1:0] blk_x(input logic [3:0] idx);
    return {idx[2], idx[0]};
  endfunction
  function automatic logic [1:0] blk_y(input logic [3:0] idx);
    return {idx[3], idx[1]};
  endfunction

endpackage
