// db_luma: luma deblocking unit. It collects the 16 reconstructed 4x4
// blocks of a macroblock, filters every 4x4 edge with one db_edge_filter
// (four pixel lines per cycle), and hands finished 4x4 blocks to the
// memory controller.
// Order per macroblock, as H.264 prescribes: the four vertical edges left
// to right (x = 0, 4, 8, 12; edge x = 0 against the previous macroblock),
// then the four horizontal edges top to bottom (y = 0 against the
// macroblock above). 16 + 16 edge cycles per macroblock, i.e. 2 cycles per
// 4x4 block.
// Pixels that a later macroblock may still change are held back: columns
// 12..15 of a macroblock stay in the working buffer until the macroblock
// to its right has filtered its left edge, and rows 12..15 go to a
// last-four-lines cache (line_cache, one 128-bit word = bottom 4x4 of a
// block column across the frame width) until the macroblock below has
// filtered its top edge. The output is therefore shifted up and left; at
// the end of a row and in the last row nothing is held back.
// Each block brings the boundary strength of its left and top edge. The
// QP of an edge between two macroblocks is the rounded mean of both QPs.
// Design choices: the QP is taken as constant within a macroblock; there
// is one macroblock buffer, so ADD waits while a macroblock is filtered
// and written out (counted in n_stall).
// Interface: valid/ready block stream in (any order within the MB, MBs in
// raster order), db_out_t stream out (block coordinates in 4-pixel units).
module db_luma
  import h264_pkg::*;
#(
  parameter int unsigned W = 1280,
  parameter int unsigned H = 720
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  blk4x4_t     in_blk,
  input  logic [7:0]  in_mb_x,
  input  logic [7:0]  in_mb_y,
  input  logic [3:0]  in_blk_idx,
  input  logic [5:0]  in_qp,
  input  logic [2:0]  in_bs_left,
  input  logic [2:0]  in_bs_top,
  output logic        out_valid,
  input  logic        out_ready,
  output db_out_t     out,
  output logic [31:0] n_stall,      // cycles a block waited at the input
  output logic [31:0] n_filtered    // edges filtered with bS > 0
);
  localparam int unsigned MBW = W / 16;
  localparam int unsigned MBH = H / 16;
  localparam int unsigned TW  = W / 4;       // words in the last-lines cache
  localparam int unsigned TAW = $clog2(TW);

  typedef enum logic [2:0] {D_COLLECT, D_VERT, D_HOR, D_OUT, D_SHIFT} state_e;
  state_e state;

  pix_t       wk [16][20];       // cols 0..3: left MB cols 12..15
  logic [2:0] bsl [16], bst [16];
  logic [5:0] qp_cur, qp_left;
  logic [5:0] qp_top [MBW];
  logic [7:0] mbx, mby;
  logic [4:0] cnt;
  logic [3:0] nblk;
  logic       last_row, row_end;

  assign last_row = (mby == 8'(MBH - 1));
  assign row_end  = (mbx == 8'(MBW - 1));
  assign in_ready = (state == D_COLLECT);

  // ---------------- last-four-lines cache ----------------
  logic            tm_we;
  logic [TAW-1:0]  tm_waddr, tm_raddr;
  blk4x4_t         tm_wdata, tm_rdata, tm_unused;

  line_cache #(.DEPTH(TW), .WIDTH(128)) u_top4 (
    .clk, .we(tm_we), .waddr(tm_waddr), .wdata(tm_wdata),
    .raddr0(tm_raddr), .rdata0(tm_rdata),
    .raddr1(tm_raddr), .rdata1(tm_unused));

  // ---------------- edge filter ----------------
  pix_t [3:0][7:0] lin, lout;
  logic [2:0]      bs;
  logic [5:0]      qpe;
  logic [1:0]      e, g;

  db_edge_filter u_filt (.lines_in(lin), .bs, .qp(qpe), .lines_out(lout));

  assign e = cnt[3:2];
  assign g = cnt[1:0];

  // output slot decode
  logic        s_valid, s_out;     // slot used / goes to output (else cache)
  blk4x4_t     s_blk;
  logic [9:0]  s_bx, s_by;
  logic [TAW-1:0] s_word;
  logic [4:0]  t;

  function automatic blk4x4_t wk_blk(input int r0, input int c0);
    blk4x4_t b;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) b[4*r+c] = wk[r0+r][c0+c];
    return b;
  endfunction

  always_comb begin
    lin      = '0;
    bs       = '0;
    qpe      = qp_cur;
    tm_raddr = TAW'(32'(mbx) * 4 + 32'(g));
    s_valid  = 1'b0;
    s_out    = 1'b0;
    s_blk    = '0;
    s_bx     = '0;
    s_by     = '0;
    s_word   = '0;
    t        = cnt - 5'd8;
    case (state)
      D_VERT: begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 8; j++) lin[i][j] = wk[4*g+i][4*e+j];
        bs  = (e == 2'd0 && mbx == 8'd0) ? 3'd0 : bsl[4*g + e];
        qpe = (e == 2'd0) ? 6'((7'(qp_cur) + 7'(qp_left) + 7'd1) >> 1) : qp_cur;
      end
      D_HOR: begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 8; j++)
            if (e == 2'd0 && j < 4) lin[i][j] = tm_rdata[4*j + i];
            else if (e != 2'd0 || j >= 4) lin[i][j] = wk[4*e - 4 + j][4 + 4*g + i];
        bs  = (e == 2'd0 && mby == 8'd0) ? 3'd0 : bst[4*e + g];
        qpe = (e == 2'd0) ? 6'((7'(qp_cur) + 7'(qp_top[mbx]) + 7'd1) >> 1) : qp_cur;
      end
      D_OUT: begin
        if (cnt < 5'd4) begin                       // above MB's bottom rows
          tm_raddr = TAW'(32'(mbx) * 4 + 32'(cnt));
          s_valid  = (mby != 8'd0);
          s_out    = 1'b1;
          s_blk    = tm_rdata;
          s_bx     = 10'(32'(mbx) * 4 + 32'(cnt));
          s_by     = 10'(32'(mby) * 4 - 1);
        end else if (cnt < 5'd8) begin              // left MB cols 12..15
          s_valid  = (mbx != 8'd0);
          s_out    = (cnt[1:0] != 2'd3) || last_row;
          s_blk    = wk_blk(4 * int'(cnt[1:0]), 0);
          s_bx     = 10'(32'(mbx) * 4 - 1);
          s_by     = 10'(32'(mby) * 4 + 32'(cnt[1:0]));
          s_word   = TAW'(32'(mbx) * 4 - 1);
        end else begin                              // current MB
          s_valid  = (t[1:0] != 2'd3) || row_end;
          s_out    = (t[3:2] != 2'd3) || last_row;
          s_blk    = wk_blk(4 * int'(t[3:2]), 4 + 4 * int'(t[1:0]));
          s_bx     = 10'(32'(mbx) * 4 + 32'(t[1:0]));
          s_by     = 10'(32'(mby) * 4 + 32'(t[3:2]));
          s_word   = TAW'(32'(mbx) * 4 + 32'(t[1:0]));
        end
      end
      default: ;
    endcase
  end

  assign out_valid = (state == D_OUT) && s_valid && s_out;
  assign out.bx    = s_bx;
  assign out.by    = s_by;
  assign out.pix   = s_blk;

  // cache write port
  always_comb begin
    tm_we    = 1'b0;
    tm_waddr = s_word;
    tm_wdata = s_blk;
    if (state == D_HOR && e == 2'd0) begin
      tm_we    = 1'b1;
      tm_waddr = TAW'(32'(mbx) * 4 + 32'(g));
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) tm_wdata[4*j + i] = lout[i][j];
    end else if (state == D_OUT && s_valid && !s_out) begin
      tm_we = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= D_COLLECT;
      cnt        <= '0;
      nblk       <= '0;
      mbx        <= '0;
      mby        <= '0;
      qp_cur     <= '0;
      qp_left    <= '0;
      n_stall    <= '0;
      n_filtered <= '0;
      for (int i = 0; i < 16; i++) begin
        bsl[i] <= '0;
        bst[i] <= '0;
        for (int j = 0; j < 20; j++) wk[i][j] <= '0;
      end
      for (int i = 0; i < MBW; i++) qp_top[i] <= '0;
    end else begin
      if (in_valid && !in_ready) n_stall <= n_stall + 1;
      if ((state == D_VERT || state == D_HOR) && bs != 3'd0) n_filtered <= n_filtered + 1;
      case (state)
        D_COLLECT: if (in_valid) begin
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++)
              wk[4*blk_y(in_blk_idx) + r][4 + 4*blk_x(in_blk_idx) + c] <= in_blk[4*r+c];
          bsl[{blk_y(in_blk_idx), blk_x(in_blk_idx)}] <= in_bs_left;
          bst[{blk_y(in_blk_idx), blk_x(in_blk_idx)}] <= in_bs_top;
          mbx    <= in_mb_x;
          mby    <= in_mb_y;
          qp_cur <= in_qp;
          nblk   <= nblk + 4'd1;
          if (nblk == 4'd15) begin
            state <= D_VERT;
            cnt   <= '0;
          end
        end
        D_VERT: begin
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 8; j++) wk[4*g+i][4*e+j] <= lout[i][j];
          cnt <= cnt + 5'd1;
          if (cnt == 5'd15) begin
            state <= D_HOR;
            cnt   <= '0;
          end
        end
        D_HOR: begin
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 8; j++)
              if (e != 2'd0 || j >= 4) wk[4*e - 4 + j][4 + 4*g + i] <= lout[i][j];
          cnt <= cnt + 5'd1;
          if (cnt == 5'd15) begin
            state <= D_OUT;
            cnt   <= '0;
          end
        end
        D_OUT: begin
          if (!(s_valid && s_out) || out_ready) begin
            cnt <= cnt + 5'd1;
            if (cnt == 5'd23) state <= D_SHIFT;
          end
        end
        D_SHIFT: begin
          for (int r = 0; r < 16; r++)
            for (int c = 0; c < 4; c++) wk[r][c] <= wk[r][16 + c];
          qp_left      <= qp_cur;
          qp_top[mbx]  <= qp_cur;
          state        <= D_COLLECT;
          cnt          <= '0;
        end
        default: state <= D_COLLECT;
      endcase
    end
  end
endmodule
