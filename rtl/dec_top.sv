// dec_top: luma decoding pipeline of a low-power H.264 baseline decoder.
// The decoder works on 4x4 blocks and is a non-interlocked pipeline: the
// units (inverse transform IT, motion compensation MC, intra prediction
// INTRA, reconstruction ADD, deblocking DB, memory controller MEM) are
// joined by FIFOs and each runs as soon as its inputs are there, so the
// slow units set the pace only on average, not block by block.
// Two clock/voltage domains: everything runs on the core clock clk except
// MEM, which runs on mclk with the 32-bit off-chip frame buffer. They
// meet only in asynchronous FIFOs (MC requests core->MEM, reference
// columns MEM->MC0/MC1, deblocked blocks core->MEM), so each domain can
// be given its own frequency and supply.
// Data flow per block command (from the entropy decoder):
//   levels -> FIFO -> IT (1 block/cycle) -> residual FIFO -> ADD
//   inter  -> MC request -> MEM reads columns -> 2 parallel interpolators
//             (block rows alternate between MC0 and MC1) -> ADD
//   intra  -> INTRA predicts from neighbours of already reconstructed
//             blocks (current MB buffer, left column, last-line cache);
//             an intra block waits for the ADD of the block before it
//   ADD -> DB (per macroblock, last-four-lines cache) -> MEM -> frame buffer
// Chroma inter prediction runs beside the luma path: every inter block
// also sends a request through an asynchronous FIFO to the chroma memory
// controller, which reads a second (chroma) frame buffer and returns a 3x3
// window per plane to the chroma bilinear interpolator; the 2x2 Cb and Cr
// predictions leave on cmc_*. Chroma residuals, chroma intra, chroma
// reconstruction/deblocking and the CAVLC coefficient parser are not part
// of this RTL; the chroma deblocking edge filter and the Exp-Golomb parser
// are carried as side units with their own ports. Counters report how
// often each pipeline mechanism occurred.
// Design choices: the command format, the per-block handshakes, the
// sequencing of prediction/ADD (one block in ADD at a time) and the FIFO
// word formats are this design's; FIFO depths follow the decoder's
// table where it gives them.
module dec_top
  import h264_pkg::*;
#(
  parameter int unsigned W = 1280,
  parameter int unsigned H = 720,
  parameter int unsigned NFRAMES = 8,
  parameter int unsigned AW = $clog2(NFRAMES * W * H / 4),
  parameter int unsigned CAW = $clog2(NFRAMES * W * H / 8)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mclk,
  input  logic          mrst_n,
  // block commands from the entropy decoder
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  blk_cmd_t      cmd,
  input  logic [2:0]    cur_frame,     // frame-buffer slot being decoded
  input  logic [3:0]    trunc_lsb,     // IT accuracy scaling, 0 = exact
  // off-chip luma frame buffer (mclk domain)
  output logic          sram_en,
  output logic          sram_we,
  output logic [AW-1:0] sram_addr,
  output logic [31:0]   sram_wdata,
  input  logic [31:0]   sram_rdata,
  // off-chip chroma frame buffer (mclk domain, read only)
  output logic           csram_en,
  output logic [CAW-1:0] csram_addr,
  input  logic [31:0]    csram_rdata,
  // chroma inter prediction, one 2x2 block per plane and inter block
  output logic          cmc_out_valid,
  output logic          cmc_out_plane, // 0 = Cb, 1 = Cr
  output pix_t [3:0]    cmc_pred,      // [2*row+col]
  // Exp-Golomb syntax element parser
  input  logic          eg_valid,
  input  logic [31:0]   eg_bits,
  output logic          eg_out_valid,
  output logic          eg_err,
  output logic [5:0]    eg_len,
  output logic [31:0]   eg_ue,
  output logic signed [31:0] eg_se,
  // chroma deblocking edge filter (two lines per cycle, result registered)
  input  pix_t [1:0][3:0] cdb_lines,   // [line][p1 p0 q0 q1]
  input  logic [2:0]    cdb_bs,
  input  logic [5:0]    cdb_qp,
  output pix_t [1:0][1:0] cdb_out,     // [line][p0' q0']
  // status
  output logic [31:0]   n_blocks,       // blocks reconstructed
  output logic [31:0]   n_intra_wait,   // cycles INTRA waited for ADD
  output logic [31:0]   n_mc_wait,      // cycles ADD waited for MC
  output logic [31:0]   n_it_skip,      // blocks with no residual
  output logic [31:0]   n_db_stall,     // cycles ADD waited for DB
  output logic [31:0]   n_db_filtered,  // deblocked edges with bS > 0
  output logic [31:0]   n_mc_stall,     // cycles an interpolator waited on its output
  output logic [31:0]   n_mem_reads,
  output logic [31:0]   n_mem_writes,
  output logic [31:0]   n_mem_reuse,    // MC requests that reused the window
  output logic [31:0]   n_cmem_reads    // chroma frame-buffer reads
);
  localparam int unsigned MBW = W / 16;
  localparam int unsigned LW  = W / 4;          // intra last-line words
  localparam int unsigned LAW = $clog2(LW + 1);

  // =====================================================================
  // Command split
  // =====================================================================
  typedef struct packed {
    logic       coded;
    logic [5:0] qp;
    cblk4x4_t   level;
  } coef_tok_t;

  typedef struct packed {
    logic [7:0] mb_x;
    logic [7:0] mb_y;
    logic [3:0] blk_idx;
    logic       intra;
    i4_mode_e   i4_mode;
    logic [5:0] qp;
    logic [2:0] bs_left;
    logic [2:0] bs_top;
  } par_tok_t;

  logic      cf_ready, cf_valid, cf_pop;
  coef_tok_t cf_in, cf_out;
  logic      pf_ready, pf_valid, pf_pop;
  par_tok_t  pf_in, pf_out;
  logic      mq_ready;
  mc_req_t   mq_in;
  logic [0:0] cf_cnt;
  logic [4:0] pf_cnt;

  assign cf_in = '{coded: cmd.coded, qp: cmd.qp, level: cmd.level};
  assign pf_in = '{mb_x: cmd.mb_x, mb_y: cmd.mb_y, blk_idx: cmd.blk_idx, intra: cmd.intra,
                   i4_mode: cmd.i4_mode, qp: cmd.qp, bs_left: cmd.bs_left, bs_top: cmd.bs_top};

  always_comb begin
    mq_in.x_int   = 16'(signed'({1'b0, cmd.mb_x, 4'b0})) + 16'(signed'({1'b0, blk_x(cmd.blk_idx), 2'b0}))
                    + 16'(cmd.mv_x >>> 2);
    mq_in.y_int   = 16'(signed'({1'b0, cmd.mb_y, 4'b0})) + 16'(signed'({1'b0, blk_y(cmd.blk_idx), 2'b0}))
                    + 16'(cmd.mv_y >>> 2);
    mq_in.xf      = cmd.mv_x[1:0];
    mq_in.yf      = cmd.mv_y[1:0];
    mq_in.ref_idx = cmd.ref_idx;
    mq_in.sel     = cmd.blk_idx[1];
  end

  // chroma request: the 2x2 chroma block under the luma block, chroma MV
  // = luma MV read in eighth chroma pixels
  cmc_req_t cq_in;
  logic     cq_ready;
  always_comb begin
    cq_in.x_int   = 16'(signed'({1'b0, cmd.mb_x, 3'b0})) + 16'(signed'({1'b0, blk_x(cmd.blk_idx), 1'b0}))
                    + 16'(cmd.mv_x >>> 3);
    cq_in.y_int   = 16'(signed'({1'b0, cmd.mb_y, 3'b0})) + 16'(signed'({1'b0, blk_y(cmd.blk_idx), 1'b0}))
                    + 16'(cmd.mv_y >>> 3);
    cq_in.dx      = cmd.mv_x[2:0];
    cq_in.dy      = cmd.mv_y[2:0];
    cq_in.ref_idx = cmd.ref_idx;
  end

  assign cmd_ready = cf_ready && pf_ready && (cmd.intra || (mq_ready && cq_ready));
  wire   cmd_fire  = cmd_valid && cmd_ready;

  sync_fifo #(.WIDTH($bits(coef_tok_t)), .DEPTH(1)) u_coef_fifo (
    .clk, .rst_n, .in_valid(cmd_fire), .in_ready(cf_ready), .in_data(cf_in),
    .out_valid(cf_valid), .out_ready(cf_pop), .out_data(cf_out), .count(cf_cnt));

  sync_fifo #(.WIDTH($bits(par_tok_t)), .DEPTH(16)) u_par_fifo (
    .clk, .rst_n, .in_valid(cmd_fire), .in_ready(pf_ready), .in_data(pf_in),
    .out_valid(pf_valid), .out_ready(pf_pop), .out_data(pf_out), .count(pf_cnt));

  // =====================================================================
  // IT and residual FIFO
  // =====================================================================
  logic      it_ov, it_oc, rf_ready, rf_valid, rf_pop;
  cblk4x4_t  it_res;
  logic [0:0] rf_cnt;
  typedef struct packed { logic coded; cblk4x4_t res; } res_tok_t;
  res_tok_t  rf_out;

  assign cf_pop = cf_valid && (rf_cnt == 1'b0) && !it_ov;

  it_4x4 u_it (
    .clk, .rst_n, .in_valid(cf_pop), .in_coded(cf_out.coded), .in_level(cf_out.level),
    .in_qp(cf_out.qp), .trunc_lsb, .out_valid(it_ov), .out_coded(it_oc), .out_res(it_res));

  sync_fifo #(.WIDTH($bits(res_tok_t)), .DEPTH(1)) u_res_fifo (
    .clk, .rst_n, .in_valid(it_ov), .in_ready(rf_ready), .in_data({it_oc, it_res}),
    .out_valid(rf_valid), .out_ready(rf_pop), .out_data(rf_out), .count(rf_cnt));

  // =====================================================================
  // Memory domain: MC requests in, columns out, deblocked blocks in
  // =====================================================================
  logic          mq_m_valid, mq_m_ready;
  mc_req_t       mq_m;
  logic          dbq_valid, dbq_ready, dbq_m_valid, dbq_m_ready;
  db_out_t       dbq_out, dbq_m;
  logic [1:0]    mcol_valid, mcol_ready;
  mc_col_t       mcol;
  logic [1:0]    ccol_valid, ccol_ready;
  mc_col_t [1:0] ccol;

  async_fifo #(.WIDTH($bits(mc_req_t)), .DEPTH(32)) u_mv_afifo (
    .wclk(clk), .wrst_n(rst_n), .w_valid(cmd_fire && !cmd.intra), .w_ready(mq_ready), .w_data(mq_in),
    .rclk(mclk), .rrst_n(mrst_n), .r_valid(mq_m_valid), .r_ready(mq_m_ready), .r_data(mq_m));

  async_fifo #(.WIDTH($bits(db_out_t)), .DEPTH(2)) u_db_afifo (
    .wclk(clk), .wrst_n(rst_n), .w_valid(dbq_valid), .w_ready(dbq_ready), .w_data(dbq_out),
    .rclk(mclk), .rrst_n(mrst_n), .r_valid(dbq_m_valid), .r_ready(dbq_m_ready), .r_data(dbq_m));

  for (genvar i = 0; i < 2; i++) begin : g_col_afifo
    async_fifo #(.WIDTH($bits(mc_col_t)), .DEPTH(4)) u_col_afifo (
      .wclk(mclk), .wrst_n(mrst_n), .w_valid(mcol_valid[i]), .w_ready(mcol_ready[i]), .w_data(mcol),
      .rclk(clk), .rrst_n(rst_n), .r_valid(ccol_valid[i]), .r_ready(ccol_ready[i]), .r_data(ccol[i]));
  end

  // chroma memory path: requests core->MEM, 3x3 windows MEM->core
  logic      cq_m_valid, cq_m_ready, cw_m_valid, cw_m_ready, cw_valid;
  cmc_req_t  cq_m;
  cmc_win_t  cw_m, cw;

  async_fifo #(.WIDTH($bits(cmc_req_t)), .DEPTH(8)) u_cq_afifo (
    .wclk(clk), .wrst_n(rst_n), .w_valid(cmd_fire && !cmd.intra), .w_ready(cq_ready), .w_data(cq_in),
    .rclk(mclk), .rrst_n(mrst_n), .r_valid(cq_m_valid), .r_ready(cq_m_ready), .r_data(cq_m));

  mem_chroma_ctrl #(.W(W), .H(H), .NFRAMES(NFRAMES), .AW(CAW)) u_cmem (
    .clk(mclk), .rst_n(mrst_n),
    .req_valid(cq_m_valid), .req_ready(cq_m_ready), .req(cq_m),
    .win_valid(cw_m_valid), .win_ready(cw_m_ready), .win_out(cw_m),
    .sram_en(csram_en), .sram_addr(csram_addr), .sram_rdata(csram_rdata),
    .n_reads(n_cmem_reads));

  async_fifo #(.WIDTH($bits(cmc_win_t)), .DEPTH(4)) u_cw_afifo (
    .wclk(mclk), .wrst_n(mrst_n), .w_valid(cw_m_valid), .w_ready(cw_m_ready), .w_data(cw_m),
    .rclk(clk), .rrst_n(rst_n), .r_valid(cw_valid), .r_ready(1'b1), .r_data(cw));

  mem_luma_ctrl #(.W(W), .H(H), .NFRAMES(NFRAMES), .AW(AW)) u_mem (
    .clk(mclk), .rst_n(mrst_n), .cur_frame,
    .wr_valid(dbq_m_valid), .wr_ready(dbq_m_ready), .wr_blk(dbq_m),
    .req_valid(mq_m_valid), .req_ready(mq_m_ready), .req(mq_m),
    .col_valid(mcol_valid), .col_ready(mcol_ready), .col_out(mcol),
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .n_reads(n_mem_reads), .n_writes(n_mem_writes), .n_reuse(n_mem_reuse));

  // =====================================================================
  // Motion compensation, two interpolators
  // =====================================================================
  logic [1:0]    mc_bv, mc_br;
  blk4x4_t [1:0] mc_blk;

  mc_luma_par #(.N(2), .OUT_DEPTH(1)) u_mc (
    .clk, .rst_n, .col_valid(ccol_valid), .col_ready(ccol_ready), .col_in(ccol),
    .blk_valid(mc_bv), .blk_ready(mc_br), .blk_out(mc_blk), .n_stall(n_mc_stall));

  // =====================================================================
  // Prediction select, INTRA, ADD sequencing
  // =====================================================================
  typedef enum logic [2:0] {R_IDLE, R_INB, R_IFIRE, R_IPRED, R_MC, R_ADD, R_WB} rstate_e;
  rstate_e  rs;
  par_tok_t cb;                 // block being reconstructed
  blk4x4_t  pred_q;
  logic     ip_valid, ip_ov, add_ov;
  blk4x4_t  ip_pred, recon;
  logic     db_in_ready;
  logic [1:0] bx, by;

  assign bx = blk_x(cb.blk_idx);
  assign by = blk_y(cb.blk_idx);

  // neighbour store
  pix_t           mbbuf [16][16];
  pix_t           lastcol [16];
  pix_t           colcorner1, corner_q, corner_w;
  logic           ll_we;
  logic [LAW-1:0] ll_waddr, ll_raddr0, ll_raddr1;
  logic [31:0]    ll_wdata, ll_rdata0, ll_rdata1;

  line_cache #(.DEPTH(LW + 1), .WIDTH(32)) u_intra_line (
    .clk, .we(ll_we), .waddr(ll_waddr), .wdata(ll_wdata),
    .raddr0(ll_raddr0), .rdata0(ll_rdata0), .raddr1(ll_raddr1), .rdata1(ll_rdata1));

  pix_t [7:0] nb_top;
  pix_t [3:0] nb_left;
  pix_t       nb_corner;
  logic       nb_ta, nb_la, nb_tra;
  logic [LAW-1:0] wbase;

  always_comb begin
    wbase     = LAW'(32'(cb.mb_x) * 4 + 32'(bx));
    ll_raddr0 = wbase;
    ll_raddr1 = (rs == R_INB) ? ((bx == 2'd0) ? wbase : wbase - 1'b1)   // corner word
                              : wbase + 1'b1;                           // top-right word
    if (rs == R_WB) ll_raddr1 = wbase;                                  // word being replaced
    for (int i = 0; i < 4; i++) begin
      nb_top[i]   = (by == 2'd0) ? ll_rdata0[8*i +: 8] : mbbuf[4*by - 1][4*bx + i];
      nb_top[4+i] = (by == 2'd0) ? ll_rdata1[8*i +: 8]
                                 : ((bx == 2'd3) ? 8'd0 : mbbuf[4*by - 1][4*bx + 4 + i]);
      nb_left[i]  = (bx == 2'd0) ? lastcol[4*by + i] : mbbuf[4*by + i][4*bx - 1];
    end
    if (bx != 2'd0 && by != 2'd0) nb_corner = mbbuf[4*by - 1][4*bx - 1];
    else if (bx != 2'd0)          nb_corner = corner_w;
    else if (by == 2'd0)          nb_corner = corner_q;
    else if (by == 2'd2)          nb_corner = colcorner1;
    else                          nb_corner = lastcol[4*by - 1];
    nb_la = (bx != 2'd0) || (cb.mb_x != 8'd0);
    nb_ta = (by != 2'd0) || (cb.mb_y != 8'd0);
    case (cb.blk_idx)
      4'd3, 4'd7, 4'd11, 4'd13, 4'd15: nb_tra = 1'b0;
      4'd5:                            nb_tra = (cb.mb_y != 8'd0) && (cb.mb_x != 8'(MBW - 1));
      4'd0, 4'd1, 4'd4:                nb_tra = (cb.mb_y != 8'd0);
      default:                         nb_tra = 1'b1;
    endcase
  end

  intra4x4_pred u_intra (
    .clk, .rst_n, .in_valid(ip_valid), .mode(cb.i4_mode),
    .top(nb_top), .left(nb_left), .corner(nb_corner),
    .top_avail(nb_ta), .left_avail(nb_la), .tr_avail(nb_tra),
    .out_valid(ip_ov), .pred(ip_pred));

  add_recon u_add (
    .clk, .rst_n, .in_valid(rs == R_ADD && rf_valid), .pred(pred_q), .res(rf_out.res),
    .res_coded(rf_out.coded), .out_valid(add_ov), .recon);

  assign pf_pop   = (rs == R_IDLE) && pf_valid;
  assign ip_valid = (rs == R_IFIRE);
  assign rf_pop   = (rs == R_ADD) && rf_valid;
  assign mc_br[0] = (rs == R_MC) && !cb.blk_idx[1];
  assign mc_br[1] = (rs == R_MC) &&  cb.blk_idx[1];

  // last-line write at the ADD write-back of bottom-row blocks
  assign ll_we    = (rs == R_WB) && db_in_ready && (by == 2'd3);
  assign ll_waddr = wbase;
  assign ll_wdata = {recon[15], recon[14], recon[13], recon[12]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs           <= R_IDLE;
      cb           <= '0;
      pred_q       <= '0;
      colcorner1   <= '0;
      corner_q     <= '0;
      corner_w     <= '0;
      n_blocks     <= '0;
      n_intra_wait <= '0;
      n_mc_wait    <= '0;
      n_it_skip    <= '0;
      n_db_stall   <= '0;
      for (int i = 0; i < 16; i++) begin
        lastcol[i] <= '0;
        for (int j = 0; j < 16; j++) mbbuf[i][j] <= '0;
      end
    end else begin
      if (pf_valid && pf_out.intra && (rs == R_ADD || rs == R_WB)) n_intra_wait <= n_intra_wait + 1;
      if (cf_pop && !cf_out.coded) n_it_skip <= n_it_skip + 1;
      case (rs)
        R_IDLE: if (pf_valid) begin
          cb <= pf_out;
          rs <= pf_out.intra ? R_INB : R_MC;
        end
        R_INB: begin
          corner_w <= ll_rdata1[31:24];
          rs       <= R_IFIRE;
        end
        R_IFIRE: begin
          rs       <= R_IPRED;
        end
        R_IPRED: if (ip_ov) begin
          pred_q <= ip_pred;
          rs     <= R_ADD;
        end
        R_MC: begin
          if (mc_bv[cb.blk_idx[1]]) begin
            pred_q <= mc_blk[cb.blk_idx[1]];
            rs     <= R_ADD;
          end else begin
            n_mc_wait <= n_mc_wait + 1;
          end
        end
        R_ADD: if (rf_valid) rs <= R_WB;
        R_WB: begin
          if (!db_in_ready) begin
            n_db_stall <= n_db_stall + 1;
          end else begin
            for (int r = 0; r < 4; r++)
              for (int c = 0; c < 4; c++) mbbuf[4*by + r][4*bx + c] <= recon[4*r + c];
            if (bx == 2'd3) begin
              for (int r = 0; r < 4; r++) lastcol[4*by + r] <= recon[4*r + 3];
              if (by == 2'd1) colcorner1 <= lastcol[7];
              if (by == 2'd3) corner_q <= ll_rdata1[31:24];
            end
            n_blocks <= n_blocks + 1;
            rs <= R_IDLE;
          end
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  logic [31:0] n_db_unit_stall;

  // =====================================================================
  // Deblocking
  // =====================================================================
  db_luma #(.W(W), .H(H)) u_db (
    .clk, .rst_n,
    .in_valid(rs == R_WB), .in_ready(db_in_ready), .in_blk(recon),
    .in_mb_x(cb.mb_x), .in_mb_y(cb.mb_y), .in_blk_idx(cb.blk_idx), .in_qp(cb.qp),
    .in_bs_left(cb.bs_left), .in_bs_top(cb.bs_top),
    .out_valid(dbq_valid), .out_ready(dbq_ready), .out(dbq_out),
    .n_stall(n_db_unit_stall), .n_filtered(n_db_filtered));

  // =====================================================================
  // Chroma motion compensation and side units
  // =====================================================================
  // chroma interpolator, one window per cycle, fed by the chroma memory path
  mc_chroma_interp u_cmc (
    .clk, .rst_n, .in_valid(cw_valid), .win(cw.win), .dx(cw.dx), .dy(cw.dy),
    .out_valid(cmc_out_valid), .pred(cmc_pred));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cmc_out_plane <= 1'b0;
    else if (cw_valid) cmc_out_plane <= cw.plane;
  end

  pix_t [1:0][1:0] cdb_res;

  db_chroma_edge_filter u_cdb (.lines_in(cdb_lines), .bs(cdb_bs), .qp(cdb_qp), .lines_out(cdb_res));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cdb_out <= '0;
    else        cdb_out <= cdb_res;
  end

  expgolomb_dec u_eg (
    .clk, .rst_n, .in_valid(eg_valid), .bits(eg_bits),
    .out_valid(eg_out_valid), .out_err(eg_err), .out_len(eg_len), .out_ue(eg_ue), .out_se(eg_se));

  // ADD must only start when both its operands are present
  a_add_ops: assert property (@(posedge clk) disable iff (!rst_n)
                              (rs == R_ADD && rf_valid) |-> rf_pop);
endmodule
