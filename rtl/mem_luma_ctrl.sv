// mem_luma_ctrl: luma memory controller (MEM) on its own clock domain. It
// owns the 32-bit port of the off-chip luma frame buffer and serves two
// clients: deblocked 4x4 blocks to be written, and motion-compensation
// reads.
// Frame buffer layout: one 32-bit word holds a vertical column of 4 pixels
// (byte k = row 4*wy+k), word address = frame*W*H/4 + wy*W + x. A 4x4 block
// is therefore 4 writes to consecutive addresses, and a column of 9 pixels
// needed by the luma interpolator is at most three reads.
// MC reads: for each request (integer reference position, quarter-pel
// fraction, reference slot, target interpolator) it fetches the columns
// x-2..x+6 (9 columns) when the horizontal fraction is non-zero, else
// x..x+3, and rows y-2..y+6 when the vertical fraction is non-zero, else
// only the words holding rows y..y+3. Positions outside the frame are
// clamped to the edge, as H.264 requires. When a request continues the
// window of the previous request of the same interpolator (same rows, x
// advanced by 4, both with horizontal fractions) only the 4 new columns
// are fetched and the interpolator keeps its shift register (reuse of the
// horizontal overlap). A 4x4 block thus costs 4 to 27 read cycles plus 4
// write cycles. Reads are pipelined: one address per cycle, data one cycle
// later; columns go through a 3-entry skid FIFO to one of two column
// outputs. Writes are served between MC requests and take priority.
// Interface: valid/ready streams; sram_* is a synchronous single-port
// SRAM with one-cycle read latency. cur_frame selects the frame written.
module mem_luma_ctrl
  import h264_pkg::*;
#(
  parameter int unsigned W = 1280,
  parameter int unsigned H = 720,
  parameter int unsigned NFRAMES = 8,
  parameter int unsigned AW = $clog2(NFRAMES * W * H / 4)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    cur_frame,
  // deblocked blocks to write
  input  logic          wr_valid,
  output logic          wr_ready,
  input  db_out_t       wr_blk,
  // MC read requests
  input  logic          req_valid,
  output logic          req_ready,
  input  mc_req_t       req,
  // columns to interpolator 0 / 1
  output logic [1:0]    col_valid,
  input  logic [1:0]    col_ready,
  output mc_col_t       col_out,
  // off-chip SRAM port
  output logic          sram_en,
  output logic          sram_we,
  output logic [AW-1:0] sram_addr,
  output logic [31:0]   sram_wdata,
  input  logic [31:0]   sram_rdata,
  // activity counters
  output logic [31:0]   n_reads,
  output logic [31:0]   n_writes,
  output logic [31:0]   n_reuse
);
  localparam int unsigned FW = W * H / 4;   // words per frame
  localparam int unsigned HW = H / 4;       // word rows per frame

  typedef enum logic [1:0] {S_IDLE, S_WR, S_RD} state_e;
  state_e state;

  // ---------------- request bookkeeping ----------------
  mc_req_t            cur;
  logic [3:0]         ncol, col_i;        // columns in this request
  logic [1:0]         nw, k;              // words per column, word index
  logic signed [15:0] x0;                 // first column position
  logic signed [15:0] wy0;                // first word row (unclamped)
  logic signed [15:0] ytop;               // first row of the 9-row column
  logic               cont_q;

  // last request per interpolator, for window continuation
  logic [1:0]         last_v;
  mc_req_t            last_r [2];

  logic               cont;
  logic [1:0]         wcnt;

  always_comb begin
    cont = last_v[req.sel] && (req.xf != 2'd0) && (last_r[req.sel].xf != 2'd0) &&
           ((req.yf != 2'd0) == (last_r[req.sel].yf != 2'd0)) &&
           (req.y_int == last_r[req.sel].y_int) &&
           (req.ref_idx == last_r[req.sel].ref_idx) &&
           (req.x_int == last_r[req.sel].x_int + 16'sd4);
  end

  function automatic logic signed [15:0] clampi(input logic signed [15:0] v,
                                                 input int unsigned hi);
    return (v < 0) ? 16'sd0 : (v > $signed(16'(hi))) ? $signed(16'(hi)) : v;
  endfunction

  // ---------------- skid FIFO of finished columns ----------------
  localparam int unsigned COLW = $bits(mc_col_t) + 1;
  logic            sk_push, sk_valid, sk_pop;
  logic [COLW-1:0] sk_in, sk_out;
  logic [1:0]      sk_count;
  logic            sk_in_ready;
  logic [1:0]      inflight;

  sync_fifo #(.WIDTH(COLW), .DEPTH(3)) u_skid (
    .clk, .rst_n,
    .in_valid(sk_push), .in_ready(sk_in_ready), .in_data(sk_in),
    .out_valid(sk_valid), .out_ready(sk_pop), .out_data(sk_out),
    .count(sk_count));

  assign col_out      = sk_out[COLW-2:0];
  assign col_valid[0] = sk_valid && !sk_out[COLW-1];
  assign col_valid[1] = sk_valid &&  sk_out[COLW-1];
  assign sk_pop       = sk_valid && col_ready[sk_out[COLW-1]];

  // ---------------- read issue / capture ----------------
  logic        issue, issue_first;
  logic        cap_v, cap_last;
  logic [1:0]  cap_k;
  logic        cap_first;
  logic [31:0] wbuf [3];
  logic signed [15:0] xcol;
  col9_t       asm_col;
  logic [31:0] words [3];

  assign issue_first = (state == S_RD) && (k == 2'd0) &&
                       ({1'b0, sk_count} + {1'b0, inflight} < 3'd3);
  assign issue       = (state == S_RD) && ((k != 2'd0) || issue_first);
  assign xcol        = clampi(x0 + 16'(col_i), W - 1);

  // assemble a column from the captured words, rows clamped to the frame
  always_comb begin
    for (int i = 0; i < 3; i++) words[i] = wbuf[i];
    words[cap_k] = sram_rdata;
    for (int r = 0; r < 9; r++) begin
      logic signed [15:0] yr, wi;
      yr = clampi(ytop + 16'(r), H - 1);
      wi = (yr >>> 2) - clampi(wy0, HW - 1);
      asm_col[r] = (wi >= 0 && wi < 3) ? words[wi[1:0]][8*yr[1:0] +: 8] : 8'd0;
    end
  end

  assign sk_push = cap_v && cap_last;
  assign sk_in   = {cur.sel, cap_first, cur.xf, cur.yf, asm_col};

  // ---------------- SRAM port ----------------
  always_comb begin
    sram_en    = 1'b0;
    sram_we    = 1'b0;
    sram_addr  = '0;
    sram_wdata = '0;
    if (state == S_WR) begin
      sram_en    = 1'b1;
      sram_we    = 1'b1;
      sram_addr  = AW'(FW * cur_frame + wr_blk.by * W + wr_blk.bx * 4 + wcnt);
      for (int r = 0; r < 4; r++) sram_wdata[8*r +: 8] = wr_blk.pix[4*r + wcnt];
    end else if (issue) begin
      sram_en   = 1'b1;
      sram_addr = AW'(FW * cur.ref_idx +
                      32'(clampi(clampi(wy0, HW - 1) + 16'(k), HW - 1)) * W + 32'(xcol));
    end
  end

  assign wr_ready  = (state == S_WR) && (wcnt == 2'd3);
  assign req_ready = (state == S_IDLE) && !wr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '0;
      ncol     <= '0;
      col_i    <= '0;
      nw       <= '0;
      k        <= '0;
      x0       <= '0;
      wy0      <= '0;
      ytop     <= '0;
      cont_q   <= 1'b0;
      last_v   <= '0;
      last_r[0] <= '0;
      last_r[1] <= '0;
      wcnt     <= '0;
      cap_v    <= 1'b0;
      cap_last <= 1'b0;
      cap_k    <= '0;
      cap_first <= 1'b0;
      inflight <= '0;
      n_reads  <= '0;
      n_writes <= '0;
      n_reuse  <= '0;
      for (int i = 0; i < 3; i++) wbuf[i] <= '0;
    end else begin
      // capture stage
      cap_v <= issue;
      cap_k <= k;
      cap_last  <= issue && (k == nw - 2'd1);
      cap_first <= !cont_q && (col_i == 4'd0);
      if (cap_v) wbuf[cap_k] <= sram_rdata;
      if (issue) n_reads <= n_reads + 1;
      inflight <= inflight + 2'(issue_first) - 2'(sk_push);

      case (state)
        S_IDLE: begin
          if (wr_valid) begin
            state <= S_WR;
            wcnt  <= '0;
          end else if (req_valid) begin
            state  <= S_RD;
            cur    <= req;
            cont_q <= cont;
            col_i  <= '0;
            k      <= '0;
            last_v[req.sel] <= 1'b1;
            last_r[req.sel] <= req;
            if (cont) begin
              ncol <= 4'd4;
              x0   <= req.x_int + 16'sd3;
              n_reuse <= n_reuse + 1;
            end else if (req.xf != 2'd0) begin
              ncol <= 4'd9;
              x0   <= req.x_int - 16'sd2;
            end else begin
              ncol <= 4'd4;
              x0   <= req.x_int;
            end
            ytop <= req.y_int - 16'sd2;
            if (req.yf != 2'd0) begin
              wy0 <= (req.y_int - 16'sd2) >>> 2;
              nw  <= 2'(((req.y_int + 16'sd6) >>> 2) - ((req.y_int - 16'sd2) >>> 2) + 16'sd1);
            end else begin
              wy0 <= req.y_int >>> 2;
              nw  <= 2'(((req.y_int + 16'sd3) >>> 2) - (req.y_int >>> 2) + 16'sd1);
            end
          end
        end
        S_WR: begin
          n_writes <= n_writes + 1;
          wcnt <= wcnt + 2'd1;
          if (wcnt == 2'd3) state <= S_IDLE;
        end
        S_RD: begin
          if (issue) begin
            if (k == nw - 2'd1) begin
              k <= '0;
              col_i <= col_i + 4'd1;
              if (col_i == ncol - 4'd1) state <= S_IDLE;
            end else begin
              k <= k + 2'd1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
