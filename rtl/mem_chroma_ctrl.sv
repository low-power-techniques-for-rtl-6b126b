// mem_chroma_ctrl: chroma memory controller on the memory clock domain. It
// owns the 32-bit port of the separate chroma frame buffer and turns chroma
// motion-compensation requests into 3x3 reference windows for the chroma
// interpolator.
// Frame buffer layout: one 32-bit word holds a 2x2 box of one chroma plane
// (byte 2*(y&1)+(x&1)). A frame is W*H/8 words: the Cb plane
// (W/2 x H/2 pixels, W*H/16 words, raster order of boxes) followed by the
// Cr plane. Word address = frame*W*H/8 + plane*W*H/16 + (y/2)*(W/4) + x/2.
// Operation: a request gives the integer chroma position (x, y) of a 2x2
// block, its eighth-pel fraction and reference slot. For each plane the
// controller reads the boxes covering pixels x..x+1 (integer dx) or
// x..x+2 (fractional dx), and likewise for rows: 1, 2 or 4 reads. Pixels
// outside the plane are clamped to the edge. Reads are pipelined, one
// address per cycle with data one cycle later; after the last word the 3x3
// window is assembled and offered on win_out (held until accepted), then
// the Cr plane is fetched. A request therefore costs 2 to 8 read cycles
// plus 4 bookkeeping cycles. For integer motion only the top-left 2x2 of
// the window is meaningful (the filter weights the rest by zero); the boxes
// that were not read are not used, the third row/column then repeats
// pixels of the first box.
// Interface: valid/ready streams; sram_* is a synchronous single-port SRAM
// with one-cycle read latency (read only: this design has no chroma
// reconstruction path that would write decoded chroma).
module mem_chroma_ctrl
  import h264_pkg::*;
#(
  parameter int unsigned W = 1280,
  parameter int unsigned H = 720,
  parameter int unsigned NFRAMES = 8,
  parameter int unsigned AW = $clog2(NFRAMES * W * H / 8)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  cmc_req_t      req,
  output logic          win_valid,
  input  logic          win_ready,
  output cmc_win_t      win_out,
  output logic          sram_en,
  output logic [AW-1:0] sram_addr,
  input  logic [31:0]   sram_rdata,
  output logic [31:0]   n_reads
);
  localparam int unsigned CW  = W / 2;        // plane width in pixels
  localparam int unsigned CH  = H / 2;
  localparam int unsigned BW  = W / 4;        // plane width in boxes
  localparam int unsigned BH  = H / 4;
  localparam int unsigned PW  = W * H / 16;   // words per plane
  localparam int unsigned FWD = W * H / 8;    // words per frame

  typedef enum logic [1:0] {S_IDLE, S_RD, S_LAST, S_OUT} state_t;
  state_t        state;
  cmc_req_t      cur;
  logic          plane;
  logic [1:0]    k;            // read index, [1] = box row, [0] = box column
  logic          cap_v;
  logic [1:0]    cap_k;
  logic [31:0]   box [4];

  function automatic logic signed [15:0] clampi(input logic signed [15:0] v,
                                                 input logic signed [15:0] hi);
    return (v < 0) ? 16'sd0 : (v > hi) ? hi : v;
  endfunction

  // box-grid origin and extent of the current request
  logic signed [15:0] bx0, by0, bxk, byk;
  logic               two_c, two_r, last_k;

  always_comb begin
    bx0   = cur.x_int >>> 1;
    by0   = cur.y_int >>> 1;
    // a second box column/row is needed when the window crosses a box edge
    two_c = cur.x_int[0] || (cur.dx != 3'd0);
    two_r = cur.y_int[0] || (cur.dy != 3'd0);
    bxk   = clampi(bx0 + 16'(k[0]), 16'(BW - 1));
    byk   = clampi(by0 + 16'(k[1]), 16'(BH - 1));
    last_k = (k[0] || !two_c) && (k[1] || !two_r);
  end

  // window assembly from the fetched boxes
  pix_t [8:0] win;
  always_comb begin
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        automatic logic signed [15:0] px = clampi(cur.x_int + 16'(c), 16'(CW - 1));
        automatic logic signed [15:0] py = clampi(cur.y_int + 16'(r), 16'(CH - 1));
        automatic logic j = two_c && ((px >>> 1) != clampi(bx0, 16'(BW - 1)));
        automatic logic i = two_r && ((py >>> 1) != clampi(by0, 16'(BH - 1)));
        automatic logic [1:0] b = {py[0], px[0]};
        win[3*r+c] = box[{i, j}][8*b +: 8];
      end
    end
  end

  assign req_ready = (state == S_IDLE);
  assign sram_en   = (state == S_RD);
  assign sram_addr = AW'(32'(cur.ref_idx) * FWD + 32'(plane) * PW +
                         32'(byk) * BW + 32'(bxk));
  assign win_valid = (state == S_OUT);
  assign win_out   = '{plane: plane, dx: cur.dx, dy: cur.dy, win: win};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cur     <= '0;
      plane   <= 1'b0;
      k       <= '0;
      cap_v   <= 1'b0;
      cap_k   <= '0;
      n_reads <= '0;
      for (int q = 0; q < 4; q++) box[q] <= '0;
    end else begin
      cap_v <= sram_en;
      cap_k <= k;
      if (cap_v) box[cap_k] <= sram_rdata;
      if (sram_en) n_reads <= n_reads + 32'd1;
      unique case (state)
        S_IDLE: if (req_valid) begin
          cur   <= req;
          plane <= 1'b0;
          k     <= '0;
          state <= S_RD;
        end
        S_RD: begin
          if (last_k) state <= S_LAST;
          else if (!k[0] && two_c) k <= {k[1], 1'b1};
          else k <= {1'b1, 1'b0};
        end
        S_LAST: state <= S_OUT;   // last word captured this cycle
        S_OUT: if (win_ready) begin
          k <= '0;
          if (!plane) begin
            plane <= 1'b1;
            state <= S_RD;
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
