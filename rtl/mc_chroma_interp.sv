// mc_chroma_interp: chroma motion-compensation interpolator. A 2x2 chroma
// block is predicted from a 3x3 window of integer reference pixels with
// the eighth-pel bilinear filter
//   pred = ((8-dx)(8-dy)TL + dx(8-dy)TR + (8-dx)dy BL + dx dy BR + 32) >> 6.
// The filter is replicated four times, one per output pixel, so a 2x2
// block is produced every cycle; each copy uses four 8-bit multipliers and
// an adder tree. With dx = dy = 0 the window's top-left 2x2 passes through.
// Output is registered: one cycle latency, one block per cycle.
module mc_chroma_interp
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  pix_t [8:0]  win,      // 3x3 window, [3*row+col]
  input  logic [2:0]  dx,
  input  logic [2:0]  dy,
  output logic        out_valid,
  output pix_t [3:0]  pred      // 2x2 block, [2*row+col]
);
  logic [6:0] wa, wb, wc, wd, ex, ey, nx, ny;
  pix_t [3:0] p;

  always_comb begin
    ex = {4'd0, dx};
    ey = {4'd0, dy};
    nx = 7'd8 - ex;
    ny = 7'd8 - ey;
    wa = nx * ny;
    wb = ex * ny;
    wc = nx * ey;
    wd = ex * ey;
    for (int r = 0; r < 2; r++) begin
      for (int c = 0; c < 2; c++) begin
        p[2*r+c] = pix_t'((15'(wa) * 15'(win[3*r+c])   + 15'(wb) * 15'(win[3*r+c+1]) +
                           15'(wc) * 15'(win[3*r+c+3]) + 15'(wd) * 15'(win[3*r+c+4]) +
                           15'd32) >> 6);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pred      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) pred <= p;
    end
  end
endmodule
