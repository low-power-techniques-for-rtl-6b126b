// mc_luma_interp: luma motion-compensation interpolator (quarter-pel,
// H.264 6-tap filter). Each cycle it takes one column of 9 integer
// reference pixels (rows y-2 .. y+6 of the 4x4 block) and shifts it into a
// 6-column shift register. Every column holds 5 integer pixels (rows
// y .. y+4) and 4 vertically filtered half-pel samples (rows y+0.5 ..
// y+3.5), which 4 vertical 6-tap FIRs compute from the incoming column.
// Across the 6 columns, 9 horizontal 6-tap FIRs (5 on the integer rows, 4
// on the half-pel rows) give every half-pel sample of one output column,
// and 4 bilinear averagers then form the quarter-pel values. The result is
// one column of 4 predicted pixels.
// Timing: with a horizontal fractional MV the first output column needs 6
// input columns, so a fresh 4x4 block takes 9 column cycles; with a zero
// horizontal fraction each input column gives an output column directly
// (4 cycles). Output appears one cycle after the column that completes it.
// Holding in_first low continues the window from the previous block, so
// the next block to the right with the same integer MV needs only 4 new
// columns (horizontal data reuse).
// Design choices: the half-pel rows keep the unrounded 15-bit vertical
// filter value instead of an 8-bit pixel, so that the centre sample j is
// exact as the standard requires; the fractional MV (xf, yf, quarter
// units) comes with every column.
module mc_luma_interp
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_first,   // first column of a new window
  input  col9_t       in_col,     // rows y-2 .. y+6
  input  logic [1:0]  xf,         // horizontal quarter-pel fraction
  input  logic [1:0]  yf,         // vertical quarter-pel fraction
  output logic        out_valid,
  output col4_t       out_col     // predicted rows 0..3
);
  typedef logic signed [15:0] s16_t;
  typedef logic signed [21:0] s22_t;

  typedef struct packed {
    pix_t [4:0] g;   // integer rows y .. y+4
    s16_t [3:0] h1;  // unrounded vertical half-pel, rows y+0.5 .. y+3.5
  } column_t;

  column_t       sr [6];          // sr[0] newest (rightmost) column
  column_t       newcol;
  logic [2:0]    fill;
  logic          loaded;
  logic [1:0]    xf_q, yf_q;

  function automatic s16_t fir6(input int a, input int b, input int c,
                                input int d, input int e, input int f);
    return s16_t'(a - 5*b + 20*c + 20*d - 5*e + f);
  endfunction

  function automatic pix_t avg(input pix_t a, input pix_t b);
    return pix_t'((9'(a) + 9'(b) + 9'd1) >> 1);
  endfunction

  // 4 vertical FIRs on the incoming column
  always_comb begin
    for (int r = 0; r < 5; r++) newcol.g[r] = in_col[r+2];
    for (int r = 0; r < 4; r++)
      newcol.h1[r] = fir6(int'(in_col[r]), int'(in_col[r+1]), int'(in_col[r+2]),
                          int'(in_col[r+3]), int'(in_col[r+4]), int'(in_col[r+5]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill   <= '0;
      loaded <= 1'b0;
      xf_q   <= '0;
      yf_q   <= '0;
      for (int i = 0; i < 6; i++) sr[i] <= '0;
    end else begin
      loaded <= in_valid;
      if (in_valid) begin
        sr[0] <= newcol;
        for (int i = 1; i < 6; i++) sr[i] <= sr[i-1];
        fill <= in_first ? 3'd1 : ((fill == 3'd6) ? 3'd6 : fill + 3'd1);
        xf_q <= xf;
        yf_q <= yf;
      end
    end
  end

  // 9 horizontal FIRs and 4 bilinear filters
  column_t cur, nxt;
  pix_t [4:0] g, g1, b;
  pix_t [3:0] h, m, j;
  s22_t       j1;

  always_comb begin
    cur = (xf_q == 2'd0) ? sr[0] : sr[3];    // column x
    nxt = sr[2];                              // column x+1
    for (int r = 0; r < 5; r++) begin
      g[r]  = cur.g[r];
      g1[r] = nxt.g[r];
      b[r]  = clip_pix(20'((fir6(int'(sr[5].g[r]), int'(sr[4].g[r]), int'(sr[3].g[r]),
                                 int'(sr[2].g[r]), int'(sr[1].g[r]), int'(sr[0].g[r]))
                            + 16) >>> 5));
    end
    for (int r = 0; r < 4; r++) begin
      h[r] = clip_pix(20'((int'(cur.h1[r]) + 16) >>> 5));
      m[r] = clip_pix(20'((int'(nxt.h1[r]) + 16) >>> 5));
      j1   = s22_t'(int'(sr[5].h1[r]) - 5*int'(sr[4].h1[r]) + 20*int'(sr[3].h1[r])
                  + 20*int'(sr[2].h1[r]) - 5*int'(sr[1].h1[r]) + int'(sr[0].h1[r]));
      j[r] = clip_pix(20'((j1 + 22'sd512) >>> 10));
    end
    for (int r = 0; r < 4; r++) begin
      unique case ({yf_q, xf_q})
        4'b00_00: out_col[r] = g[r];
        4'b00_01: out_col[r] = avg(g[r], b[r]);
        4'b00_10: out_col[r] = b[r];
        4'b00_11: out_col[r] = avg(b[r], g1[r]);
        4'b01_00: out_col[r] = avg(g[r], h[r]);
        4'b01_01: out_col[r] = avg(b[r], h[r]);
        4'b01_10: out_col[r] = avg(b[r], j[r]);
        4'b01_11: out_col[r] = avg(b[r], m[r]);
        4'b10_00: out_col[r] = h[r];
        4'b10_01: out_col[r] = avg(h[r], j[r]);
        4'b10_10: out_col[r] = j[r];
        4'b10_11: out_col[r] = avg(j[r], m[r]);
        4'b11_00: out_col[r] = avg(g[r+1], h[r]);
        4'b11_01: out_col[r] = avg(h[r], b[r+1]);
        4'b11_10: out_col[r] = avg(j[r], b[r+1]);
        default:  out_col[r] = avg(m[r], b[r+1]);
      endcase
    end
  end

  assign out_valid = loaded && ((xf_q == 2'd0) ? (fill != 3'd0) : (fill == 3'd6));
endmodule
