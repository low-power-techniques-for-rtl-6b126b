// intra4x4_pred: luma 4x4 intra (spatial) predictor. All sixteen pixels of
// a block are produced in one cycle by parallel 2- and 3-tap filters over
// the 13 neighbouring pixels: left column p[-1,0..3], corner p[-1,-1] and
// the top row p[0..7,-1] (top and top-right). All nine H.264 modes are
// supported (vertical, horizontal, DC, diagonal-down-left/right,
// vertical-right/left, horizontal-down/up). The formulas are those of the
// H.264 standard; the decoder description gives the diagonal-down-right
// case and the one-cycle, all-filters-in-parallel structure, the other
// eight modes are filled in from the standard. Common terms between the
// filters are left to synthesis.
// Unavailable top-right pixels are replaced by p[3,-1]; DC uses the
// available edges, or 128 when none is. The output is registered: one
// cycle of latency, one block per cycle.
module intra4x4_pred
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  i4_mode_e    mode,
  input  pix_t [7:0]  top,        // p[0..7,-1]
  input  pix_t [3:0]  left,       // p[-1,0..3]
  input  pix_t        corner,     // p[-1,-1]
  input  logic        top_avail,
  input  logic        left_avail,
  input  logic        tr_avail,   // top-right p[4..7,-1] available
  output logic        out_valid,
  output blk4x4_t     pred
);
  pix_t [7:0] t;

  always_comb begin
    for (int i = 0; i < 8; i++) t[i] = (i >= 4 && !tr_avail) ? top[3] : top[i];
  end

  // p[i,-1] for i = -1..7
  function automatic int pt(input int i);
    return (i < 0) ? int'(corner) : int'(t[i]);
  endfunction
  // p[-1,j] for j = -1..3
  function automatic int pl(input int j);
    return (j < 0) ? int'(corner) : int'(left[j]);
  endfunction

  function automatic pix_t f3(input int a, input int b, input int c);
    return pix_t'((a + 2*b + c + 2) >> 2);
  endfunction
  function automatic pix_t f2(input int a, input int b);
    return pix_t'((a + b + 1) >> 1);
  endfunction

  blk4x4_t p;
  int      sum_t, sum_l, z;
  pix_t    dc;

  always_comb begin
    sum_t = 0;
    sum_l = 0;
    for (int i = 0; i < 4; i++) begin
      sum_t += int'(t[i]);
      sum_l += int'(left[i]);
    end
    if (top_avail && left_avail) dc = pix_t'((sum_t + sum_l + 4) >> 3);
    else if (top_avail)          dc = pix_t'((sum_t + 2) >> 2);
    else if (left_avail)         dc = pix_t'((sum_l + 2) >> 2);
    else                         dc = 8'd128;

    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < 4; x++) begin
        p[4*y+x] = dc;
        z = 0;
        case (mode)
          I4_VERT: p[4*y+x] = t[x];
          I4_HOR:  p[4*y+x] = left[y];
          I4_DC:   p[4*y+x] = dc;
          I4_DDL:  p[4*y+x] = (x == 3 && y == 3) ? f3(pt(6), pt(7), pt(7))
                                                 : f3(pt(x+y), pt(x+y+1), pt(x+y+2));
          I4_DDR: begin
            if (x > y)      p[4*y+x] = f3(pt(x-y-2), pt(x-y-1), pt(x-y));
            else if (x < y) p[4*y+x] = f3(pl(y-x-2), pl(y-x-1), pl(y-x));
            else            p[4*y+x] = f3(pt(0), pt(-1), pl(0));
          end
          I4_VR: begin
            z = 2*x - y;
            if (z >= 0 && z % 2 == 0)  p[4*y+x] = f2(pt(x-(y>>1)-1), pt(x-(y>>1)));
            else if (z > 0)            p[4*y+x] = f3(pt(x-(y>>1)-2), pt(x-(y>>1)-1), pt(x-(y>>1)));
            else if (z == -1)          p[4*y+x] = f3(pl(0), pl(-1), pt(0));
            else                       p[4*y+x] = f3(pl(y-1), pl(y-2), pl(y-3));
          end
          I4_HD: begin
            z = 2*y - x;
            if (z >= 0 && z % 2 == 0)  p[4*y+x] = f2(pl(y-(x>>1)-1), pl(y-(x>>1)));
            else if (z > 0)            p[4*y+x] = f3(pl(y-(x>>1)-2), pl(y-(x>>1)-1), pl(y-(x>>1)));
            else if (z == -1)          p[4*y+x] = f3(pl(0), pl(-1), pt(0));
            else                       p[4*y+x] = f3(pt(x-1), pt(x-2), pt(x-3));
          end
          I4_VL: begin
            if (y % 2 == 0) p[4*y+x] = f2(pt(x+(y>>1)), pt(x+(y>>1)+1));
            else            p[4*y+x] = f3(pt(x+(y>>1)), pt(x+(y>>1)+1), pt(x+(y>>1)+2));
          end
          I4_HU: begin
            z = x + 2*y;
            if (z > 5)             p[4*y+x] = left[3];
            else if (z == 5)       p[4*y+x] = f3(pl(2), pl(3), pl(3));
            else if (z % 2 == 0)   p[4*y+x] = f2(pl(y+(x>>1)), pl(y+(x>>1)+1));
            else                   p[4*y+x] = f3(pl(y+(x>>1)), pl(y+(x>>1)+1), pl(y+(x>>1)+2));
          end
          default: p[4*y+x] = dc;
        endcase
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
