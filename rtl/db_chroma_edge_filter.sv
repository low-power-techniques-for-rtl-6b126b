// db_chroma_edge_filter: deblocking of one chroma edge segment. Two line
// filters run side by side, as in the deblocking unit's chroma datapath,
// so the two pixel lines that cross a 2x2 chroma block edge are filtered
// in one cycle, at the same time as the luma edge filter.
// Each line carries p1 p0 | q0 q1. A line is filtered only when bS > 0 and
// |p0-q0| < alpha, |p1-p0| < beta, |q1-q0| < beta. Chroma filtering only
// ever changes p0 and q0: for bS < 4 by a delta clipped to +-(tc0 + 1),
// for bS = 4 with the 3-tap average (2*p1 + p0 + q1 + 2) >> 2 (and the
// mirror for q0). The formulas and the alpha/beta/tc0 tables are those of
// the H.264 standard; qp is the chroma QP (the luma-to-chroma QP mapping
// belongs to the parameter decoder).
// Interface: combinational, lines_out holds the new p0 and q0 of each
// line; p1 and q1 never change and are not repeated at the output.
module db_chroma_edge_filter
  import h264_pkg::*;
(
  input  pix_t [1:0][3:0] lines_in,   // [line][p1 p0 q0 q1]
  input  logic [2:0]      bs,         // boundary strength 0..4
  input  logic [5:0]      qp,         // chroma QP
  output pix_t [1:0][1:0] lines_out   // [line][p0' q0']
);
  typedef pix_t [3:0] cline_t;
  typedef pix_t [1:0] cout_t;

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction
  function automatic int clip3(input int lo, input int hi, input int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic cout_t filt(input cline_t l, input int alpha, input int beta,
                                 input int tc0, input logic [2:0] s);
    int p1, p0, q0, q1, tc, dlt;
    cout_t o;
    p1 = int'(l[0]); p0 = int'(l[1]); q0 = int'(l[2]); q1 = int'(l[3]);
    o[0] = l[1];
    o[1] = l[2];
    if (s != 3'd0 && iabs(p0 - q0) < alpha && iabs(p1 - p0) < beta && iabs(q1 - q0) < beta) begin
      if (s != 3'd4) begin
        tc   = tc0 + 1;
        dlt  = clip3(-tc, tc, (((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
        o[0] = pix_t'(clip3(0, 255, p0 + dlt));
        o[1] = pix_t'(clip3(0, 255, q0 - dlt));
      end else begin
        o[0] = pix_t'((2*p1 + p0 + q1 + 2) >>> 2);
        o[1] = pix_t'((2*q1 + q0 + p1 + 2) >>> 2);
      end
    end
    return o;
  endfunction

  int alpha_i, beta_i, tc0_i;
  always_comb begin
    alpha_i = int'(db_alpha(qp));
    beta_i  = int'(db_beta(qp));
    tc0_i   = int'(db_tc0(qp, bs));
    for (int i = 0; i < 2; i++) lines_out[i] = filt(lines_in[i], alpha_i, beta_i, tc0_i, bs);
  end
endmodule
