// db_edge_filter: deblocking filter for one luma 4x4 block edge. The four
// pixel lines that cross the edge share one boundary strength, so four
// line filters run side by side and the whole edge is filtered in one
// cycle (combinational; the caller registers the result).
// Each line carries p3..p0 | q0..q3 across the edge. A line is filtered
// only when bS > 0 and |p0-q0| < alpha, |p1-p0| < beta, |q1-q0| < beta,
// so real image edges are kept. For bS < 4 the normal filter adjusts p0/q0
// by a delta clipped to +-tc (and p1/q1 where the side is smooth); for
// bS = 4 the strong filter rewrites up to three pixels per side with the
// 3-to-5-tap FIRs. The formulas are those of the H.264 standard; alpha,
// beta and tc0 come from the QP tables in h264_pkg.
// Output: the whole line comes back so the caller can write it in place;
// p3 and q3 are read but never changed by any filter, so those outputs
// equal their inputs and synthesis reduces them to wires.
module db_edge_filter
  import h264_pkg::*;
(
  input  pix_t [3:0][7:0] lines_in,   // [line][p3 p2 p1 p0 q0 q1 q2 q3]
  input  logic [2:0]      bs,         // boundary strength 0..4
  input  logic [5:0]      qp,
  output pix_t [3:0][7:0] lines_out
);
  typedef pix_t [7:0] line_t;

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction
  function automatic int clip3(input int lo, input int hi, input int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic line_t filt(input line_t l, input int alpha, input int beta,
                                 input int tc0, input logic [2:0] s);
    int p3, p2, p1, p0, q0, q1, q2, q3, ap, aq, tc, dlt;
    line_t o;
    o  = l;
    p3 = int'(l[0]); p2 = int'(l[1]); p1 = int'(l[2]); p0 = int'(l[3]);
    q0 = int'(l[4]); q1 = int'(l[5]); q2 = int'(l[6]); q3 = int'(l[7]);
    ap = iabs(p2 - p0);
    aq = iabs(q2 - q0);
    if (s != 3'd0 && iabs(p0 - q0) < alpha && iabs(p1 - p0) < beta && iabs(q1 - q0) < beta) begin
      if (s < 3'd4) begin
        tc  = tc0 + ((ap < beta) ? 1 : 0) + ((aq < beta) ? 1 : 0);
        dlt = clip3(-tc, tc, (((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
        o[3] = pix_t'(clip3(0, 255, p0 + dlt));
        o[4] = pix_t'(clip3(0, 255, q0 - dlt));
        if (ap < beta) o[2] = pix_t'(p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 1) >>> 1) - 2*p1) >>> 1));
        if (aq < beta) o[5] = pix_t'(q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 1) >>> 1) - 2*q1) >>> 1));
      end else begin
        if (ap < beta && iabs(p0 - q0) < ((alpha >>> 2) + 2)) begin
          o[3] = pix_t'((p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >>> 3);
          o[2] = pix_t'((p2 + p1 + p0 + q0 + 2) >>> 2);
          o[1] = pix_t'((2*p3 + 3*p2 + p1 + p0 + q0 + 4) >>> 3);
        end else begin
          o[3] = pix_t'((2*p1 + p0 + q1 + 2) >>> 2);
        end
        if (aq < beta && iabs(p0 - q0) < ((alpha >>> 2) + 2)) begin
          o[4] = pix_t'((p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >>> 3);
          o[5] = pix_t'((p0 + q0 + q1 + q2 + 2) >>> 2);
          o[6] = pix_t'((2*q3 + 3*q2 + q1 + q0 + p0 + 4) >>> 3);
        end else begin
          o[4] = pix_t'((2*q1 + q0 + p1 + 2) >>> 2);
        end
      end
    end
    return o;
  endfunction

  int alpha_i, beta_i, tc0_i;
  always_comb begin
    alpha_i = int'(db_alpha(qp));
    beta_i  = int'(db_beta(qp));
    tc0_i   = int'(db_tc0(qp, bs));
    for (int i = 0; i < 4; i++) lines_out[i] = filt(lines_in[i], alpha_i, beta_i, tc0_i, bs);
  end
endmodule
