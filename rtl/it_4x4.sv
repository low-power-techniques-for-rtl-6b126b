// it_4x4: inverse transform and quantisation of one 4x4 residual block per
// cycle. The quantised levels are pre-scaled (dequantised with the QP-
// dependent scale, d = level * v(QP%6, position) << QP/6), transformed by
// the 4x4 integer IDCT X = Ci * Y * Ci^T built from eight 1-D butterflies
// working at once (four on the rows, four on the columns, with the
// transpose as wiring), and post-scaled by (x + 32) >> 6. All of this is
// one combinational path into an output register, so a block enters every
// cycle and its residual appears one cycle later.
// Blocks with no non-zero coefficient (coded = 0) skip the arithmetic and
// give a zero residual. trunc_lsb zeroes that many LSBs of the internal
// 16-bit data, trading accuracy for switching activity; it is not H.264
// compliant and must be 0 for standard decoding.
// Design choices: coefficients arrive in raster order (index 4*row+col),
// not zig-zag; the separate DC transforms of Intra16x16 and chroma are not
// part of this unit.
module it_4x4
  import h264_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_coded,      // block has non-zero coefficients
  input  cblk4x4_t      in_level,      // quantised levels, [4*row+col]
  input  logic [5:0]    in_qp,
  input  logic [3:0]    trunc_lsb,     // 0 = exact
  output logic          out_valid,
  output logic          out_coded,
  output cblk4x4_t      out_res        // residual, [4*row+col]
);
  typedef coef_t [3:0] vec4_t;

  // one 1-D butterfly of the H.264 inverse core transform
  function automatic vec4_t bfly(input vec4_t a);
    coef_t e0, e1, e2, e3;
    vec4_t o;
    e0 = a[0] + a[2];
    e1 = a[0] - a[2];
    e2 = (a[1] >>> 1) - a[3];
    e3 = a[1] + (a[3] >>> 1);
    o[0] = e0 + e3;
    o[1] = e1 + e2;
    o[2] = e1 - e2;
    o[3] = e0 - e3;
    return o;
  endfunction

  coef_t     mask;
  cblk4x4_t  deq, hrow, res_c;
  vec4_t     rin [4], rout [4], cin [4], cout [4];

  assign mask = coef_t'(16'hFFFF << trunc_lsb);

  always_comb begin
    // pre-scaling
    for (int i = 0; i < 16; i++) begin
      deq[i] = coef_t'((in_level[i] * $signed({1'b0, levelscale(3'(in_qp % 6), 4'(i))}))
                       <<< (in_qp / 6)) & mask;
    end
    // four row butterflies
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) rin[r][c] = deq[4*r + c];
      rout[r] = bfly(rin[r]);
      for (int c = 0; c < 4; c++) hrow[4*r + c] = rout[r][c] & mask;
    end
    // transpose, four column butterflies
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) cin[c][r] = hrow[4*r + c];
      cout[c] = bfly(cin[c]);
      // post-scaling
      for (int r = 0; r < 4; r++) res_c[4*r + c] = (cout[c][r] + 16'sd32) >>> 6;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_coded <= 1'b0;
      out_res   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_coded <= in_coded;
        out_res   <= in_coded ? res_c : '0;
      end
    end
  end
endmodule
