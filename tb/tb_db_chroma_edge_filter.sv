// tb_db_chroma_edge_filter: random two-line chroma edge segments (mostly
// smooth so that the filter conditions hold), every boundary strength and
// the whole QP range; compares p0'/q0' with the chroma rules of the
// standard written here and fails if normal, strong or skipped edges never
// occurred.
module tb_db_chroma_edge_filter;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  pix_t [1:0][3:0] lines_in;
  pix_t [1:0][1:0] lines_out;
  logic [2:0] bs;
  logic [5:0] qp;
  int checks = 0, failures = 0;
  int n_normal = 0, n_strong = 0, n_unchanged = 0;

  db_chroma_edge_filter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_chroma(input int p1, input int p0, input int q0, input int q1,
                                     input int s, input int q, output int np0, output int nq0);
    int al = alpha_of(q), be = beta_of(q);
    np0 = p0; nq0 = q0;
    if (s == 0) return;
    if (!((p0 > q0 ? p0 - q0 : q0 - p0) < al && (p1 > p0 ? p1 - p0 : p0 - p1) < be &&
          (q1 > q0 ? q1 - q0 : q0 - q1) < be)) return;
    if (s < 4) begin
      int tc = tc0_of(q, s) + 1;
      int d = clampi((((q0 - p0) << 2) + (p1 - q1) + 4) >>> 3, -tc, tc);
      np0 = clip255(p0 + d); nq0 = clip255(q0 - d);
    end else begin
      np0 = (2*p1 + p0 + q1 + 2) >> 2;
      nq0 = (2*q1 + q0 + p1 + 2) >> 2;
    end
  endfunction

  initial begin
    lines_in = '0; bs = '0; qp = '0;
    for (int n = 0; n < 20000; n++) begin
      automatic int base = $urandom % 256, step = $urandom % 24, spread = 1 + $urandom % 10;
      automatic bit changed = 0;
      bs = 3'($urandom % 5);
      qp = 6'($urandom % 52);
      for (int l = 0; l < 2; l++)
        for (int k = 0; k < 4; k++) begin
          automatic int v = base + ((k >= 2) ? step : 0) + int'($urandom % spread) - spread/2;
          lines_in[l][k] = 8'(clip255(v));
        end
      #1;
      for (int l = 0; l < 2; l++) begin
        int np0, nq0;
        ref_chroma(lines_in[l][0], lines_in[l][1], lines_in[l][2], lines_in[l][3], bs, qp, np0, nq0);
        if (np0 != int'(lines_in[l][1]) || nq0 != int'(lines_in[l][2])) changed = 1;
        if (int'(lines_out[l][0]) != np0 || int'(lines_out[l][1]) != nq0) begin
          failures++;
          $display("n=%0d bs=%0d qp=%0d line %0d got %0d %0d exp %0d %0d", n, bs, qp, l,
                   lines_out[l][0], lines_out[l][1], np0, nq0);
        end
      end
      checks++;
      if (!changed) n_unchanged++;
      else if (bs == 4) n_strong++;
      else n_normal++;
    end
    $display("normal=%0d strong=%0d unchanged=%0d", n_normal, n_strong, n_unchanged);
    checks += 3;
    if (n_normal == 0) failures++;
    if (n_strong == 0) failures++;
    if (n_unchanged == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
