// tb_db_edge_filter: random 4-line edge segments (mostly smooth ones, so
// that the filter conditions are met), every boundary strength and QPs
// over the whole range; compares with the reference line filter and counts
// normal, strong and skipped edges, failing if any kind never occurred.
module tb_db_edge_filter;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  pix_t [3:0][7:0] lines_in, lines_out;
  logic [2:0] bs;
  logic [5:0] qp;
  int checks = 0, failures = 0;
  int n_normal = 0, n_strong = 0, n_unchanged = 0;

  db_edge_filter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lines_in = '0; bs = '0; qp = '0;
    for (int n = 0; n < 20000; n++) begin
      automatic int base = $urandom % 256, step = $urandom % 30, spread = 1 + $urandom % 12;
      automatic bit changed = 0;
      bs = 3'($urandom % 5);
      qp = 6'($urandom % 52);
      for (int l = 0; l < 4; l++)
        for (int k = 0; k < 8; k++) begin
          automatic int v = base + ((k >= 4) ? step : 0) + int'($urandom % spread) - spread/2;
          lines_in[l][k] = 8'(clip255(v));   // element 0 is p3
        end
      #1;
      for (int l = 0; l < 4; l++) begin
        int s [8];
        for (int k = 0; k < 8; k++) s[k] = lines_in[l][k];
        filt_line(s, bs, qp);
        for (int k = 0; k < 8; k++) begin
          if (s[k] != int'(lines_in[l][k])) changed = 1;
          if (int'(lines_out[l][k]) != s[k]) begin
            failures++;
            $display("n=%0d bs=%0d qp=%0d line %0d sample %0d got %0d exp %0d",
                     n, bs, qp, l, k, lines_out[l][k], s[k]);
            break;
          end
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
