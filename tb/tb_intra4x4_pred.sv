// tb_intra4x4_pred: random neighbourhoods, all nine 4x4 intra modes and all
// combinations of neighbour availability that a mode allows. The expected
// block comes from the frame-level reference in h264_ref_pkg. When the
// top-right is marked unavailable, garbage is driven on top[4..7] to check
// that the predictor substitutes p[3,-1] itself.
module tb_intra4x4_pred;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, top_avail, left_avail, tr_avail, out_valid;
  i4_mode_e mode;
  pix_t [7:0] top;
  pix_t [3:0] left;
  pix_t corner;
  blk4x4_t pred;
  int checks = 0, failures = 0;
  int mode_hits [9];

  intra4x4_pred dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; mode = I4_VERT; top = '0; left = '0; corner = '0;
    top_avail = 0; left_avail = 0; tr_avail = 0;
    set_size(16, 16, 1);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int m, p [16];
      bit ta, la, tra;
      // smooth or noisy neighbourhoods
      for (int i = 0; i < 256; i++)
        fb[i] = (n % 3 == 0) ? byte'($urandom) : byte'(100 + $urandom % 40);
      m   = $urandom % 9;
      ta  = $urandom % 4 != 0;
      la  = $urandom % 4 != 0;
      tra = ta && ($urandom % 2);
      if ((m == 0 || m == 3 || m == 7) && !ta) ta = 1;
      if ((m == 1 || m == 8) && !la) la = 1;
      if (m == 4 || m == 5 || m == 6) begin ta = 1; la = 1; end
      ref_intra(0, 4, 4, m, ta, la, tra, p);
      @(negedge clk);
      in_valid = 1; mode = i4_mode_e'(m);
      top_avail = ta; left_avail = la; tr_avail = tra;
      for (int i = 0; i < 8; i++) top[i] = (i >= 4 && !tra) ? 8'($urandom) : 8'(px(0, 4+i, 3));
      for (int j = 0; j < 4; j++) left[j] = 8'(px(0, 3, 4+j));
      corner = 8'(px(0, 3, 3));
      @(negedge clk);
      in_valid = 0;
      checks++;
      mode_hits[m]++;
      if (!out_valid) begin failures++; $display("no output n=%0d", n); end
      for (int i = 0; i < 16; i++)
        if (int'(pred[i]) != p[i]) begin
          failures++;
          $display("mode %0d ta%0d la%0d tr%0d pix %0d got %0d exp %0d", m, ta, la, tra, i, pred[i], p[i]);
          break;
        end
    end
    for (int m = 0; m < 9; m++) begin
      checks++;
      if (mode_hits[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
