// tb_mc_luma_interp: random reference frame, random block positions and
// all 16 quarter-pel fractions. Columns of 9 reference pixels are fed with
// random idle cycles in between: 9 columns for a fresh block with a
// horizontal fraction, 4 columns when the block continues the previous
// window (horizontal reuse) or has no horizontal fraction. Every output
// column is compared with the frame-level reference interpolation.
module tb_mc_luma_interp;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_first, out_valid;
  col9_t in_col;
  logic [1:0] xf, yf;
  col4_t out_col;
  int checks = 0, failures = 0;
  int n_reuse = 0, n_fresh = 0, n_int = 0;
  int exp_q [$];

  mc_luma_interp dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare every output column with the next expected one
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() < 4) begin failures++; $display("unexpected output"); end
      else
        for (int r = 0; r < 4; r++) begin
          automatic int e = exp_q.pop_front();
          if (int'(out_col[r]) != e) begin
            failures++;
            $display("row %0d got %0d exp %0d", r, out_col[r], e);
          end
        end
    end
  end

  task automatic send(int x, int y0, bit first, int fx, int fy);
    while ($urandom % 4 == 0) begin
      @(posedge clk); #1; in_valid = 0;
    end
    @(posedge clk); #1;
    in_valid = 1; in_first = first; xf = 2'(fx); yf = 2'(fy);
    for (int r = 0; r < 9; r++) in_col[r] = 8'(px(0, x, y0 - 2 + r));
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_col = '0; xf = 0; yf = 0;
    set_size(64, 32, 1);
    for (int i = 0; i < 64*32; i++) fb[i] = byte'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      automatic int x0 = 2 + $urandom % 40, y0 = $urandom % 28, fx = $urandom % 4, fy = $urandom % 4;
      automatic int nblk = 1 + $urandom % 3;
      for (int k = 0; k < nblk; k++) begin
        automatic int xb = x0 + 4*k;
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++) exp_q.push_back(luma_q(0, xb + c, y0 + r, fx, fy));
        if (fx == 0) begin
          n_int++;
          for (int c = 0; c < 4; c++) send(xb + c, y0, c == 0, fx, fy);
        end else if (k == 0) begin
          n_fresh++;
          for (int c = 0; c < 9; c++) send(xb - 2 + c, y0, c == 0, fx, fy);
        end else begin
          n_reuse++;
          for (int c = 0; c < 4; c++) send(xb + 3 + c, y0, 0, fx, fy);
        end
      end
    end
    @(posedge clk); #1; in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("fresh=%0d reuse=%0d integer=%0d", n_fresh, n_reuse, n_int);
    checks += 2;
    if (n_reuse == 0) failures++;
    if (n_int == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
