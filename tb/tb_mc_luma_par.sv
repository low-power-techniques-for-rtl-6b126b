// tb_mc_luma_par: two independent random column streams (fresh, continued
// and integer-MV blocks) into the two interpolators, with random gaps on
// the inputs and random back-pressure on the block outputs. Each output
// block is compared with the frame-level reference interpolation; the
// test fails if no column ever stalled on a full output FIFO or if both
// interpolators never held a block at the same time.
module tb_mc_luma_par;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] col_valid, col_ready, blk_valid, blk_ready;
  mc_col_t [N-1:0] col_in;
  blk4x4_t [N-1:0] blk_out;
  logic [31:0] n_stall;
  int checks = 0, failures = 0, n_both = 0;
  int exp_q [N][$];
  bit done [N];

  mc_luma_par dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) blk_ready = 2'($urandom % 3 == 0 ? $urandom : 3);

  always @(posedge clk) begin
    if (rst_n) begin
      if (&blk_valid) n_both++;
      for (int s = 0; s < N; s++)
        if (blk_valid[s] && blk_ready[s]) begin
          checks++;
          for (int c = 0; c < 4; c++)
            for (int r = 0; r < 4; r++) begin
              automatic int e = exp_q[s].pop_front();
              if (int'(blk_out[s][4*r+c]) != e) begin
                failures++; $display("mc%0d r%0d c%0d got %0d exp %0d", s, r, c, blk_out[s][4*r+c], e);
              end
            end
        end
    end
  end

  task automatic send(int s, int x, int y0, bit first, int fx, int fy);
    @(negedge clk);
    while ($urandom % 3 == 0) begin col_valid[s] = 0; @(negedge clk); end
    col_valid[s] = 1;
    col_in[s].first = first; col_in[s].xf = 2'(fx); col_in[s].yf = 2'(fy);
    for (int r = 0; r < 9; r++) col_in[s].col[r] = 8'(px(0, x, y0 - 2 + r));
    @(posedge clk);
    while (!col_ready[s]) @(posedge clk);
  endtask

  task automatic stream(int s);
    for (int n = 0; n < 300; n++) begin
      automatic int x0 = 2 + $urandom % 40, y0 = $urandom % 28, fx = $urandom % 4, fy = $urandom % 4;
      automatic int nblk = 1 + $urandom % 3;
      for (int k = 0; k < nblk; k++) begin
        automatic int xb = x0 + 4*k;
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++) exp_q[s].push_back(luma_q(0, xb + c, y0 + r, fx, fy));
        if (fx == 0)      for (int c = 0; c < 4; c++) send(s, xb + c, y0, c == 0, fx, fy);
        else if (k == 0)  for (int c = 0; c < 9; c++) send(s, xb - 2 + c, y0, c == 0, fx, fy);
        else              for (int c = 0; c < 4; c++) send(s, xb + 3 + c, y0, 0, fx, fy);
      end
    end
    @(negedge clk); col_valid[s] = 0;
  endtask

  initial begin
    col_valid = '0; col_in = '0; blk_ready = '1;
    set_size(64, 32, 1);
    for (int i = 0; i < 64*32; i++) fb[i] = byte'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      stream(0);
      stream(1);
    join
    repeat (20) @(posedge clk);
    for (int s = 0; s < N; s++) begin
      checks++;
      if (exp_q[s].size() != 0) begin failures++; $display("mc%0d: %0d pixels missing", s, exp_q[s].size()); end
    end
    $display("stall cycles=%0d both busy=%0d", n_stall, n_both);
    checks += 2;
    if (n_stall == 0) failures++;
    if (n_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
