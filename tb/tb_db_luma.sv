// tb_db_luma: a 64x48 picture (4x3 macroblocks) of blocky random content
// with random boundary strengths (0 on picture edges) and a random QP per
// macroblock. Blocks are sent macroblock by macroblock with random gaps
// and random back-pressure on the output. Each output block is placed in
// an output picture; at the end every block must have been written exactly
// once and the picture must equal the reference deblocking of the whole
// frame. Fails if input stalls, output back-pressure or filtered edges
// never occurred.
module tb_db_luma;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int W = 64, H = 48, MBW = W/16, MBH = H/16, BW = W/4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  blk4x4_t in_blk;
  logic [7:0] in_mb_x, in_mb_y;
  logic [3:0] in_blk_idx;
  logic [5:0] in_qp;
  logic [2:0] in_bs_left, in_bs_top;
  db_out_t out;
  logic [31:0] n_stall, n_filtered;
  int checks = 0, failures = 0, n_bp = 0;
  int bsl [], bst [], qpm [];
  int written [BW*H/4];
  byte unsigned outpic [W*H];

  db_luma #(.W(W), .H(H)) dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom % 4 != 0);

  always @(posedge clk)
    if (rst_n && out_valid) begin
      if (!out_ready) n_bp++;
      else begin
        written[int'(out.by)*BW + int'(out.bx)]++;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            outpic[(4*int'(out.by) + r)*W + 4*int'(out.bx) + c] = out.pix[4*r+c];
      end
    end

  initial begin
    in_valid = 0; in_blk = '0; in_mb_x = 0; in_mb_y = 0; in_blk_idx = 0; in_qp = 0;
    in_bs_left = 0; in_bs_top = 0; out_ready = 1;
    set_size(W, H, 2);
    bsl = new[BW*H/4]; bst = new[BW*H/4]; qpm = new[MBW*MBH];
    for (int by = 0; by < H/4; by++)
      for (int bx = 0; bx < BW; bx++) begin
        automatic int base = 40 + $urandom % 170;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) setpx(0, 4*bx + c, 4*by + r, base + $urandom % 6);
        bsl[by*BW + bx] = (bx == 0) ? 0 : $urandom % 5;
        bst[by*BW + bx] = (by == 0) ? 0 : $urandom % 5;
      end
    for (int i = 0; i < MBW*MBH; i++) qpm[i] = 24 + $urandom % 28;
    for (int i = 0; i < W*H; i++) fb[W*H + i] = fb[i];
    ref_deblock(1, bsl, bst, qpm);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++)
        for (int i = 0; i < 16; i++) begin
          automatic int bx = 4*mx + int'(blk_x(4'(i))), by = 4*my + int'(blk_y(4'(i)));
          @(negedge clk);
          while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1;
          in_mb_x = 8'(mx); in_mb_y = 8'(my); in_blk_idx = 4'(i);
          in_qp = 6'(qpm[my*MBW + mx]);
          in_bs_left = 3'(bsl[by*BW + bx]); in_bs_top = 3'(bst[by*BW + bx]);
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++) in_blk[4*r+c] = 8'(px(0, 4*bx + c, 4*by + r));
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
    @(negedge clk); in_valid = 0;
    repeat (400) @(posedge clk);
    for (int b = 0; b < BW*H/4; b++) begin
      checks++;
      if (written[b] != 1) begin failures++; $display("block %0d written %0d times", b, written[b]); end
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        checks++;
        if (int'(outpic[y*W + x]) != px(1, x, y)) begin
          failures++;
          if (failures < 10) $display("pixel %0d,%0d got %0d exp %0d (in %0d)", x, y, outpic[y*W+x], px(1,x,y), px(0,x,y));
        end
      end
    $display("input stalls=%0d filtered edges=%0d output backpressure=%0d", n_stall, n_filtered, n_bp);
    checks += 3;
    if (n_stall == 0) failures++;
    if (n_filtered == 0) failures++;
    if (n_bp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
