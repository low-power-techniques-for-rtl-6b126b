// tb_mem_chroma_ctrl: tests the chroma memory controller on a 64x32 picture
// (32x16 chroma planes) with two frame slots. The SRAM model is loaded
// with random Cb/Cr planes in the 2x2-box layout. Random requests (inside
// the picture, on and beyond its edges, integer and fractional fractions,
// both reference slots) are sent with random gaps, and the window output is
// back-pressured at random. Each request must give two windows (Cb, then
// Cr) whose used pixels equal the edge-clamped reference pixels, and the
// controller must read exactly the 1, 2 or 4 boxes the window needs.
// Counts of 1-, 2- and 4-read windows, clamped windows and back-pressure
// cycles must all be non-zero.
module tb_mem_chroma_ctrl;
  import h264_pkg::*;
  localparam int W = 64, H = 32, NF = 2;
  localparam int AW = $clog2(NF * W * H / 8);
  localparam int NREQ = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, win_valid, win_ready, sram_en;
  cmc_req_t req;
  cmc_win_t win_out;
  logic [AW-1:0] sram_addr;
  logic [31:0] sram_rdata, n_reads;

  mem_chroma_ctrl #(.W(W), .H(H), .NFRAMES(NF)) dut (.*);

  logic [31:0] sram [NF*W*H/8];
  always @(posedge clk) if (sram_en) sram_rdata <= sram[sram_addr];

  byte unsigned pic [NF][2][H/2][W/2];
  int checks = 0, failures = 0;
  int n_r1 = 0, n_r2 = 0, n_r4 = 0, n_clamp = 0, n_bp = 0;
  cmc_req_t sent [$];
  int exp_reads = 0;

  initial begin
    #(5_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cl(int v, int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  // requests
  initial begin
    req_valid = 0; req = '0;
    for (int f = 0; f < NF; f++)
      for (int pl = 0; pl < 2; pl++)
        for (int y = 0; y < H/2; y++)
          for (int x = 0; x < W/2; x++) begin
            pic[f][pl][y][x] = 8'($urandom);
            sram[f*W*H/8 + pl*W*H/16 + (y/2)*(W/4) + x/2][8*(2*(y%2) + x%2) +: 8] = pic[f][pl][y][x];
          end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NREQ; n++) begin
      automatic cmc_req_t r;
      r.x_int = 16'($signed($urandom % (W/2 + 12)) - 6);
      r.y_int = 16'($signed($urandom % (H/2 + 12)) - 6);
      r.dx = ($urandom % 3 == 0) ? 3'd0 : 3'($urandom);
      r.dy = ($urandom % 3 == 0) ? 3'd0 : 3'($urandom);
      r.ref_idx = 3'($urandom % NF);
      @(negedge clk);
      while ($urandom % 4 == 0) begin req_valid = 0; @(negedge clk); end
      req_valid = 1; req = r;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      sent.push_back(r);
      @(negedge clk);
      req_valid = 0;
    end
  end

  // windows
  initial begin
    static int got = 0;
    win_ready = 0;
    while (got < 2 * NREQ) begin
      @(negedge clk);
      win_ready = ($urandom % 3 != 0);
      @(posedge clk);
      if (win_valid && !win_ready) n_bp++;
      if (win_valid && win_ready) begin
        automatic cmc_req_t r = sent[0];
        automatic int pl = got % 2;
        automatic int nc = ((int'(r.x_int) + ((r.dx != 0) ? 2 : 1)) >>> 1) - (int'(r.x_int) >>> 1) + 1;
        automatic int nr = ((int'(r.y_int) + ((r.dy != 0) ? 2 : 1)) >>> 1) - (int'(r.y_int) >>> 1) + 1;
        automatic bit bad = 0;
        checks++;
        exp_reads += nc * nr;
        if (nc * nr == 1) n_r1++; else if (nc * nr == 2) n_r2++; else n_r4++;
        if (int'(r.x_int) < 0 || int'(r.y_int) < 0 || int'(r.x_int) > W/2 - 3 || int'(r.y_int) > H/2 - 3) n_clamp++;
        if (win_out.plane != 1'(pl) || win_out.dx != r.dx || win_out.dy != r.dy) bad = 1;
        for (int y = 0; y < 3; y++)
          for (int x = 0; x < 3; x++)
            if ((x < 2 || r.dx != 0) && (y < 2 || r.dy != 0) &&
                win_out.win[3*y+x] != pic[int'(r.ref_idx)][pl][cl(int'(r.y_int) + y, H/2 - 1)][cl(int'(r.x_int) + x, W/2 - 1)])
              bad = 1;
        if (bad) begin
          failures++;
          if (failures < 10) $display("window %0d (x=%0d y=%0d dx=%0d dy=%0d plane %0d) wrong",
                                      got, r.x_int, r.y_int, r.dx, r.dy, pl);
        end
        if (pl == 1) void'(sent.pop_front());
        got++;
      end
    end
    @(negedge clk);
    win_ready = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (int'(n_reads) != exp_reads) begin
      failures++; $display("reads %0d expected %0d", n_reads, exp_reads);
    end
    $display("windows 1-read=%0d 2-read=%0d 4-read=%0d clamped=%0d backpressure=%0d",
             n_r1, n_r2, n_r4, n_clamp, n_bp);
    checks += 5;
    if (n_r1 == 0) failures++;
    if (n_r2 == 0) failures++;
    if (n_r4 == 0) failures++;
    if (n_clamp == 0) failures++;
    if (n_bp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
