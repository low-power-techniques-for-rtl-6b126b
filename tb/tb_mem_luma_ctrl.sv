// tb_mem_luma_ctrl: small frame (64x32, 2 frames) with a word-array SRAM
// model. First writes a random picture into frame 1 through the block
// write port and checks the word layout (one word = a column of 4 pixels).
// Then issues random MC read requests (positions partly outside the
// frame, all fractions, both interpolators, runs of continuation requests)
// with random back-pressure on the column outputs, while deblocked blocks
// are written into frame 0 at the same time. Every column is checked
// (first flag, fraction, the clamped reference rows the interpolator
// uses) and so is the final content of frame 0. Counts writes that
// interrupted reads, reuse requests and back-pressure cycles.
module tb_mem_luma_ctrl;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int W = 64, H = 32, NF = 2;
  localparam int AW = $clog2(NF * W * H / 4);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] cur_frame;
  logic wr_valid, wr_ready, req_valid, req_ready;
  db_out_t wr_blk;
  mc_req_t req;
  logic [1:0] col_valid, col_ready;
  mc_col_t col_out;
  logic sram_en, sram_we;
  logic [AW-1:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic [31:0] n_reads, n_writes, n_reuse;
  logic [31:0] mem [NF*W*H/4];
  int checks = 0, failures = 0;
  int n_bp = 0, n_wr_during_rd = 0, n_req = 0, n_cont = 0;
  mc_col_t exp_q [2][$];
  bit      exp_full [2][$];
  bit      reading = 0;

  mem_luma_ctrl #(.W(W), .H(H), .NFRAMES(NF)) dut (.*);

  always @(posedge clk) begin
    if (sram_en && sram_we) mem[sram_addr] <= sram_wdata;
    if (sram_en && !sram_we) sram_rdata <= mem[sram_addr];
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // column checker
  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < 2; s++) begin
        if (col_valid[s] && !col_ready[s]) n_bp++;
        if (col_valid[s] && col_ready[s]) begin
          checks++;
          if (exp_q[s].size() == 0) begin failures++; $display("extra column on %0d", s); end
          else begin
            automatic mc_col_t e = exp_q[s].pop_front();
            automatic bit full = exp_full[s].pop_front();
            automatic bit bad = (e.first != col_out.first) || (e.xf != col_out.xf) || (e.yf != col_out.yf);
            for (int r = 0; r < 9; r++)
              if ((full || (r >= 2 && r <= 5)) && e.col[r] != col_out.col[r]) bad = 1;
            if (bad) begin
              failures++;
              $display("column mismatch sel %0d first %0d/%0d", s, col_out.first, e.first);
            end
          end
        end
      end
      if (sram_en && sram_we && reading) n_wr_during_rd++;
    end
  end

  always @(negedge clk) col_ready = 2'($urandom % 4 == 0 ? $urandom : 3);

  task automatic write_block(int f, int bx, int by);
    @(negedge clk);
    cur_frame = 3'(f);
    wr_valid = 1;
    wr_blk.bx = 10'(bx); wr_blk.by = 10'(by);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) wr_blk.pix[4*r+c] = 8'(px(f, 4*bx + c, 4*by + r));
    @(posedge clk);
    while (!wr_ready) @(posedge clk);
    @(negedge clk);
    wr_valid = 0;
  endtask

  mc_req_t last [2];
  bit      last_v [2];

  initial begin
    wr_valid = 0; req_valid = 0; wr_blk = '0; req = '0; cur_frame = 0; sram_rdata = '0;
    col_ready = 3;
    for (int i = 0; i < NF*W*H/4; i++) mem[i] = '0;
    set_size(W, H, NF);
    for (int i = 0; i < NF*W*H; i++) fb[i] = byte'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: write frame 1, check the layout
    for (int by = 0; by < H/4; by++)
      for (int bx = 0; bx < W/4; bx++) write_block(1, bx, by);
    repeat (3) @(posedge clk);
    for (int wy = 0; wy < H/4; wy++)
      for (int x = 0; x < W; x++) begin
        automatic logic [31:0] w = mem[W*H/4 + wy*W + x];
        checks++;
        for (int k = 0; k < 4; k++)
          if (int'(w[8*k +: 8]) != px(1, x, 4*wy + k)) begin
            failures++; $display("layout wrong at x %0d wy %0d", x, wy); break;
          end
      end
    // phase 2: reads from frame 1 while frame 0 is written
    reading = 1;
    fork
      begin
        for (int by = 0; by < H/4; by++)
          for (int bx = 0; bx < W/4; bx++) begin
            repeat ($urandom % 12) @(negedge clk);
            write_block(0, bx, by);
          end
      end
      begin
        for (int n = 0; n < 400; n++) begin
          automatic int run = 1 + $urandom % 3;
          automatic mc_req_t q;
          q.x_int = 16'($signed($urandom % (W + 16)) - 8);
          q.y_int = 16'($signed($urandom % (H + 16)) - 8);
          q.xf = 2'($urandom); q.yf = 2'($urandom);
          q.ref_idx = 3'd1; q.sel = 1'($urandom);
          for (int k = 0; k < run; k++) begin
            automatic bit cont = last_v[q.sel] && q.xf != 0 && last[q.sel].xf != 0 &&
                                 ((q.yf != 0) == (last[q.sel].yf != 0)) &&
                                 q.y_int == last[q.sel].y_int && q.ref_idx == last[q.sel].ref_idx &&
                                 q.x_int == last[q.sel].x_int + 16'sd4;
            automatic int xs = (q.xf == 0) ? q.x_int : cont ? q.x_int + 3 : q.x_int - 2;
            automatic int nc = (q.xf != 0 && !cont) ? 9 : 4;
            if (cont) n_cont++;
            for (int c = 0; c < nc; c++) begin
              automatic mc_col_t e;
              e.first = (c == 0) && !cont;
              e.xf = q.xf; e.yf = q.yf;
              for (int r = 0; r < 9; r++) e.col[r] = 8'(px(1, xs + c, q.y_int - 2 + r));
              exp_q[q.sel].push_back(e);
              exp_full[q.sel].push_back(q.yf != 0);
            end
            @(negedge clk);
            req_valid = 1; req = q;
            @(posedge clk);
            while (!req_ready) @(posedge clk);
            @(negedge clk);
            req_valid = 0;
            n_req++;
            last[q.sel] = q; last_v[q.sel] = 1;
            q.x_int = q.x_int + 16'sd4;
          end
        end
      end
    join
    repeat (200) @(posedge clk);
    reading = 0;
    for (int s = 0; s < 2; s++) begin
      checks++;
      if (exp_q[s].size() != 0) begin failures++; $display("%0d columns missing on %0d", exp_q[s].size(), s); end
    end
    for (int wy = 0; wy < H/4; wy++)
      for (int x = 0; x < W; x++) begin
        automatic logic [31:0] w = mem[wy*W + x];
        checks++;
        for (int k = 0; k < 4; k++)
          if (int'(w[8*k +: 8]) != px(0, x, 4*wy + k)) begin
            failures++; $display("frame 0 wrong at x %0d wy %0d", x, wy); break;
          end
      end
    $display("requests=%0d continued=%0d dut_reuse=%0d reads=%0d writes=%0d backpressure=%0d wr_during_rd=%0d",
             n_req, n_cont, n_reuse, n_reads, n_writes, n_bp, n_wr_during_rd);
    checks += 4;
    if (int'(n_reuse) != n_cont) failures++;
    if (n_cont == 0) failures++;
    if (n_bp == 0) failures++;
    if (n_wr_during_rd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
