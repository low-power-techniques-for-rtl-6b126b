// dec_tb_body.svh: shared body of the end-to-end decoder testbenches.
// The including module defines W, H, NF (frame-buffer slots), NDEC
// (frames to decode), WDOG (watchdog time) and instantiates dec_top as dut.
// Stimulus: frame slot 0 of the frame-buffer model is loaded with a random
// blocky picture. Then NDEC frames are decoded, frame k into slot k with
// slot k-1 as reference. Each macroblock is intra (random valid 4x4 modes)
// or inter (quarter-pel MV per macroblock, sometimes changed per block),
// with random QP, random sparse levels, uncoded blocks and random boundary
// strengths. The clocks of the two domains are unrelated (10 ns / 7 ns).
// Reference: the decoding of every block is recomputed on whole frames
// from the standard's definitions (h264_ref_pkg), then the frame is
// deblocked and compared word by word with the frame-buffer model.
// Mechanism counters (intra waits, MC waits, IT skips, DB stalls, filtered
// edges, MC output stalls, window reuse, command back-pressure, intra and
// inter blocks, chroma reads, side units) must all be non-zero.
// Chroma: the chroma frame-buffer model holds random smooth Cb/Cr
// reference planes; every inter block must produce its Cb and Cr 2x2
// predictions in order, equal to the eighth-pel bilinear reference.

  logic clk = 0, rst_n = 0, mclk = 0, mrst_n = 0;
  always #5 clk = ~clk;
  always #3.5 mclk = ~mclk;
  logic cmd_valid, cmd_ready;
  blk_cmd_t cmd;
  logic [2:0] cur_frame;
  logic [3:0] trunc_lsb;
  logic sram_en, sram_we;
  logic [AW-1:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic csram_en;
  logic [CAW-1:0] csram_addr;
  logic [31:0] csram_rdata;
  logic cmc_out_valid, cmc_out_plane;
  pix_t [3:0] cmc_pred;
  logic eg_valid, eg_out_valid, eg_err;
  logic [31:0] eg_bits, eg_ue;
  logic [5:0] eg_len;
  logic signed [31:0] eg_se;
  pix_t [1:0][3:0] cdb_lines;
  logic [2:0] cdb_bs;
  logic [5:0] cdb_qp;
  pix_t [1:0][1:0] cdb_out;
  logic [31:0] n_blocks, n_intra_wait, n_mc_wait, n_it_skip, n_db_stall, n_db_filtered,
               n_mc_stall, n_mem_reads, n_mem_writes, n_mem_reuse, n_cmem_reads;

  logic [31:0] sram [NF*W*H/4];
  always @(posedge mclk) begin
    if (sram_en && sram_we) sram[sram_addr] <= sram_wdata;
    if (sram_en && !sram_we) sram_rdata <= sram[sram_addr];
  end

  // chroma frame buffer (read only) and its picture, [frame][plane][y][x]
  logic [31:0] csram [NF*W*H/8];
  always @(posedge mclk) if (csram_en) csram_rdata <= csram[csram_addr];
  byte unsigned cfb [];

  function automatic int cpx(int f, int pl, int x, int y);
    x = clampi(x, 0, W/2 - 1); y = clampi(y, 0, H/2 - 1);
    return int'(cfb[((2*f + pl)*(H/2) + y)*(W/2) + x]);
  endfunction

  // expected chroma predictions in output order: {plane, 4 pixels}
  typedef struct { int pl; int p [4]; } cexp_t;
  cexp_t cexp [$];
  int n_cpred = 0;

  int checks = 0, failures = 0;
  int n_intra_blk = 0, n_inter_blk = 0, n_cmd_bp = 0, n_side = 0;
  int bsl [], bst [], qpm [];

  initial begin
    #(WDOG);
    failures++;
    $display("watchdog: blocks done %0d", n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && cmd_valid && !cmd_ready) n_cmd_bp++;

  always @(posedge clk) if (rst_n && cmc_out_valid) begin
    checks++;
    n_cpred++;
    if (cexp.size() == 0) begin
      failures++; $display("unexpected chroma prediction");
    end else begin
      automatic cexp_t e = cexp.pop_front();
      automatic bit bad = (int'(cmc_out_plane) != e.pl);
      for (int i = 0; i < 4; i++) bad |= (int'(cmc_pred[i]) != e.p[i]);
      if (bad) begin
        failures++;
        if (failures < 10) $display("chroma prediction plane %0d got %p exp %p", e.pl, cmc_pred, e.p);
      end
    end
  end

  task automatic send_cmd(blk_cmd_t c);
    @(negedge clk);
    while ($urandom % 8 == 0) begin cmd_valid = 0; @(negedge clk); end
    cmd_valid = 1; cmd = c;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  // decode one frame into slot f with reference slot f-1
  task automatic decode_frame(int f);
    int mbw = W/16, mbh = H/16, bw = W/4;
    @(negedge clk);
    cur_frame = 3'(f);
    for (int my = 0; my < mbh; my++)
      for (int mx = 0; mx < mbw; mx++) begin
        automatic bit intra = ($urandom % 10) < 3;
        automatic int qp = 16 + $urandom % 15;
        automatic int mvx = $signed($urandom % 97) - 48, mvy = $signed($urandom % 65) - 32;
        qpm[my*mbw + mx] = qp;
        for (int i = 0; i < 16; i++) begin
          automatic blk_cmd_t c = '0;
          automatic int bx = int'(blk_x(4'(i))), by = int'(blk_y(4'(i)));
          automatic int x0 = 16*mx + 4*bx, y0 = 16*my + 4*by;
          automatic int pred [16], res [16], lv [16];
          automatic bit ta = (by != 0) || (my != 0), la = (bx != 0) || (mx != 0), tra;
          automatic int mode;
          case (i)
            3, 7, 11, 13, 15: tra = 0;
            5:                tra = (my != 0) && (mx != mbw - 1);
            0, 1, 4:          tra = (my != 0);
            default:          tra = 1;
          endcase
          c.mb_x = 8'(mx); c.mb_y = 8'(my); c.blk_idx = 4'(i); c.intra = intra;
          c.qp = 6'(qp); c.ref_idx = 3'(f - 1);
          // boundary strengths: 0 on picture edges, 3/4 around intra blocks
          c.bs_left = (x0 == 0) ? 3'd0 : intra ? ((bx == 0) ? 3'd4 : 3'd3) : 3'($urandom % 3);
          c.bs_top  = (y0 == 0) ? 3'd0 : intra ? ((by == 0) ? 3'd4 : 3'd3) : 3'($urandom % 3);
          bsl[(y0/4)*bw + x0/4] = int'(c.bs_left);
          bst[(y0/4)*bw + x0/4] = int'(c.bs_top);
          // residual
          c.coded = ($urandom % 4) != 0;
          for (int k = 0; k < 16; k++) begin
            lv[k] = (c.coded && $urandom % 3 == 0) ? $signed($urandom % 7) - 3 : 0;
            c.level[k] = coef_t'(lv[k]);
          end
          ref_it(lv, qp, res);
          // prediction
          if (intra) begin
            n_intra_blk++;
            do begin
              mode = $urandom % 9;
            end while (((mode == 0 || mode == 3 || mode == 7) && !ta) ||
                       ((mode == 1 || mode == 8) && !la) ||
                       ((mode == 4 || mode == 5 || mode == 6) && !(ta && la)));
            c.i4_mode = i4_mode_e'(mode);
            ref_intra(f, x0, y0, mode, ta, la, tra, pred);
          end else begin
            n_inter_blk++;
            if ($urandom % 6 == 0) begin
              mvx = $signed($urandom % 97) - 48; mvy = $signed($urandom % 65) - 32;
            end
            c.mv_x = mv_t'(mvx); c.mv_y = mv_t'(mvy);
            for (int r = 0; r < 4; r++)
              for (int q = 0; q < 4; q++)
                pred[4*r+q] = luma_q(f - 1, x0 + q + (mvx >>> 2), y0 + r + (mvy >>> 2), mvx & 3, mvy & 3);
            // chroma: the 2x2 block under this luma block, eighth-pel MV
            for (int pl = 0; pl < 2; pl++) begin
              automatic cexp_t e;
              automatic int cx = x0/2 + (mvx >>> 3), cy = y0/2 + (mvy >>> 3), dx = mvx & 7, dy = mvy & 7;
              e.pl = pl;
              for (int r = 0; r < 2; r++)
                for (int q = 0; q < 2; q++)
                  e.p[2*r+q] = ((8-dx)*(8-dy)*cpx(f-1, pl, cx+q, cy+r) + dx*(8-dy)*cpx(f-1, pl, cx+q+1, cy+r) +
                                (8-dx)*dy*cpx(f-1, pl, cx+q, cy+r+1) + dx*dy*cpx(f-1, pl, cx+q+1, cy+r+1) + 32) >> 6;
              cexp.push_back(e);
            end
          end
          for (int r = 0; r < 4; r++)
            for (int q = 0; q < 4; q++)
              setpx(f, x0 + q, y0 + r, clip255(pred[4*r+q] + (c.coded ? res[4*r+q] : 0)));
          send_cmd(c);
        end
      end
    ref_deblock(f, bsl, bst, qpm);
  endtask

  // the chroma edge filter and Exp-Golomb parser beside the luma path
  task automatic side_units();
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      eg_valid = 1; eg_bits = 32'(n + 1) << (32 - (2*$clog2(n + 2) - 1));
      // chroma edge with a small step: bS 4 gives the 3-tap averages
      cdb_bs = 3'd4; cdb_qp = 6'd40;
      for (int l = 0; l < 2; l++) begin
        cdb_lines[l][0] = 8'(100 + l); cdb_lines[l][1] = 8'(102 + (n % 3));
        cdb_lines[l][2] = 8'(110);     cdb_lines[l][3] = 8'(111 + l);
      end
      @(negedge clk);
      eg_valid = 0;
      checks += 2;
      n_side++;
      for (int l = 0; l < 2; l++) begin
        automatic int p1 = cdb_lines[l][0], p0 = cdb_lines[l][1], q0 = cdb_lines[l][2], q1 = cdb_lines[l][3];
        if (int'(cdb_out[l][0]) != (2*p1 + p0 + q1 + 2) >> 2 || int'(cdb_out[l][1]) != (2*q1 + q0 + p1 + 2) >> 2) begin
          failures++; $display("chroma deblocking side unit"); break;
        end
      end
      if (!eg_out_valid || eg_err || eg_ue != 32'(n)) begin failures++; $display("exp-golomb side unit %0d got %0d", n, eg_ue); end
    end
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; cur_frame = 0; trunc_lsb = 0; sram_rdata = '0;
    csram_rdata = '0; eg_valid = 0; eg_bits = '0;
    cdb_lines = '0; cdb_bs = '0; cdb_qp = '0;
    set_size(W, H, NF);
    bsl = new[(W/4)*(H/4)]; bst = new[(W/4)*(H/4)]; qpm = new[(W/16)*(H/16)];
    for (int by = 0; by < H/4; by++)
      for (int bx = 0; bx < W/4; bx++) begin
        automatic int base = 30 + $urandom % 190;
        for (int r = 0; r < 4; r++)
          for (int q = 0; q < 4; q++) setpx(0, 4*bx + q, 4*by + r, base + $urandom % 8);
      end
    for (int a = 0; a < NF*W*H/4; a++) sram[a] = '0;
    for (int wy = 0; wy < H/4; wy++)
      for (int x = 0; x < W; x++)
        for (int k = 0; k < 4; k++) sram[wy*W + x][8*k +: 8] = 8'(px(0, x, 4*wy + k));
    // chroma reference pictures: smooth random planes in the slots used as references
    cfb = new[NF*2*(W/2)*(H/2)];
    for (int a = 0; a < NF*W*H/8; a++) csram[a] = '0;
    for (int f = 0; f < NDEC; f++)
      for (int pl = 0; pl < 2; pl++)
        for (int y = 0; y < H/2; y++)
          for (int x = 0; x < W/2; x++) begin
            automatic int v = 60 + (x*3 + y*5 + 40*pl + 17*f) % 120 + $urandom % 16;
            cfb[((2*f + pl)*(H/2) + y)*(W/2) + x] = 8'(v);
            csram[f*W*H/8 + pl*W*H/16 + (y/2)*(W/4) + x/2][8*(2*(y%2) + x%2) +: 8] = 8'(v);
          end
    repeat (3) @(posedge clk);
    rst_n = 1; mrst_n = 1;
    side_units();
    for (int f = 1; f <= NDEC; f++) begin
      decode_frame(f);
      while (int'(n_mem_writes) < f * W * H / 4) @(posedge clk);
      repeat (5) @(posedge mclk);
      for (int wy = 0; wy < H/4; wy++)
        for (int x = 0; x < W; x++) begin
          checks++;
          for (int k = 0; k < 4; k++)
            if (int'(sram[f*W*H/4 + wy*W + x][8*k +: 8]) != px(f, x, 4*wy + k)) begin
              failures++;
              if (failures < 10)
                $display("frame %0d pixel %0d,%0d got %0d exp %0d", f, x, 4*wy + k,
                         sram[f*W*H/4 + wy*W + x][8*k +: 8], px(f, x, 4*wy + k));
              break;
            end
        end
      $display("frame %0d done at %0t", f, $time);
    end
    while (cexp.size() != 0) @(posedge clk);
    $display("chroma predictions=%0d chroma reads=%0d", n_cpred, n_cmem_reads);
    $display("blocks=%0d intra=%0d inter=%0d intra_wait=%0d mc_wait=%0d it_skip=%0d db_stall=%0d",
             n_blocks, n_intra_blk, n_inter_blk, n_intra_wait, n_mc_wait, n_it_skip, n_db_stall);
    $display("db_filtered=%0d mc_stall=%0d mem_reads=%0d mem_writes=%0d mem_reuse=%0d cmd_backpressure=%0d",
             n_db_filtered, n_mc_stall, n_mem_reads, n_mem_writes, n_mem_reuse, n_cmd_bp);
    checks += 14;
    if (n_cpred != 2 * n_inter_blk) failures++;
    if (n_cmem_reads == 0) failures++;
    if (int'(n_blocks) != NDEC * W * H / 16) failures++;
    if (n_intra_blk == 0) failures++;
    if (n_inter_blk == 0) failures++;
    if (n_intra_wait == 0) failures++;
    if (n_mc_wait == 0) failures++;
    if (n_it_skip == 0) failures++;
    if (n_db_stall == 0) failures++;
    if (n_db_filtered == 0) failures++;
    if (n_mc_stall == 0) failures++;
    if (n_mem_reuse == 0) failures++;
    if (n_cmd_bp == 0) failures++;
    if (n_side == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
