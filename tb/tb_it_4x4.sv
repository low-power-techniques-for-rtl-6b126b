// tb_it_4x4: drives one block per cycle (back to back) and checks each
// residual one cycle later against a reference written from the H.264
// definition: dequantisation level*v*2^(QP/6), row then column transform
// with the >>1 half terms, (x+32)>>6. Also checks a DC-only block against
// its closed form, the zero output of uncoded blocks and that LSB
// truncation changes the result.
module tb_it_4x4;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_coded, out_valid, out_coded;
  cblk4x4_t in_level, out_res;
  logic [5:0] in_qp;
  logic [3:0] trunc_lsb;
  int checks = 0, failures = 0;
  int vtab [6][3] = '{'{10,16,13},'{11,18,14},'{13,20,16},'{14,23,18},'{16,25,20},'{18,29,23}};

  it_4x4 dut (.*);

  function automatic void ref_it(input cblk4x4_t lv, input int qp, output int r [16], output bit ovf);
    int d [4][4], f [4][4], g [4][4];
    ovf = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int cls = (i % 2 == 0 && j % 2 == 0) ? 0 : (i % 2 == 1 && j % 2 == 1) ? 1 : 2;
        d[i][j] = int'(lv[4*i+j]) * vtab[qp % 6][cls] * (1 << (qp / 6));
      end
    for (int i = 0; i < 4; i++) begin
      int e0 = d[i][0] + d[i][2], e1 = d[i][0] - d[i][2];
      int e2 = (d[i][1] >>> 1) - d[i][3], e3 = d[i][1] + (d[i][3] >>> 1);
      f[i][0] = e0 + e3; f[i][1] = e1 + e2; f[i][2] = e1 - e2; f[i][3] = e0 - e3;
    end
    for (int j = 0; j < 4; j++) begin
      int e0 = f[0][j] + f[2][j], e1 = f[0][j] - f[2][j];
      int e2 = (f[1][j] >>> 1) - f[3][j], e3 = f[1][j] + (f[3][j] >>> 1);
      g[0][j] = e0 + e3; g[1][j] = e1 + e2; g[2][j] = e1 - e2; g[3][j] = e0 - e3;
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        r[4*i+j] = (g[i][j] + 32) >>> 6;
        if (d[i][j] > 32767 || d[i][j] < -32768 || f[i][j] > 32767 || f[i][j] < -32768 ||
            g[i][j] > 32735 || g[i][j] < -32768) ovf = 1;
      end
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cblk4x4_t lv_q; int qp_q; logic coded_q; logic pend = 0;

  // called at a falling edge: checks the block driven one cycle earlier
  task automatic check_prev();
    int r [16]; bit ovf;
    if (!pend) return;
    ref_it(lv_q, qp_q, r, ovf);
    checks++;
    if (!out_valid) begin failures++; $display("no output"); end
    else
      for (int i = 0; i < 16; i++)
        if (int'(out_res[i]) != (coded_q ? r[i] : 0)) begin
          failures++;
          $display("qp=%0d i=%0d got %0d exp %0d", qp_q, i, int'(out_res[i]), r[i]);
          break;
        end
  endtask

  initial begin
    in_valid = 0; in_coded = 0; in_level = '0; in_qp = 0; trunc_lsb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // DC-only closed form: qp=28, level 3 -> d=3*16*16=768, every sample (768+32)>>6 = 12
    @(negedge clk);
    in_valid = 1; in_coded = 1; in_qp = 6'd28; in_level = '0; in_level[0] = 16'sd3;
    @(negedge clk);
    in_valid = 0;
    checks++;
    for (int i = 0; i < 16; i++)
      if (out_res[i] != 16'sd12) begin failures++; $display("DC closed form %0d", int'(out_res[i])); break; end
    // back-to-back random blocks, checked one cycle later
    for (int n = 0; n < 400; n++) begin
      int r [16]; bit ovf;
      @(negedge clk);
      check_prev();
      in_valid = 1;
      in_coded = (n % 7) != 0;
      // levels within the range a conforming stream allows (16-bit internals)
      do begin
        in_qp = 6'($urandom % 52);
        for (int i = 0; i < 16; i++)
          in_level[i] = ($urandom % 3 == 0) ? coef_t'($signed($urandom % 9) - 4) : 16'sd0;
        ref_it(in_level, int'(in_qp), r, ovf);
      end while (ovf);
      lv_q = in_level; qp_q = int'(in_qp); coded_q = in_coded;
      pend = 1;
    end
    @(negedge clk);
    check_prev();
    in_valid = 0; pend = 0;
    // truncation: 9 LSBs zeroed must change a block with small values
    @(negedge clk);
    in_valid = 1; in_coded = 1; in_qp = 6'd20; trunc_lsb = 4'd9;
    in_level = '0; in_level[0] = 16'sd5; in_level[5] = -16'sd2;
    @(negedge clk);
    in_valid = 0;
    begin
      int r [16]; bit differs = 0, ovf;
      ref_it(in_level, 20, r, ovf);
      for (int i = 0; i < 16; i++) if (int'(out_res[i]) != r[i]) differs = 1;
      checks++;
      if (!differs) begin failures++; $display("truncation had no effect"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
