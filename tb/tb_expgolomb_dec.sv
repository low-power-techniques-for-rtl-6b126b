// tb_expgolomb_dec: builds Exp-Golomb codewords for random code numbers of
// every prefix length 0..15, followed by random bits, and checks the
// decoded length, ue(v) and se(v); also checks that a 16-zero prefix is
// flagged as an error.
module tb_expgolomb_dec;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid, out_err;
  logic [31:0] bits, out_ue;
  logic [5:0] out_len;
  logic signed [31:0] out_se;
  int checks = 0, failures = 0;

  expgolomb_dec dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      longint unsigned k, code;
      int lz, len;
      longint se_exp;
      bit err;
      err = (n % 50) == 49;
      lz  = n % 16;
      k   = (64'd1 << lz) - 1 + (lz == 0 ? 0 : ($urandom % (1 << lz)));
      code = k + 1;                         // lz zeros, then lz+1 bits of k+1
      len  = 2*lz + 1;
      @(negedge clk);
      in_valid = 1;
      bits = $urandom;
      if (err) bits[31:16] = '0;
      else begin
        bits = bits >> len;
        bits = bits | 32'(code << (32 - len));
      end
      se_exp = (k % 2 == 1) ? longint'((k + 1) / 2) : -longint'(k / 2);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_err != err) begin
        failures++;
        $display("n=%0d valid/err wrong", n);
      end else if (!err && (out_len != 6'(len) || out_ue != 32'(k) || out_se != 32'(se_exp))) begin
        failures++;
        $display("n=%0d k=%0d got len %0d ue %0d se %0d", n, k, out_len, out_ue, out_se);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
