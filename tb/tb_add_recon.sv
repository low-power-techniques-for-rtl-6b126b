// tb_add_recon: random predictions and residuals (including ones that
// overflow both ends of the pixel range and blocks without residual);
// checks each clipped sum and the one-cycle latency.
module tb_add_recon;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, res_coded, out_valid;
  blk4x4_t pred, recon, expv;
  cblk4x4_t res;
  int checks = 0, failures = 0;

  add_recon dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; pred = '0; res = '0; res_coded = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid  = 1;
      res_coded = (n % 5) != 0;
      for (int i = 0; i < 16; i++) begin
        int v;
        pred[i] = 8'($urandom);
        res[i]  = coef_t'($signed($urandom % 700) - 350);
        v = int'(pred[i]) + (res_coded ? int'(res[i]) : 0);
        expv[i] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || recon != expv) begin
        failures++;
        $display("block %0d mismatch", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
