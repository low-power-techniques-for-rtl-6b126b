// tb_mc_chroma_interp: random 3x3 chroma windows and eighth-pel offsets;
// checks each 2x2 output against the bilinear weighted sum computed here.
module tb_mc_chroma_interp;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  pix_t [8:0] win;
  logic [2:0] dx, dy;
  pix_t [3:0] pred;
  int checks = 0, failures = 0;

  mc_chroma_interp dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; win = '0; dx = '0; dy = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int e [4];
      @(negedge clk);
      in_valid = 1;
      dx = 3'($urandom); dy = 3'($urandom);
      for (int i = 0; i < 9; i++) win[i] = (n < 20) ? 8'd255 : 8'($urandom);
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) begin
          automatic int A = win[3*r+c], B = win[3*r+c+1], C = win[3*(r+1)+c], D = win[3*(r+1)+c+1];
          e[2*r+c] = ((8-dx)*(8-dy)*A + dx*(8-dy)*B + (8-dx)*dy*C + dx*dy*D + 32) >> 6;
        end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int i = 0; i < 4; i++)
        if (int'(pred[i]) != e[i]) begin
          failures++;
          $display("n=%0d dx=%0d dy=%0d pix %0d got %0d exp %0d", n, dx, dy, i, pred[i], e[i]);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
