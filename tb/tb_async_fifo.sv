// tb_async_fifo: writes a numbered sequence from a 10 ns clock domain and
// reads it in a 17 ns clock domain with random stalls on both sides.
// Checks that every word arrives once, in order, and that the FIFO never
// claims more than DEPTH words.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #8.5 rclk = ~rclk;
  logic w_valid, w_ready, r_valid, r_ready;
  logic [15:0] w_data, r_data;
  int checks = 0, failures = 0;
  int nw = 0, nr = 0;
  localparam int N = 500;

  async_fifo #(.WIDTH(16), .DEPTH(4)) dut (.*);

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_valid = 0; w_data = 0;
    repeat (3) @(posedge wclk);
    wrst_n = 1;
    while (nw < N) begin
      @(negedge wclk);
      w_valid = ($urandom % 4) != 0;
      w_data  = 16'(nw);
      @(posedge wclk);
      if (w_valid && w_ready) nw++;
    end
    @(negedge wclk);
    w_valid = 0;
  end

  initial begin
    r_ready = 0;
    repeat (3) @(posedge rclk);
    rrst_n = 1;
    while (nr < N) begin
      @(negedge rclk);
      r_ready = ($urandom % 3) != 0;
      @(posedge rclk);
      if (r_valid && r_ready) begin
        checks++;
        if (r_data != 16'(nr)) begin
          failures++;
          $display("got %0d expected %0d", r_data, nr);
        end
        nr++;
      end
      checks++;
      if (nw - nr > 4 + 1) begin
        failures++;
        $display("occupancy %0d exceeds depth", nw - nr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
