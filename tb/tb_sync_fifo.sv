// tb_sync_fifo: random push/pop traffic against a queue model. Checks data
// order, the full/empty flags and the occupancy count for a 3-deep FIFO.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [1:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  sync_fifo #(.WIDTH(16), .DEPTH(3)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      in_data   = 16'($urandom);
      out_ready = ($urandom % 2) != 0;
      checks++;
      if (count != 2'(q.size()) || in_ready != (q.size() < 3) || out_valid != (q.size() > 0)) begin
        failures++;
        $display("flag mismatch count=%0d model=%0d", count, q.size());
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != q[0]) begin
          failures++;
          $display("data mismatch %h vs %h", out_data, q[0]);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
