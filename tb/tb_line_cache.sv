// tb_line_cache: random writes and reads on both read ports against an
// array model; a write becomes visible to reads after the clock edge.
module tb_line_cache;
  localparam int DEPTH = 324, WIDTH = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [$clog2(DEPTH)-1:0] waddr, raddr0, raddr1;
  logic [WIDTH-1:0] wdata, rdata0, rdata1;
  logic [WIDTH-1:0] model [DEPTH];
  bit   valid [DEPTH];
  int checks = 0, failures = 0;

  line_cache #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr0 = '0; raddr1 = '0;
    // fill every entry once so that all reads are defined
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = a[$clog2(DEPTH)-1:0]; wdata = $urandom; model[a] = wdata; valid[a] = 1;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = $urandom % 2;
      waddr = ($urandom % DEPTH);
      wdata = $urandom;
      raddr0 = ($urandom % DEPTH);
      raddr1 = ($urandom % DEPTH);
      #1;
      checks += 2;
      if (rdata0 !== model[raddr0]) begin failures++; $display("port0 addr %0d", raddr0); end
      if (rdata1 !== model[raddr1]) begin failures++; $display("port1 addr %0d", raddr1); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
