// async_fifo: asynchronous FIFO joining two independent clock/voltage
// domains, such as the core domain and the memory-controller domain. As in
// the multi-domain decoder, every register sits in the domain of the clock
// that drives it: the storage array and write pointer on the write clock,
// the read pointer on the read clock. Pointers cross domains in Gray code
// through two-flop synchronisers, so only one bit changes per step.
// Interface: write side wclk/wrst_n/w_valid/w_ready/w_data, read side
// rclk/rrst_n/r_valid/r_ready/r_data (first-word-fall-through). DEPTH must
// be a power of two, at least 2 (default 4, the depth of the memory-to-MC FIFOs).
// Level shifting between the two supplies is outside the logic.
module async_fifo #(
  parameter int unsigned WIDTH = 72,
  parameter int unsigned DEPTH = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             w_valid,
  output logic             w_ready,
  input  logic [WIDTH-1:0] w_data,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             r_valid,
  input  logic             r_ready,
  output logic [WIDTH-1:0] r_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen on the write clock
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen on the read clock

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  // full: write pointer one lap ahead (two top Gray bits inverted)
  localparam logic [AW:0] LAP = (AW+1)'(3) << (AW - 1);
  assign w_ready = (wgray != (rgray_w2 ^ LAP));
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (w_valid && w_ready) begin
        wbin  <= wbin + 1'b1;
        wgray <= b2g(wbin + 1'b1);
      end
    end
  end
  always_ff @(posedge wclk) begin
    if (w_valid && w_ready) mem[wbin[AW-1:0]] <= w_data;
  end

  // ---------------- read domain ----------------
  assign r_valid = (rgray != wgray_r2);
  assign r_data  = mem[rbin[AW-1:0]];
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (r_valid && r_ready) begin
        rbin  <= rbin + 1'b1;
        rgray <= b2g(rbin + 1'b1);
      end
    end
  end
endmodule
