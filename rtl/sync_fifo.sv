// sync_fifo: synchronous FIFO placed between two decoder units on the same
// clock. The decoder pipeline is non-interlocked: each unit only looks at
// the valid/ready of its neighbouring FIFOs, so units run out of lockstep
// and the FIFO depth absorbs block-to-block variation in cycle counts.
// Interface: write side (in_valid/in_ready/in_data), read side
// (out_valid/out_ready/out_data, first-word-fall-through). A transfer
// happens on a cycle where valid and ready are both high. Depth and width
// are parameters; the defaults follow one of the decoder's FIFOs (1 entry
// of 128 bits, a predicted 4x4 luma block). Storage is a register array;
// occupancy is tracked with a counter so any depth (not only powers of two)
// works. Reset empties the FIFO.
module sync_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // Handshake rules: never pop an empty FIFO nor overflow a full one
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= DEPTH[$clog2(DEPTH+1)-1:0]);
endmodule
