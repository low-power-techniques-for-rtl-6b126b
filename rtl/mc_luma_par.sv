// mc_luma_par: parallel luma motion compensation with N = 2 interpolators.
// Blocks are assigned to interpolators by their position, not first-come:
// MC0 takes the even 4x4 rows of a macroblock (zig-zag indices 0,1,4,5,
// 8,9,12,13) and MC1 the odd rows (2,3,6,7,10,11,14,15). Horizontally
// neighbouring blocks therefore stay on one interpolator, which keeps the
// horizontal data reuse and simple control. Each interpolator takes its
// reference columns from its own input stream, collects its 4 output
// columns into a 4x4 block and stores it in its own output FIFO (depth 1,
// which is enough for N = 2). A column is only accepted while the output
// FIFO has room, so a full output stalls only its own interpolator.
// Interface: per interpolator a column stream in (valid/ready) and a block
// stream out (valid/ready, 128-bit block in raster order [4*row+col]).
module mc_luma_par
  import h264_pkg::*;
#(
  parameter int unsigned N = 2,
  parameter int unsigned OUT_DEPTH = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    col_valid,
  output logic [N-1:0]    col_ready,
  input  mc_col_t [N-1:0] col_in,
  output logic [N-1:0]    blk_valid,
  input  logic [N-1:0]    blk_ready,
  output blk4x4_t [N-1:0] blk_out,
  output logic [31:0]     n_stall       // cycles a column waited on a full output
);
  logic [N-1:0] stall_i;

  for (genvar g = 0; g < N; g++) begin : g_mc
    logic     ip_valid, of_ready;
    col4_t    ip_col;
    blk4x4_t  asm_blk;
    logic [1:0] ocnt;
    logic     push;
    logic [$clog2(OUT_DEPTH+1)-1:0] of_count;

    assign col_ready[g] = of_ready;
    assign stall_i[g]   = col_valid[g] && !of_ready;

    mc_luma_interp u_interp (
      .clk, .rst_n,
      .in_valid (col_valid[g] && of_ready),
      .in_first (col_in[g].first),
      .in_col   (col_in[g].col),
      .xf       (col_in[g].xf),
      .yf       (col_in[g].yf),
      .out_valid(ip_valid),
      .out_col  (ip_col));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ocnt    <= '0;
        asm_blk <= '0;
      end else if (ip_valid) begin
        for (int r = 0; r < 4; r++) asm_blk[4*r + ocnt] <= ip_col[r];
        ocnt <= ocnt + 2'd1;
      end
    end

    blk4x4_t full_blk;
    always_comb begin
      full_blk = asm_blk;
      for (int r = 0; r < 4; r++) full_blk[4*r + 3] = ip_col[r];
    end
    assign push = ip_valid && (ocnt == 2'd3);

    sync_fifo #(.WIDTH(128), .DEPTH(OUT_DEPTH)) u_ofifo (
      .clk, .rst_n,
      .in_valid(push), .in_ready(of_ready), .in_data(full_blk),
      .out_valid(blk_valid[g]), .out_ready(blk_ready[g]), .out_data(blk_out[g]),
      .count(of_count));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_stall <= '0;
    else if (|stall_i) n_stall <= n_stall + 1;
  end
endmodule
