// add_recon: reconstruction (ADD) unit. Adds a 4x4 residual block to its
// 4x4 prediction with 16 parallel adders and clips each sum to 0..255, so a
// whole block is reconstructed per cycle. When the block has no residual
// (res_coded = 0) the prediction passes unchanged. The output is
// registered: one cycle of latency, one block per cycle.
module add_recon
  import h264_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  blk4x4_t  pred,
  input  cblk4x4_t res,
  input  logic     res_coded,
  output logic     out_valid,
  output blk4x4_t  recon
);
  blk4x4_t sum;
  always_comb begin
    for (int i = 0; i < 16; i++)
      sum[i] = res_coded ? clip_pix(20'(signed'({1'b0, pred[i]})) + 20'(res[i])) : pred[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      recon     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) recon <= sum;
    end
  end
endmodule
