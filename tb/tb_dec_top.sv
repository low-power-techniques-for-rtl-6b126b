// tb_dec_top: end-to-end test of the decoder on a 64x32 picture (4x2
// macroblocks), three frames decoded in a chain (each the reference of the
// next), checked pixel by pixel against whole-frame reference decoding
// and deblocking. The stimulus and checks are in dec_tb_body.svh.
module tb_dec_top;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int W = 64, H = 32, NF = 4, NDEC = 3;
  localparam longint WDOG = 64'd50_000_000;
  localparam int AW = $clog2(NF * W * H / 4);
  localparam int CAW = $clog2(NF * W * H / 8);

  dec_top #(.W(W), .H(H), .NFRAMES(NF)) dut (.*);

`include "dec_tb_body.svh"
endmodule
