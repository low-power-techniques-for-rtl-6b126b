// tb_dec_top_full: the decoder at its full size (1280x720 luma, 8 frame
// slots, the module defaults) decoding one complete frame from a random
// reference picture; the frame is checked pixel by pixel against
// whole-frame reference decoding and deblocking. The stimulus and checks
// are in dec_tb_body.svh.
module tb_dec_top_full;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int W = 1280, H = 720, NF = 8, NDEC = 1;
  localparam longint WDOG = 64'd2_000_000_000;
  localparam int AW = $clog2(NF * W * H / 4);
  localparam int CAW = $clog2(NF * W * H / 8);

  dec_top dut (.*);

`include "dec_tb_body.svh"
endmodule
