// saa_top_full_tb: the end-to-end test of saa_top_tb_body.svh with the design at its default
// configuration (one 1920x1080 HD camera stream, four DRAM frame slots, four grayscale
// foveas, sixteen binary foveas): one complete frame with the 7x7 window is captured,
// thresholded, tile-counted and stored, checked against the reference, and then one fovea is
// cut out and processed by both foveal processors, as described in saa_top_tb.
module saa_top_full_tb;
  import saa_pkg::*;
  localparam int W = 1920, H = 1080, NFR = 1, NSLOT = 4, AW = 25, STRIDE = 1 << 20;
  localparam int HBL = 12, VBL = 3*W + 200;
  localparam int MAXCYC = 3000000;
  `define SAA_DUT saa_top dut (.*);
  `include "saa_top_tb_body.svh"
endmodule
