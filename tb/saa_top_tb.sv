// saa_top_tb: end-to-end run of the see-and-avoid image processing chain at a reduced frame
// size (224x160, two DRAM frame slots). A camera model sends frames of a sky gradient with
// noise, a bright cloud with a sharp edge and two small dark "aircraft"; each frame uses a
// different local-average window (3x3, 5x5, 7x7). For every frame the testbench checks the
// tile reports and the gray and binary images stored in DRAM against a reference computed
// here. It then acts as the control processor: it picks the tile with most candidate
// pixels, has the DMA cut the grayscale and binary foveas around it, checks them through
// the processor ports, runs grayscale operations (local average, subtraction, thresholds
// giving all-black and all-white results) and a queue of binary operations followed by
// iterated reconstruction until the change flag drops, and checks every result pixel.
// Each mechanism is counted and must have occurred: every window size, frame-slot wrap,
// tile reports, both DMA kinds, both processors' completions, white/black/steady-state
// flags and instruction-queue back-pressure.
module saa_top_tb;
  import saa_pkg::*;
  localparam int W = 224, H = 160, NFR = 3, NSLOT = 2, AW = 20, STRIDE = 1 << 16;
  localparam int HBL = 12, VBL = 3*W + 200;
  localparam int MAXCYC = 4000000;
  `define SAA_DUT saa_top #(.W(W), .H(H), .NFRAMES(NSLOT), .AW(AW), .FRAME_STRIDE(STRIDE)) dut (.*);
  `include "saa_top_tb_body.svh"
endmodule
