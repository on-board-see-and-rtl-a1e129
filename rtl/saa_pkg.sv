// saa_pkg: types and constants shared by the see-and-avoid image processing blocks.
// Fovea and tile sizes (128x128 foveas, 32x32 counting tiles, 32-pixel fovea alignment)
// follow the design description; the opcode encodings and instruction layouts are this
// design's own choice.
package saa_pkg;

  localparam int unsigned FOVEA   = 128;  // fovea edge length in pixels
  localparam int unsigned FOV_PIX = FOVEA * FOVEA;  // 16,384 pixels per fovea
  localparam int unsigned TILE    = 32;   // counting tile / fovea alignment grid

  // Grayscale processing element selector (one PE active per instruction).
  typedef enum logic [3:0] {
    G_ADD     = 4'd0,   // saturating a + b
    G_SUB     = 4'd1,   // a - b, clipped at 0
    G_MUL     = 4'd2,   // (a * b) >> 8
    G_ABS     = 4'd3,   // |a - b|
    G_THRESH  = 4'd4,   // a > b ? 255 : 0 (b may be a space-variant threshold map)
    G_AVG     = 4'd5,   // 3x3 local average of a
    G_DIFFUSE = 4'd6,   // one diffusion step of a: [1 2 1;2 4 2;1 2 1]/16
    G_EDGE_H  = 4'd7,   // horizontal edges (vertical gradient), |Sobel|/4
    G_EDGE_V  = 4'd8,   // vertical edges (horizontal gradient), |Sobel|/4
    G_EDGE_D1 = 4'd9,   // 45 degree edges
    G_EDGE_D2 = 4'd10   // 135 degree edges
  } gray_op_e;

  // Grayscale instruction: two sources, one target, one PE.
  typedef struct packed {
    gray_op_e   op;
    logic [1:0] src1;
    logic [1:0] src2;
    logic [1:0] dst;
  } gray_instr_t;

  // Binary processing element operation.
  typedef enum logic [2:0] {
    B_ERODE   = 3'd0,  // 3x3 erosion of a
    B_DILATE  = 3'd1,  // 3x3 dilation of a
    B_SPR     = 3'd2,  // single pixel removal on a
    B_RECON   = 3'd3,  // one reconstruction step: dilate(a) & b
    B_AND     = 3'd4,
    B_OR      = 3'd5,
    B_XOR     = 3'd6
  } bin_op_e;

  // Value of the pixels outside a binary fovea: 1 for erosion, 0 otherwise.
  function automatic logic bin_pad(bin_op_e op);
    return op == B_ERODE;
  endfunction

  // Binary image index: {memory block[1:0], slot within block[1:0]} -> 16 foveas.
  typedef struct packed {
    bin_op_e    op;
    logic [3:0] src1;
    logic [3:0] src2;
    logic [3:0] dst;
  } bin_instr_t;

  // Global status signals of a processor after an operation.
  typedef struct packed {
    logic white;   // every result pixel is white
    logic black;   // every result pixel is black
    logic change;  // some result pixel differs from the first source
  } gflags_t;

  // Fovea DMA command: cut a 128x128 window whose corner lies on the 32-pixel grid.
  typedef struct packed {
    logic       binary;   // 0: grayscale fovea, 1: binary fovea
    logic [1:0] slot;     // DRAM frame slot
    logic [7:0] tx;       // corner x / 32
    logic [7:0] ty;       // corner y / 32
    logic [3:0] dst;      // gray: memory 0..3 (dst[1:0]); binary: image 0..15
  } dma_cmd_t;

  // White pixel count of one 32x32 tile.
  typedef struct packed {
    logic [7:0]  tx;
    logic [7:0]  ty;
    logic [10:0] count;
  } tile_rec_t;

endpackage
