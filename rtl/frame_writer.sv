// frame_writer: stores each camera frame together with its binary (thresholded) image in
// external DRAM, in a ring of NFRAMES frame slots, so that foveas can later be cut out of
// it. That the original pixels and the preprocessing results are both saved in the DRAM,
// and that several frames can be kept, follows the design description; the memory layout,
// word packing and port protocol are this design's own.
// Layout (32-bit word addresses): slot n starts at n*FRAME_STRIDE; the gray image (4 pixels
// per word, lowest byte = leftmost pixel) comes first, then at offset W*H/4 the binary image
// (32 pixels per word, bit 0 = leftmost pixel). Rows are W pixels long in both.
// How it works: in the camera clock domain two packers collect gray and binary words; a
// binary word waits in a one-word holding register for a cycle without a gray word (gray
// words arrive at most every fourth pixel, binary words every 32nd). Words cross to the
// system clock domain through an async FIFO, and the system side writes them to the DRAM
// write port (valid/ready). The last binary word of a frame carries a marker; when it has
// been written, frame_count increments and frame_done pulses, so the frame is complete in
// DRAM. A word that finds the FIFO full is dropped and sets the sticky overflow flag.
module frame_writer #(
  parameter int unsigned W            = 1920,
  parameter int unsigned H            = 1080,
  parameter int unsigned NFRAMES      = 4,
  parameter int unsigned AW           = 25,         // 128 MB of 32-bit words
  parameter int unsigned FRAME_STRIDE = 1 << 20,    // words per frame slot
  parameter int unsigned FIFO_DEPTH   = 64,
  parameter int unsigned XW           = $clog2(W),
  parameter int unsigned YW           = $clog2(H)
) (
  // camera clock domain
  input  logic          cam_clk,
  input  logic          cam_rst_n,
  input  logic          g_valid,
  input  logic [7:0]    g_pix,
  input  logic [XW-1:0] g_x,
  input  logic          g_sof,
  input  logic          b_valid,
  input  logic          b_bin,
  input  logic [XW-1:0] b_x,
  input  logic [YW-1:0] b_y,
  input  logic          b_last,
  output logic          overflow,
  // system clock domain
  input  logic          sys_clk,
  input  logic          sys_rst_n,
  output logic          mw_valid,
  input  logic          mw_ready,
  output logic [AW-1:0] mw_addr,
  output logic [31:0]   mw_data,
  output logic [15:0]   frame_count,
  output logic          frame_done
);
  localparam int unsigned BIN_OFS = W * H / 4;
  localparam int unsigned SLW     = (NFRAMES > 1) ? $clog2(NFRAMES) : 1;
  localparam int unsigned FW      = 1 + AW + 32;

  typedef struct packed {
    logic          eof;
    logic [AW-1:0] addr;
    logic [31:0]   data;
  } wr_t;

  // ---------------- camera side ----------------
  logic [SLW-1:0] gslot;
  logic [AW-1:0]  gaddr, baddr;
  logic [23:0]    gsh;
  logic [30:0]    bsh;
  logic           bpend, bpend_eof;
  logic [AW-1:0]  bpend_addr;
  logic [31:0]    bpend_data;
  logic           gword, bword;
  wr_t            push_d;
  logic           push, ffull;

  function automatic logic [AW-1:0] slot_base(logic [SLW-1:0] sl);
    return AW'(sl) * AW'(FRAME_STRIDE);
  endfunction

  assign gword = g_valid && (g_x[1:0] == 2'd3);
  assign bword = b_valid && (b_x[4:0] == 5'd31);

  always_comb begin
    push   = 1'b0;
    push_d = '0;
    if (gword) begin
      push = 1'b1;
      push_d.eof  = 1'b0;
      push_d.addr = gaddr;
      push_d.data = {g_pix, gsh};
    end else if (bpend) begin
      push = 1'b1;
      push_d.eof  = bpend_eof;
      push_d.addr = bpend_addr;
      push_d.data = bpend_data;
    end
  end

  always_ff @(posedge cam_clk or negedge cam_rst_n) begin
    if (!cam_rst_n) begin
      gslot <= SLW'(NFRAMES-1); gaddr <= '0; baddr <= '0; gsh <= '0; bsh <= '0;
      bpend <= 1'b0; bpend_eof <= 1'b0; bpend_addr <= '0; bpend_data <= '0; overflow <= 1'b0;
    end else begin
      if (push && ffull) overflow <= 1'b1;
      if (!gword && bpend) bpend <= 1'b0;
      // gray packer
      if (g_valid) begin
        if (g_sof) begin
          gslot <= (32'(gslot) == NFRAMES-1) ? '0 : gslot + 1'b1;
          gaddr <= slot_base((32'(gslot) == NFRAMES-1) ? '0 : gslot + 1'b1);
        end
        gsh <= {g_pix, gsh[23:8]};
        if (gword) gaddr <= gaddr + 1'b1;   // never on the first pixel of a row
      end
      // binary packer
      if (b_valid) begin
        logic [AW-1:0] a;
        a = baddr;
        if (b_x == '0 && b_y == '0) begin
          a = slot_base(gslot) + AW'(BIN_OFS);
        end
        bsh <= {b_bin, bsh[30:1]};
        if (bword) begin
          bpend      <= 1'b1;
          bpend_eof  <= b_last;
          bpend_addr <= a;
          bpend_data <= {b_bin, bsh};
          baddr      <= a + 1'b1;
        end else begin
          baddr <= a;
        end
      end
    end
  end

  // ---------------- clock domain crossing ----------------
  wr_t  pop_d;
  logic fempty;
  logic [FW-1:0] pop_raw;

  async_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(cam_clk), .wrst_n(cam_rst_n), .wr_en(push), .wdata(push_d), .full(ffull),
    .rclk(sys_clk), .rrst_n(sys_rst_n), .rd_en(mw_valid && mw_ready), .rdata(pop_raw),
    .empty(fempty)
  );
  assign pop_d = wr_t'(pop_raw);

  // ---------------- system side ----------------
  assign mw_valid = !fempty;
  assign mw_addr  = pop_d.addr;
  assign mw_data  = pop_d.data;

  always_ff @(posedge sys_clk or negedge sys_rst_n) begin
    if (!sys_rst_n) begin
      frame_count <= '0; frame_done <= 1'b0;
    end else begin
      frame_done <= mw_valid && mw_ready && pop_d.eof;
      if (mw_valid && mw_ready && pop_d.eof) frame_count <= frame_count + 1'b1;
    end
  end
endmodule
