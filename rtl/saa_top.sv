// saa_top: image processing part of an on-board see-and-avoid (collision avoidance) system
// for small unmanned aircraft. Camera frames are searched for small dark objects - distant
// aircraft - in two steps. The full-frame preprocessor (camera interface, adaptive threshold,
// 32x32 tile counter) marks candidate pixels in the whole frame and reports how many fall in
// each tile; frames and their binary images are stored in DRAM (frame_writer). The control
// processor then chooses 128x128 windows around the candidates (foveas), has the DMA engine
// cut them out of DRAM into on-chip memories, and examines them with the grayscale and the
// binary foveal processors, one instruction at a time.
// The control processor, the DRAM controller and the interrupt controller are outside this
// module: their connections are ports. The module works in three clock domains:
//   cam_clk   camera pixel clock: cam_if, adaptive_threshold, tile_counter, frame packing
//   sys_clk   control processor / DRAM user clock: tile reports, DRAM ports, fovea DMA,
//             processor instructions and the system side of the fovea memories
//   proc_clk  grayscale and binary processors
// Every crossing goes through an async FIFO (data) or a pulse synchroniser (completion);
// the flags and configuration are quasi-static and pass through two flip-flops (cfg_thr and
// cfg_win are taken at the start of a frame, the processor flags are stable once done has
// pulsed). The two-step candidate/fovea organisation, the units and the clock separation
// follow the design description; the port-level protocols are this design's own.
// While the DMA is busy it owns the system ports of the fovea memories and cpu_*
// accesses are ignored.
module saa_top
  import saa_pkg::*;
#(
  parameter int unsigned W            = 1920,
  parameter int unsigned H            = 1080,
  parameter int unsigned NFRAMES      = 4,
  parameter int unsigned AW           = 25,
  parameter int unsigned FRAME_STRIDE = 1 << 20,
  parameter int unsigned NGRAY        = 4,
  parameter int unsigned NBBLK        = 4
) (
  input  logic          cam_clk,
  input  logic          sys_clk,
  input  logic          proc_clk,
  input  logic          rst_n,
  // camera
  input  logic          cam_fval,
  input  logic          cam_lval,
  input  logic [7:0]    cam_data,
  // preprocessor configuration (sys_clk, quasi-static)
  input  logic [7:0]    cfg_thr,
  input  logic [1:0]    cfg_win,
  // tile reports (sys_clk)
  output logic          tile_valid,
  input  logic          tile_ready,
  output tile_rec_t     tile,
  output logic          tile_overflow,
  output logic          frame_overflow,
  // DRAM write port, frame store (sys_clk)
  output logic          mw_valid,
  input  logic          mw_ready,
  output logic [AW-1:0] mw_addr,
  output logic [31:0]   mw_data,
  output logic [15:0]   frame_count,
  output logic          frame_done,
  // DRAM read port, fovea DMA (sys_clk)
  output logic          mr_valid,
  input  logic          mr_ready,
  output logic [AW-1:0] mr_addr,
  input  logic          rd_valid,
  input  logic [31:0]   rd_data,
  // DMA command (sys_clk)
  input  logic          dma_cmd_valid,
  input  dma_cmd_t      dma_cmd,
  output logic          dma_cmd_ready,
  output logic          dma_done,
  // grayscale processor (sys_clk)
  input  logic          gray_instr_valid,
  input  gray_instr_t   gray_instr,
  output logic          gray_instr_ready,
  output logic          gray_done,
  output gflags_t       gray_flags,
  // binary processor (sys_clk)
  input  logic          bin_instr_valid,
  input  bin_instr_t    bin_instr,
  output logic          bin_instr_ready,
  output logic          bin_done,
  output gflags_t       bin_flags,
  // control processor access to the fovea memories (sys_clk, read data one clock later)
  input  logic [1:0]    cpu_g_sel,
  input  logic [11:0]   cpu_g_addr,
  input  logic          cpu_g_we,
  input  logic [31:0]   cpu_g_wdata,
  output logic [31:0]   cpu_g_rdata,
  input  logic [1:0]    cpu_b_sel,
  input  logic [10:0]   cpu_b_addr,
  input  logic          cpu_b_we,
  input  logic [31:0]   cpu_b_wdata,
  output logic [31:0]   cpu_b_rdata
);
  localparam int unsigned XW = $clog2(W);
  localparam int unsigned YW = $clog2(H);

  logic cam_rst_n, sys_rst_n, proc_rst_n;
  rst_sync u_rs_cam  (.clk(cam_clk),  .arst_n(rst_n), .rst_n(cam_rst_n));
  rst_sync u_rs_sys  (.clk(sys_clk),  .arst_n(rst_n), .rst_n(sys_rst_n));
  rst_sync u_rs_proc (.clk(proc_clk), .arst_n(rst_n), .rst_n(proc_rst_n));

  // ---------------- full-frame preprocessor (cam_clk) ----------------
  logic          pv, psof, pend;
  logic [7:0]    pp;
  logic [XW-1:0] px;
  logic [YW-1:0] py;
  logic [7:0]    thr_s1, thr_s2;
  logic [1:0]    win_s1, win_s2;

  always_ff @(posedge cam_clk or negedge cam_rst_n)
    if (!cam_rst_n) begin
      thr_s1 <= '0; thr_s2 <= '0; win_s1 <= '0; win_s2 <= '0;
    end else begin
      thr_s1 <= cfg_thr; thr_s2 <= thr_s1; win_s1 <= cfg_win; win_s2 <= win_s1;
    end

  cam_if #(.W(W), .H(H)) u_cam (
    .clk(cam_clk), .rst_n(cam_rst_n), .cam_fval(cam_fval), .cam_lval(cam_lval),
    .cam_data(cam_data), .pix_valid(pv), .pix(pp), .pix_x(px), .pix_y(py), .pix_sof(psof),
    .frame_end(pend)
  );

  logic          bv, bb, blast;
  logic [XW-1:0] bx;
  logic [YW-1:0] by;
  adaptive_threshold #(.W(W), .H(H)) u_thr (
    .clk(cam_clk), .rst_n(cam_rst_n), .cfg_thr(thr_s2), .cfg_win(win_s2),
    .in_valid(pv), .in_pix(pp), .in_sof(psof),
    .out_valid(bv), .out_bin(bb), .out_x(bx), .out_y(by), .out_last(blast)
  );

  logic      rec_v;
  tile_rec_t rec;
  tile_counter #(.W(W), .H(H)) u_tiles (
    .clk(cam_clk), .rst_n(cam_rst_n), .in_valid(bv), .in_bin(bb), .in_x(bx), .in_y(by),
    .rec_valid(rec_v), .rec(rec)
  );

  logic tfull, tempty, tovf_cam;
  logic [$bits(tile_rec_t)-1:0] tile_raw;
  async_fifo #(.WIDTH($bits(tile_rec_t)), .DEPTH(64)) u_tile_fifo (
    .wclk(cam_clk), .wrst_n(cam_rst_n), .wr_en(rec_v), .wdata(rec), .full(tfull),
    .rclk(sys_clk), .rrst_n(sys_rst_n), .rd_en(tile_valid && tile_ready), .rdata(tile_raw),
    .empty(tempty)
  );
  assign tile_valid = !tempty;
  assign tile       = tile_rec_t'(tile_raw);

  always_ff @(posedge cam_clk or negedge cam_rst_n)
    if (!cam_rst_n) tovf_cam <= 1'b0;
    else if (rec_v && tfull) tovf_cam <= 1'b1;

  logic fovf_cam;
  frame_writer #(.W(W), .H(H), .NFRAMES(NFRAMES), .AW(AW), .FRAME_STRIDE(FRAME_STRIDE)) u_fw (
    .cam_clk(cam_clk), .cam_rst_n(cam_rst_n),
    .g_valid(pv), .g_pix(pp), .g_x(px), .g_sof(psof),
    .b_valid(bv), .b_bin(bb), .b_x(bx), .b_y(by), .b_last(blast), .overflow(fovf_cam),
    .sys_clk(sys_clk), .sys_rst_n(sys_rst_n),
    .mw_valid(mw_valid), .mw_ready(mw_ready), .mw_addr(mw_addr), .mw_data(mw_data),
    .frame_count(frame_count), .frame_done(frame_done)
  );

  logic [1:0] ovf_s1, ovf_s2;
  always_ff @(posedge sys_clk or negedge sys_rst_n)
    if (!sys_rst_n) begin ovf_s1 <= '0; ovf_s2 <= '0; end
    else begin ovf_s1 <= {tovf_cam, fovf_cam}; ovf_s2 <= ovf_s1; end
  assign tile_overflow  = ovf_s2[1];
  assign frame_overflow = ovf_s2[0];

  // ---------------- fovea DMA (sys_clk) ----------------
  logic        gw_en, bw_en;
  logic [1:0]  gw_sel, bw_sel;
  logic [11:0] gw_addr;
  logic [10:0] bw_addr;
  logic [31:0] gw_data, bw_data;

  fovea_dma #(.W(W), .H(H), .AW(AW), .FRAME_STRIDE(FRAME_STRIDE)) u_dma (
    .clk(sys_clk), .rst_n(sys_rst_n), .cmd_valid(dma_cmd_valid), .cmd(dma_cmd),
    .cmd_ready(dma_cmd_ready), .done(dma_done),
    .mr_valid(mr_valid), .mr_ready(mr_ready), .mr_addr(mr_addr),
    .rd_valid(rd_valid), .rd_data(rd_data),
    .gw_en(gw_en), .gw_sel(gw_sel), .gw_addr(gw_addr), .gw_data(gw_data),
    .bw_en(bw_en), .bw_sel(bw_sel), .bw_addr(bw_addr), .bw_data(bw_data)
  );

  // ---------------- system ports of the fovea memories ----------------
  logic [11:0] gb_addr  [NGRAY];
  logic        gb_we    [NGRAY];
  logic [31:0] gb_wdata [NGRAY];
  logic [31:0] gb_rdata [NGRAY];
  logic [10:0] bb_addr  [NBBLK];
  logic        bb_we    [NBBLK];
  logic [31:0] bb_wdata [NBBLK];
  logic [31:0] bb_rdata [NBBLK];
  logic [1:0]  g_rsel, b_rsel;

  always_comb begin
    for (int k = 0; k < NGRAY; k++) begin
      if (!dma_cmd_ready) begin
        gb_addr[k]  = gw_addr;
        gb_we[k]    = gw_en && gw_sel == 2'(k);
        gb_wdata[k] = gw_data;
      end else begin
        gb_addr[k]  = cpu_g_addr;
        gb_we[k]    = cpu_g_we && cpu_g_sel == 2'(k);
        gb_wdata[k] = cpu_g_wdata;
      end
    end
    for (int k = 0; k < NBBLK; k++) begin
      if (!dma_cmd_ready) begin
        bb_addr[k]  = bw_addr;
        bb_we[k]    = bw_en && bw_sel == 2'(k);
        bb_wdata[k] = bw_data;
      end else begin
        bb_addr[k]  = cpu_b_addr;
        bb_we[k]    = cpu_b_we && cpu_b_sel == 2'(k);
        bb_wdata[k] = cpu_b_wdata;
      end
    end
  end

  always_ff @(posedge sys_clk) begin
    g_rsel <= cpu_g_sel;
    b_rsel <= cpu_b_sel;
  end
  assign cpu_g_rdata = gb_rdata[g_rsel];
  assign cpu_b_rdata = bb_rdata[b_rsel];

  // ---------------- foveal processors (proc_clk) ----------------
  logic        gq_full, gq_empty, g_ready, g_done_p;
  logic [$bits(gray_instr_t)-1:0] gq_data;
  gflags_t     g_flags_p;
  async_fifo #(.WIDTH($bits(gray_instr_t)), .DEPTH(4)) u_gq (
    .wclk(sys_clk), .wrst_n(sys_rst_n), .wr_en(gray_instr_valid), .wdata(gray_instr),
    .full(gq_full),
    .rclk(proc_clk), .rrst_n(proc_rst_n), .rd_en(g_ready), .rdata(gq_data), .empty(gq_empty)
  );
  assign gray_instr_ready = !gq_full;

  gray_proc #(.NMEM(NGRAY)) u_gray (
    .clk(proc_clk), .rst_n(proc_rst_n), .instr_valid(!gq_empty), .instr(gray_instr_t'(gq_data)),
    .instr_ready(g_ready), .done(g_done_p), .flags(g_flags_p),
    .b_clk(sys_clk), .b_addr(gb_addr), .b_we(gb_we), .b_wdata(gb_wdata), .b_rdata(gb_rdata)
  );

  logic        bq_full, bq_empty, b_ready, b_done_p;
  logic [$bits(bin_instr_t)-1:0] bq_data;
  gflags_t     b_flags_p;
  async_fifo #(.WIDTH($bits(bin_instr_t)), .DEPTH(4)) u_bq (
    .wclk(sys_clk), .wrst_n(sys_rst_n), .wr_en(bin_instr_valid), .wdata(bin_instr),
    .full(bq_full),
    .rclk(proc_clk), .rrst_n(proc_rst_n), .rd_en(b_ready), .rdata(bq_data), .empty(bq_empty)
  );
  assign bin_instr_ready = !bq_full;

  bin_proc #(.NBLK(NBBLK)) u_bin (
    .clk(proc_clk), .rst_n(proc_rst_n), .instr_valid(!bq_empty), .instr(bin_instr_t'(bq_data)),
    .instr_ready(b_ready), .done(b_done_p), .flags(b_flags_p),
    .b_clk(sys_clk), .b_addr(bb_addr), .b_we(bb_we), .b_wdata(bb_wdata), .b_rdata(bb_rdata)
  );

  pulse_sync u_gdone (.sclk(proc_clk), .srst_n(proc_rst_n), .spulse(g_done_p),
                      .dclk(sys_clk), .drst_n(sys_rst_n), .dpulse(gray_done));
  pulse_sync u_bdone (.sclk(proc_clk), .srst_n(proc_rst_n), .spulse(b_done_p),
                      .dclk(sys_clk), .drst_n(sys_rst_n), .dpulse(bin_done));

  gflags_t gf_s1, bf_s1;
  always_ff @(posedge sys_clk or negedge sys_rst_n)
    if (!sys_rst_n) begin
      gf_s1 <= '0; gray_flags <= '0; bf_s1 <= '0; bin_flags <= '0;
    end else begin
      gf_s1 <= g_flags_p; gray_flags <= gf_s1;
      bf_s1 <= b_flags_p; bin_flags <= bf_s1;
    end

  // frame-end pulse of the camera is not needed beyond cam_if; instruction FIFO overrun is
  // prevented by the *_instr_ready handshake.
  logic unused;
  assign unused = pend;
endmodule
