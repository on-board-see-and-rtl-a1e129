// async_fifo: dual-clock FIFO used wherever data crosses between the camera, system and
// processor clock domains. The preprocessor hands its results to the other clock domains
// through FIFOs; the construction is the usual one and is this design's own: Gray-coded
// read/write pointers, each synchronised into the other domain with two flip-flops.
// Interface: write side (wclk) wr_en/wdata/full, read side (rclk) rd_en/rdata/empty, with
// first-word-fall-through output (rdata is valid whenever empty is low). DEPTH is a power
// of two. A write is seen by the reader 2-3 rclk cycles later. Resets are active low and
// asynchronous, one per domain.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray, rq1_wgray, rq2_wgray;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(wr_en && !full);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; wq1_rgray <= '0; wq2_rgray <= '0;
    end else begin
      wbin <= wbin_next;
      wgray <= bin2gray(wbin_next);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
    end
  end
  assign full = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
  always_ff @(posedge wclk) if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;

  // read domain
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(rd_en && !empty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; rq1_wgray <= '0; rq2_wgray <= '0;
    end else begin
      rbin <= rbin_next;
      rgray <= bin2gray(rbin_next);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end
  assign empty = (rgray == rq2_wgray);
  assign rdata = mem[rbin[AW-1:0]];

  initial assert (DEPTH >= 4 && (1 << AW) == DEPTH) else $error("async_fifo: DEPTH must be a power of two >= 4");
endmodule
