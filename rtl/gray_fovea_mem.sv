// gray_fovea_mem: on-chip memory for one 128x128 8-bit grayscale fovea, true dual port
// with one port per clock domain, as in the grayscale processor's memory organisation:
// port A (processor clock) is pixel wide and used by the grayscale processor, port B
// (system clock) is 32 bits wide and used by the control processor and the fovea DMA.
// Pixel p = row*128 + col lives in word p/4, byte p%4 (byte 0 = lowest bits).
// Both ports read synchronously (data one clock after the address) in read-first mode.
// Written in the usual two-process dual-port RAM style so that it maps to block RAM; the
// port widths are this design's choice. Writes to one address from both ports in the same
// cycle are not allowed (the result is undefined, as for the FPGA primitive).
// The memory array is written from two clock domains on purpose (one write port per clock,
// the true dual-port RAM template); the multiple-driver warning this draws is expected.
module gray_fovea_mem (
  input  logic        clk_a,
  input  logic [13:0] a_addr,
  input  logic        a_we,
  input  logic [7:0]  a_wdata,
  output logic [7:0]  a_rdata,
  input  logic        clk_b,
  input  logic [11:0] b_addr,
  input  logic        b_we,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata
);
  logic [3:0][7:0] mem [4096];

  always @(posedge clk_a) begin
    a_rdata <= mem[a_addr[13:2]][a_addr[1:0]];
    if (a_we) mem[a_addr[13:2]][a_addr[1:0]] <= a_wdata;
  end

  always @(posedge clk_b) begin
    b_rdata <= mem[b_addr];
    if (b_we) mem[b_addr] <= b_wdata;
  end
endmodule
