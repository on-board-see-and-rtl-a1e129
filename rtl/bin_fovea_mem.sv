// bin_fovea_mem: one memory block of the binary processor. It holds four 128x128 binary
// foveas as 512 rows of 128 bits (row address = {slot[1:0], row[6:0]}); bit c of a row is
// column c. Port A (processor clock) is a whole row, 128 bits, so that the binary processor
// reads or writes a complete fovea row per clock; port B (system clock) is 32 bits wide for
// the control processor and the fovea DMA, addressed as {row address, word[1:0]}, word 0
// holding columns 0..31. On the FPGA the block is four 18-kbit BRAMs side by side; the
// 128-bit port A and the four images per block follow the design description, the 32-bit
// port B is this design's choice. Both ports read synchronously in read-first mode;
// writing one row from both ports in the same cycle is not allowed.
// The memory array is written from two clock domains on purpose (one write port per clock,
// the true dual-port RAM template); the multiple-driver warning this draws is expected.
module bin_fovea_mem (
  input  logic         clk_a,
  input  logic [8:0]   a_addr,
  input  logic         a_we,
  input  logic [127:0] a_wdata,
  output logic [127:0] a_rdata,
  input  logic         clk_b,
  input  logic [10:0]  b_addr,
  input  logic         b_we,
  input  logic [31:0]  b_wdata,
  output logic [31:0]  b_rdata
);
  logic [3:0][31:0] mem [512];

  always @(posedge clk_a) begin
    a_rdata <= mem[a_addr];
    if (a_we) mem[a_addr] <= a_wdata;
  end

  always @(posedge clk_b) begin
    b_rdata <= mem[b_addr[10:2]][b_addr[1:0]];
    if (b_we) mem[b_addr[10:2]][b_addr[1:0]] <= b_wdata;
  end
endmodule
