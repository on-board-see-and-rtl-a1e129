// fovea_dma_tb: a DRAM model filled with random words answers the DMA's read requests in
// order after a random latency, with a randomly stalling ready signal. Gray and binary
// foveas are cut out of two frame slots at several 32-pixel-aligned corners (including the
// frame's right and bottom edges); every word written to the fovea memory ports is
// checked against the frame layout (gray row = W/4 words, binary row = W/32 words, binary
// image at slot base + W*H/4), each fovea word must be written exactly once, and with a
// memory that never stalls a gray fovea must complete in 4096..4110 clocks.
module fovea_dma_tb;
  import saa_pkg::*;
  localparam int W = 256, H = 192, AW = 18, STRIDE = 1 << 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge for the asynchronous resets
  logic cmd_valid = 0, cmd_ready, done;
  dma_cmd_t cmd = '0;
  logic mr_valid, mr_ready = 0, rd_valid = 0;
  logic [AW-1:0] mr_addr;
  logic [31:0] rd_data = '0;
  logic gw_en, bw_en;
  logic [1:0] gw_sel, bw_sel;
  logic [11:0] gw_addr;
  logic [10:0] bw_addr;
  logic [31:0] gw_data, bw_data;
  int checks = 0, failures = 0;
  logic [31:0] dram [1 << AW];
  logic [31:0] got [4096];
  int wcount [4096];
  bit stall;
  logic [AW-1:0] pend [$];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  fovea_dma #(.W(W), .H(H), .AW(AW), .FRAME_STRIDE(STRIDE)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DRAM read model: in-order, random latency and ready when stall is set
  always @(posedge clk) begin
    if (mr_valid && mr_ready) pend.push_back(mr_addr);
    mr_ready <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (pend.size() > 0 && (!stall || $urandom_range(0, 1) == 1)) begin
      rd_valid <= 1'b1;
      rd_data  <= dram[pend.pop_front()];
    end else begin
      rd_valid <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (gw_en) begin got[gw_addr] <= gw_data; wcount[gw_addr]++; end
    if (bw_en) begin got[bw_addr[8:0]] <= bw_data; wcount[bw_addr[8:0]]++; end
  end

  task automatic cut(bit bin, int slot, int tx, int ty, int dst, bit st);
    int cycles, nw, nbad;
    stall = st;
    for (int i = 0; i < 4096; i++) wcount[i] = 0;
    @(negedge clk);
    cmd = '{binary: bin, slot: 2'(slot), tx: 8'(tx), ty: 8'(ty), dst: 4'(dst)};
    cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    nw = bin ? 512 : 4096;
    nbad = 0;
    for (int k = 0; k < nw; k++) begin
      int row, wi, a;
      row = bin ? k / 4 : k / 32;
      wi  = bin ? k % 4 : k % 32;
      a = bin ? slot*STRIDE + W*H/4 + (ty*32 + row)*(W/32) + tx + wi
              : slot*STRIDE + (ty*32 + row)*(W/4) + tx*8 + wi;
      checks++;
      if (got[k] != dram[a] || wcount[k] != 1) begin
        failures++; nbad++;
        if (nbad < 4) $display("bin=%0d word %0d: %h exp %h (%0d writes)", bin, k, got[k], dram[a], wcount[k]);
      end
    end
    if (!st && !bin) begin
      checks++;
      if (cycles < 4096 || cycles > 4110) begin failures++; $display("gray fovea took %0d clocks", cycles); end
    end
    $display("fovea bin=%0d slot=%0d corner=(%0d,%0d): %0d clocks", bin, slot, tx*32, ty*32, cycles);
  endtask

  logic gsel_ok, bsel_ok;
  always @(posedge clk) begin
    if (gw_en && gw_sel != cmd.dst[1:0]) gsel_ok <= 0;
    if (bw_en && (bw_sel != cmd.dst[3:2] || bw_addr[10:9] != cmd.dst[1:0])) bsel_ok <= 0;
  end

  initial begin
    gsel_ok = 1; bsel_ok = 1;
    for (int i = 0; i < (1 << AW); i++) dram[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cut(0, 0, 0, 0, 1, 0);
    cut(0, 1, 3, 2, 2, 1);
    cut(0, 0, (W-128)/32, (H-128)/32, 3, 1);
    cut(1, 0, 1, 1, 6, 0);
    cut(1, 1, (W-128)/32, (H-128)/32, 13, 1);
    checks++;
    if (!gsel_ok || !bsel_ok) begin failures++; $display("wrong target memory selected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
