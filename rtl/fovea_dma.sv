// fovea_dma: the DMA engine that cuts a 128x128 fovea out of a frame stored in DRAM and
// copies it into an on-chip fovea memory, grayscale or binary. As the design requires, the
// fovea's top-left corner lies on the 32-pixel grid (the command gives it in tile units),
// so every fovea row starts on a DRAM word: a gray row is 32 words (4 pixels per word), a
// binary row 4 words (32 pixels per word), in the frame layout written by frame_writer.
// How it works: one address generator issues read requests (valid/ready) row by row, one
// word per accepted request; the memory returns data in order, one word per rd_valid and
// without back-pressure, and a second counter steers each returning word into the target
// memory (gray memory cmd.dst[1:0] at word k, or binary block cmd.dst[3:2] at
// {slot cmd.dst[1:0], k}). done pulses when the last word has been written; with a memory
// that accepts a request per clock, a gray fovea takes about 4096 clocks and a binary one 512.
// The DMA itself, the fovea size and the alignment rule follow the design description; the
// port protocol, the command format and the in-order read return are this design's choices.
// gw_data and bw_data are rd_data passed straight through: the DMA only adds the addresses
// and write strobes.
module fovea_dma
  import saa_pkg::*;
#(
  parameter int unsigned W            = 1920,
  parameter int unsigned H            = 1080,
  parameter int unsigned AW           = 25,
  parameter int unsigned FRAME_STRIDE = 1 << 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  input  dma_cmd_t      cmd,
  output logic          cmd_ready,
  output logic          done,
  // DRAM read port
  output logic          mr_valid,
  input  logic          mr_ready,
  output logic [AW-1:0] mr_addr,
  input  logic          rd_valid,
  input  logic [31:0]   rd_data,
  // fovea memory write ports
  output logic          gw_en,
  output logic [1:0]    gw_sel,
  output logic [11:0]   gw_addr,
  output logic [31:0]   gw_data,
  output logic          bw_en,
  output logic [1:0]    bw_sel,
  output logic [10:0]   bw_addr,
  output logic [31:0]   bw_data
);
  localparam int unsigned BIN_OFS = W * H / 4;

  dma_cmd_t      c;
  logic          busy;
  logic [11:0]   rq, dk;          // words requested / words received
  logic [4:0]    wi;              // word within the row
  logic [AW-1:0] row_addr;
  logic          last_rq;

  function automatic logic [11:0] nwords(logic bin);
    return bin ? 12'd511 : 12'd4095;   // last word index
  endfunction

  assign cmd_ready = !busy;
  assign mr_valid  = busy && !last_rq;
  assign mr_addr   = row_addr + AW'(wi);

  assign gw_en   = busy && rd_valid && !c.binary;
  assign gw_sel  = c.dst[1:0];
  assign gw_addr = dk;
  assign gw_data = rd_data;
  assign bw_en   = busy && rd_valid && c.binary;
  assign bw_sel  = c.dst[3:2];
  assign bw_addr = {c.dst[1:0], dk[8:0]};
  assign bw_data = rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; busy <= 1'b0; rq <= '0; dk <= '0; wi <= '0; row_addr <= '0; last_rq <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (cmd_valid) begin
          c        <= cmd;
          busy     <= 1'b1;
          rq       <= '0;
          dk       <= '0;
          wi       <= '0;
          last_rq  <= 1'b0;
          if (cmd.binary)
            row_addr <= AW'(cmd.slot) * AW'(FRAME_STRIDE) + AW'(BIN_OFS) +
                        AW'(cmd.ty) * AW'(TILE) * AW'(W / 32) + AW'(cmd.tx);
          else
            row_addr <= AW'(cmd.slot) * AW'(FRAME_STRIDE) +
                        AW'(cmd.ty) * AW'(TILE) * AW'(W / 4) + AW'(cmd.tx) * AW'(TILE / 4);
        end
      end else begin
        if (mr_valid && mr_ready) begin
          rq <= rq + 1'b1;
          if (rq == nwords(c.binary)) last_rq <= 1'b1;
          if (wi == (c.binary ? 5'd3 : 5'd31)) begin
            wi       <= '0;
            row_addr <= row_addr + (c.binary ? AW'(W / 32) : AW'(W / 4));
          end else begin
            wi <= wi + 1'b1;
          end
        end
        if (rd_valid) begin
          dk <= dk + 1'b1;
          if (dk == nwords(c.binary)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (cmd_valid && cmd_ready) |->
                   (32'(cmd.tx) * TILE + FOVEA <= W && 32'(cmd.ty) * TILE + FOVEA <= H))
    else $error("fovea_dma: fovea exceeds the frame");
endmodule
