// bin_proc: the binary foveal processor. It owns NBLK memory blocks (bin_fovea_mem), each
// holding four 128x128 binary foveas, 16 in all, and executes one instruction at a time:
// two source images, one target image and an operation. A whole fovea row is read per
// clock through the 128-bit port A; the input buffer holds three lines (rows r-1,
// r, r+1), the 128 binary processors (bin_pe_array) compute row r of the result in
// parallel, and it is written to the target on the next clock. Row 0 is read while the
// instruction is offered, and the row below the one computed is taken straight from the RAM
// output, so an operation takes 130 clocks from instr_valid to the done pulse (0.867 us at
// 150 MHz). Global flags as in the grayscale processor: white, black and
// change (result differs from the first source, used to stop iterated reconstruction).
// From the design description: 128-bit row access, four images per block, a three-line
// input buffer feeding a linear array of 128 binary processors, the operation set and the
// global white/black/change signals. This design's choices: image index = {block, slot};
// the target block must differ from the source blocks, and a two-source operation (RECON,
// AND, OR, XOR) needs its sources in different blocks or the same image, because each block
// has one processor-side port; rows outside the fovea are padded as in bin_pe_array.
// Interface: instr_valid/instr accepted when instr_ready; port B of each block is brought
// out (b_*) for the system side.
module bin_proc
  import saa_pkg::*;
#(
  parameter int unsigned NBLK = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        instr_valid,
  input  bin_instr_t  instr,
  output logic        instr_ready,
  output logic        done,
  output gflags_t     flags,
  input  logic        b_clk,
  input  logic [10:0] b_addr  [NBLK],
  input  logic        b_we    [NBLK],
  input  logic [31:0] b_wdata [NBLK],
  output logic [31:0] b_rdata [NBLK]
);
  localparam int unsigned N = FOVEA;

  bin_instr_t   ir;
  logic         busy;
  logic [7:0]   n;          // row whose source data is on the RAM outputs, 0..128

  logic [N-1:0] r_prev, r_cur, m_cur;
  logic [8:0]   a_addr  [NBLK];
  logic         a_we    [NBLK];
  logic [N-1:0] a_wdata [NBLK];
  logic [N-1:0] a_rdata [NBLK];

  for (genvar k = 0; k < NBLK; k++) begin : g_mem
    bin_fovea_mem u_mem (
      .clk_a(clk), .a_addr(a_addr[k]), .a_we(a_we[k]), .a_wdata(a_wdata[k]), .a_rdata(a_rdata[k]),
      .clk_b(b_clk), .b_addr(b_addr[k]), .b_we(b_we[k]), .b_wdata(b_wdata[k]), .b_rdata(b_rdata[k])
    );
  end

  // Row r = n-1 is computed while row n is on the RAM output: the three-line window is
  // r_prev, r_cur and the RAM output itself.
  logic [6:0]   r, rd_row;
  logic         wr, pad;
  logic [N-1:0] up, dn, y;
  bin_instr_t   ai;         // instruction that addresses the source rows

  assign r      = 7'(n - 8'd1);
  assign wr     = busy && (n != 8'd0);
  assign pad    = bin_pad(ir.op);
  assign up     = (r == 7'd0)   ? {N{pad}} : r_prev;
  assign dn     = (r == 7'd127) ? {N{pad}} : a_rdata[ir.src1[3:2]];
  assign ai     = busy ? ir : instr;
  assign rd_row = busy ? 7'(n + 8'd1) : 7'd0;   // row 0 is read while the instruction waits

  bin_pe_array #(.N(N)) u_pes (.op(ir.op), .up(up), .cur(r_cur), .dn(dn), .m(m_cur), .y(y));

  always_comb begin
    for (int k = 0; k < NBLK; k++) begin
      a_we[k]    = 1'b0;
      a_wdata[k] = y;
      if (busy && 2'(k) == ir.dst[3:2]) begin
        a_addr[k] = {ir.dst[1:0], r};
        a_we[k]   = wr;
      end else if (2'(k) == ai.src1[3:2]) begin
        a_addr[k] = {ai.src1[1:0], rd_row};
      end else begin
        a_addr[k] = {ai.src2[1:0], rd_row};
      end
    end
  end

  assign instr_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir <= '0; busy <= 1'b0; n <= '0;
      done <= 1'b0; flags <= '0;
      r_prev <= '0; r_cur <= '0; m_cur <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (instr_valid) begin
          ir    <= instr;
          busy  <= 1'b1;
          n     <= '0;
          flags <= '{white: 1'b1, black: 1'b1, change: 1'b0};
        end
      end else begin
        n      <= n + 1'b1;
        r_prev <= r_cur;
        r_cur  <= a_rdata[ir.src1[3:2]];
        m_cur  <= a_rdata[ir.src2[3:2]];
        if (wr) begin
          flags.white  <= flags.white && (&y);
          flags.black  <= flags.black && !(|y);
          flags.change <= flags.change || (y != r_cur);
          if (r == 7'd127) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (instr_valid && instr_ready) |->
                   (instr.dst[3:2] != instr.src1[3:2] &&
                    (!(instr.op inside {B_RECON, B_AND, B_OR, B_XOR}) ||
                     (instr.dst[3:2] != instr.src2[3:2] &&
                      (instr.src1 == instr.src2 || instr.src1[3:2] != instr.src2[3:2])))))
    else $error("bin_proc: source/target memory block conflict");
endmodule
