// gray_proc: the grayscale foveal processor. It owns NMEM on-chip fovea memories (128x128
// pixels each) and executes one instruction at a time: an instruction names two source
// memories, one target memory and one processing element. The sources are streamed out in
// raster order, one pixel per clock; input buffers (a 259-pixel shift register per source,
// i.e. two fovea rows plus three pixels) form the 3x3 neighbourhood of every pixel, the
// selected PE (gray_pe) computes the result and it is written to the target memory. When
// the last pixel is written, done pulses for one clock and the global flags are valid:
// white (every result pixel 255), black (every result pixel 0) and change (some result
// pixel differs from the first source, which tells the controller that an iterated
// operation has reached its steady state).
// From the design description: the memories as dual-port BRAMs with the second port in the
// control processor's clock domain, the instruction contents, the 3x3 input buffers, the
// one-active-PE arithmetic unit, the completion signal and the three global flags, and one
// pixel per clock (16,384 clocks for a fovea). This design's choices: pixels outside the
// fovea are replaced by the nearest edge pixel; the target must differ from both sources
// (each memory has a single processor-side port); the pipeline adds 131 clocks, so an
// operation takes 16,516 clocks from accepting the instruction to done.
// Interface: instr_valid/instr accepted when instr_ready (idle); port B of every memory is
// brought out (b_*) for the system side.
module gray_proc
  import saa_pkg::*;
#(
  parameter int unsigned NMEM = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        instr_valid,
  input  gray_instr_t instr,
  output logic        instr_ready,
  output logic        done,
  output gflags_t     flags,
  // system-side ports of the fovea memories
  input  logic        b_clk,
  input  logic [11:0] b_addr  [NMEM],
  input  logic        b_we    [NMEM],
  input  logic [31:0] b_wdata [NMEM],
  output logic [31:0] b_rdata [NMEM]
);
  localparam int unsigned LAG  = FOVEA + 1;          // centre lags newest pixel by 129
  localparam int unsigned SRL  = 2*FOVEA + 3;        // 259
  localparam int unsigned NEND = FOV_PIX + LAG;      // read steps incl. flush

  gray_instr_t  ir;
  logic         busy;
  logic [14:0]  n;                 // read step
  logic         s1_v, s2_v;
  logic [14:0]  s1_n, s2_n;
  logic [7:0]   sra [SRL];
  logic [7:0]   srb [LAG+1];

  logic [13:0]  a_addr  [NMEM];
  logic         a_we    [NMEM];
  logic [7:0]   a_wdata [NMEM];
  logic [7:0]   a_rdata [NMEM];

  for (genvar k = 0; k < NMEM; k++) begin : g_mem
    gray_fovea_mem u_mem (
      .clk_a(clk), .a_addr(a_addr[k]), .a_we(a_we[k]), .a_wdata(a_wdata[k]), .a_rdata(a_rdata[k]),
      .clk_b(b_clk), .b_addr(b_addr[k]), .b_we(b_we[k]), .b_wdata(b_wdata[k]), .b_rdata(b_rdata[k])
    );
  end

  // ---- window of the centre pixel c = s2_n - 129 ----
  logic [13:0]  c;
  logic         wr;
  logic [6:0]   crow, ccol;
  logic [7:0]   win [9];
  logic [7:0]   y;

  assign c    = 14'(s2_n - 15'(LAG));
  assign wr   = s2_v && (s2_n >= 15'(LAG));
  assign crow = c[13:7];
  assign ccol = c[6:0];

  always_comb begin
    for (int dr = -1; dr <= 1; dr++) begin
      for (int dc = -1; dc <= 1; dc++) begin
        int r, q;
        r = dr; q = dc;
        if (crow == 7'd0   && r < 0) r = 0;
        if (crow == 7'd127 && r > 0) r = 0;
        if (ccol == 7'd0   && q < 0) q = 0;
        if (ccol == 7'd127 && q > 0) q = 0;
        win[(dr+1)*3 + (dc+1)] = sra[LAG - r*FOVEA - q];
      end
    end
  end

  gray_pe u_pe (.op(ir.op), .n(win), .b(srb[LAG]), .y(y));

  // ---- memory port A steering ----
  always_comb begin
    for (int k = 0; k < NMEM; k++) begin
      if (busy && 2'(k) == ir.dst) begin
        a_addr[k]  = c;
        a_we[k]    = wr;
        a_wdata[k] = y;
      end else begin
        a_addr[k]  = n[13:0];
        a_we[k]    = 1'b0;
        a_wdata[k] = '0;
      end
    end
  end

  assign instr_ready = !busy;

  always_ff @(posedge clk) begin
    if (s1_v) begin
      sra[0] <= (s1_n < 15'(FOV_PIX)) ? a_rdata[ir.src1] : 8'd0;
      for (int i = 1; i < SRL; i++) sra[i] <= sra[i-1];
      srb[0] <= (s1_n < 15'(FOV_PIX)) ? a_rdata[ir.src2] : 8'd0;
      for (int i = 1; i <= LAG; i++) srb[i] <= srb[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir <= '0; busy <= 1'b0; n <= '0; s1_v <= 1'b0; s2_v <= 1'b0; s1_n <= '0; s2_n <= '0;
      done <= 1'b0; flags <= '0;
    end else begin
      done <= 1'b0;
      s1_v <= busy && (n < 15'(NEND));
      s1_n <= n;
      s2_v <= s1_v;
      s2_n <= s1_n;
      if (!busy) begin
        if (instr_valid) begin
          ir    <= instr;
          busy  <= 1'b1;
          n     <= '0;
          flags <= '{white: 1'b1, black: 1'b1, change: 1'b0};
        end
      end else begin
        if (n < 15'(NEND)) n <= n + 1'b1;
        if (wr) begin
          flags.white  <= flags.white && (y == 8'hFF);
          flags.black  <= flags.black && (y == 8'h00);
          flags.change <= flags.change || (y != win[4]);
          if (c == 14'(FOV_PIX - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // The target shares no processor-side port with a source.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (instr_valid && instr_ready) |-> (instr.dst != instr.src1 && instr.dst != instr.src2))
    else $error("gray_proc: target memory must differ from the sources");
endmodule
