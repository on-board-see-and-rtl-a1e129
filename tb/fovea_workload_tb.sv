// fovea_workload_tb: runs the per-fovea workload of the detection algorithm - 4 grayscale
// operations and 50 binary operations - on the two foveal processors at 150 MHz, both
// working at the same time as they do in the system, and checks that one fovea is finished
// within the time budget that allows 45 foveas per frame with three 16.6 Hz HD streams:
// 1/(3*16.6 Hz)/45 = 446 us. The grayscale sequence is local average, contrast (average -
// pixel), threshold against a constant image and a vertical edge map; the binary sequence
// is 25 dilate/erode pairs. The final images of both processors are read back through the
// system ports and compared with references computed here.
module fovea_workload_tb;
  import saa_pkg::*;
  localparam real BUDGET_US = 1.0e6 / (3.0 * 16.6) / 45.0;
  logic clk = 0, b_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge for the asynchronous resets
  logic g_valid = 0, g_ready, g_done, bi_valid = 0, bi_ready, bi_done;
  gray_instr_t g_instr = '0;
  bin_instr_t  bi_instr = '0;
  gflags_t g_flags, bi_flags;
  logic [11:0] gb_addr [4];
  logic gb_we [4];
  logic [31:0] gb_wdata [4], gb_rdata [4];
  logic [10:0] bb_addr [4];
  logic bb_we [4];
  logic [31:0] bb_wdata [4], bb_rdata [4];
  int checks = 0, failures = 0;
  logic [7:0] g [4][128][128];
  logic bm [2][128][128];
  realtime t0, t_gray, t_bin;

  always #3.333 clk = ~clk;     // 150 MHz
  always #7.5 b_clk = ~b_clk;   // 66 MHz

  gray_proc #(.NMEM(4)) u_gray (
    .clk(clk), .rst_n(rst_n), .instr_valid(g_valid), .instr(g_instr), .instr_ready(g_ready),
    .done(g_done), .flags(g_flags), .b_clk(b_clk), .b_addr(gb_addr), .b_we(gb_we),
    .b_wdata(gb_wdata), .b_rdata(gb_rdata));
  bin_proc #(.NBLK(4)) u_bin (
    .clk(clk), .rst_n(rst_n), .instr_valid(bi_valid), .instr(bi_instr), .instr_ready(bi_ready),
    .done(bi_done), .flags(bi_flags), .b_clk(b_clk), .b_addr(bb_addr), .b_we(bb_we),
    .b_wdata(bb_wdata), .b_rdata(bb_rdata));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cl(int v);
    return v < 0 ? 0 : v > 127 ? 127 : v;
  endfunction

  task automatic gmodel(gray_op_e o, int s1, int s2, int d);
    logic [7:0] t [128][128];
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        int nb [9];
        int s, a, b;
        for (int i = 0; i < 9; i++) nb[i] = int'(g[s1][cl(r + i/3 - 1)][cl(c + i%3 - 1)]);
        a = nb[4]; b = int'(g[s2][r][c]);
        s = 0;
        for (int i = 0; i < 9; i++) s += nb[i];
        case (o)
          G_AVG:    t[r][c] = 8'(s / 9);
          G_SUB:    t[r][c] = 8'(a > b ? a - b : 0);
          G_THRESH: t[r][c] = a > b ? 8'hFF : 8'h00;
          default: begin
            s = nb[0] - nb[2] + 2*nb[3] - 2*nb[5] + nb[6] - nb[8];
            t[r][c] = 8'((s < 0 ? -s : s) / 4);
          end
        endcase
      end
    for (int r = 0; r < 128; r++) for (int c = 0; c < 128; c++) g[d][r][c] = t[r][c];
  endtask

  task automatic bmodel(bin_op_e o, int s, int d);
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        logic all1, any1;
        all1 = 1; any1 = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            logic v;
            v = (r+dr < 0 || r+dr > 127 || c+dc < 0 || c+dc > 127) ? (o == B_ERODE) : bm[s][r+dr][c+dc];
            all1 &= v; any1 |= v;
          end
        bm[d][r][c] = (o == B_ERODE) ? all1 : any1;
      end
  endtask

  task automatic gissue(gray_op_e o, int s1, int s2, int d);
    @(negedge clk);
    g_instr = '{op: o, src1: 2'(s1), src2: 2'(s2), dst: 2'(d)};
    g_valid = 1;
    @(negedge clk); g_valid = 0;
    while (!g_done) @(negedge clk);
  endtask

  task automatic bissue(bin_op_e o, int s, int d);
    @(negedge clk);
    bi_instr = '{op: o, src1: 4'(s), src2: 4'(s), dst: 4'(d)};
    bi_valid = 1;
    @(negedge clk); bi_valid = 0;
    while (!bi_done) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      gb_we[k] = 0; gb_addr[k] = '0; gb_wdata[k] = '0; bb_we[k] = 0; bb_addr[k] = '0; bb_wdata[k] = '0;
    end
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        g[0][r][c] = 8'($urandom_range(100, 200));
        g[3][r][c] = 8'd20;
        bm[0][r][c] = ($urandom_range(0, 99) < 30);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 4096; w++) begin
      @(negedge b_clk);
      for (int m = 0; m < 4; m += 3) begin
        gb_we[m] = 1; gb_addr[m] = 12'(w);
        for (int k = 0; k < 4; k++) gb_wdata[m][8*k +: 8] = g[m][w/32][4*(w%32)+k];
      end
      if (w < 512) begin
        bb_we[0] = 1; bb_addr[0] = 11'(w);
        for (int b = 0; b < 32; b++) bb_wdata[0][b] = bm[0][w/4][32*(w%4)+b];
      end else bb_we[0] = 0;
    end
    @(negedge b_clk); gb_we[0] = 0; gb_we[3] = 0; bb_we[0] = 0;

    t0 = $realtime;
    fork
      begin
        gissue(G_AVG, 0, 0, 1);      gmodel(G_AVG, 0, 0, 1);
        gissue(G_SUB, 1, 0, 2);      gmodel(G_SUB, 1, 0, 2);
        gissue(G_THRESH, 2, 3, 1);   gmodel(G_THRESH, 2, 3, 1);
        gissue(G_EDGE_V, 0, 0, 3);   gmodel(G_EDGE_V, 0, 0, 3);
        t_gray = $realtime - t0;
      end
      begin
        for (int i = 0; i < 25; i++) begin
          bissue(B_DILATE, 0, 4);  bmodel(B_DILATE, 0, 1);
          bissue(B_ERODE, 4, 0);   bmodel(B_ERODE, 1, 0);
        end
        t_bin = $realtime - t0;
      end
    join
    $display("gray 4 ops: %0.1f us, binary 50 ops: %0.1f us, budget %0.1f us",
             t_gray / 1us, t_bin / 1us, BUDGET_US);
    checks++;
    if (t_gray / 1us > BUDGET_US || t_bin / 1us > BUDGET_US) begin failures++; $display("over budget"); end

    // read back: gray memories 1 and 3, binary image 0
    for (int m = 1; m < 4; m += 2)
      for (int w = 0; w < 4096; w++) begin
        @(negedge b_clk); gb_addr[m] = 12'(w);
        @(negedge b_clk);
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (gb_rdata[m][8*k +: 8] != g[m][w/32][4*(w%32)+k]) failures++;
        end
      end
    for (int w = 0; w < 512; w++) begin
      @(negedge b_clk); bb_addr[0] = 11'(w);
      @(negedge b_clk);
      for (int b = 0; b < 32; b++) begin
        checks++;
        if (bb_rdata[0][b] != bm[0][w/4][32*(w%4)+b]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
