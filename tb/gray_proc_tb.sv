// gray_proc_tb: loads random and constant foveas through the system-side ports, runs a
// sequence of instructions on the grayscale processor and reads each target back through
// port B. Every result pixel is compared with a reference computed here (3x3 neighbourhood
// with edge pixels repeated outside the fovea), the white/black/change flags with the
// reference image, and the time from instruction to done with the one-pixel-per-clock rate:
// at least 16,384 and at most 16,384 + 160 clocks.
module gray_proc_tb;
  import saa_pkg::*;
  logic clk = 0, b_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge for the asynchronous resets
  logic instr_valid = 0, instr_ready, done;
  gray_instr_t instr = '0;
  gflags_t flags;
  logic [11:0] b_addr [4];
  logic b_we [4];
  logic [31:0] b_wdata [4], b_rdata [4];
  int checks = 0, failures = 0;
  logic [7:0] img [4][128][128];
  logic [7:0] res [128][128];

  always #5 clk = ~clk;
  always #4 b_clk = ~b_clk;

  gray_proc #(.NMEM(4)) dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  function automatic int model(gray_op_e o, int s1, int s2, int r, int c);
    int nb [9];
    int a, b, s;
    int k [9];
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        nb[(dr+1)*3 + dc+1] = int'(img[s1][clampi(r+dr, 0, 127)][clampi(c+dc, 0, 127)]);
    a = nb[4]; b = int'(img[s2][r][c]);
    case (o)
      G_ADD: return (a + b > 255) ? 255 : a + b;
      G_SUB: return (a > b) ? a - b : 0;
      G_MUL: return (a * b) / 256;
      G_ABS: return (a > b) ? a - b : b - a;
      G_THRESH: return (a > b) ? 255 : 0;
      G_AVG: begin s = 0; for (int i = 0; i < 9; i++) s += nb[i]; return s / 9; end
      G_DIFFUSE: return (nb[0] + nb[2] + nb[6] + nb[8] + 2*(nb[1] + nb[3] + nb[5] + nb[7]) + 4*a) / 16;
      G_EDGE_V: begin
        s = nb[0] - nb[2] + 2*nb[3] - 2*nb[5] + nb[6] - nb[8];
        return (s < 0 ? -s : s) / 4;
      end
      G_EDGE_H: begin
        s = nb[0] + 2*nb[1] + nb[2] - nb[6] - 2*nb[7] - nb[8];
        return (s < 0 ? -s : s) / 4;
      end
      G_EDGE_D1: begin
        s = nb[1] + 2*nb[2] - nb[3] + nb[5] - 2*nb[6] - nb[7];
        return (s < 0 ? -s : s) / 4;
      end
      G_EDGE_D2: begin
        s = 2*nb[0] + nb[1] + nb[3] - nb[5] - nb[7] - 2*nb[8];
        return (s < 0 ? -s : s) / 4;
      end
      default: return -1;
    endcase
  endfunction

  task automatic load(int m);
    for (int w = 0; w < 4096; w++) begin
      @(negedge b_clk);
      b_we[m] = 1; b_addr[m] = 12'(w);
      b_wdata[m] = {img[m][w/32][4*(w%32)+3], img[m][w/32][4*(w%32)+2],
                    img[m][w/32][4*(w%32)+1], img[m][w/32][4*(w%32)]};
    end
    @(negedge b_clk); b_we[m] = 0;
  endtask

  task automatic readback(int m);
    for (int w = 0; w < 4096; w++) begin
      @(negedge b_clk); b_addr[m] = 12'(w);
      @(negedge b_clk);
      for (int k = 0; k < 4; k++) res[w/32][4*(w%32)+k] = b_rdata[m][8*k +: 8];
    end
  endtask

  task automatic run(gray_op_e o, int s1, int s2, int d);
    int cyc, nbad, e;
    logic ew, eb, ec;
    @(negedge clk);
    instr = '{op: o, src1: 2'(s1), src2: 2'(s2), dst: 2'(d)};
    instr_valid = 1;
    @(negedge clk);
    instr_valid = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < 16384 || cyc > 16384 + 160) begin failures++; $display("op %0d took %0d clocks", o, cyc); end
    readback(d);
    nbad = 0; ew = 1; eb = 1; ec = 0;
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        e = model(o, s1, s2, r, c);
        ew &= (e == 255); eb &= (e == 0); ec |= (e != int'(img[s1][r][c]));
        checks++;
        if (int'(res[r][c]) != e) begin
          failures++; nbad++;
          if (nbad < 5) $display("op %0d (%0d,%0d): got %0d exp %0d", o, r, c, res[r][c], e);
        end
        img[d][r][c] = 8'(e);
      end
    checks++;
    if (flags != '{white: ew, black: eb, change: ec}) begin
      failures++; $display("op %0d flags %b exp %b%b%b", o, flags, ew, eb, ec);
    end
    $display("op %0d: %0d clocks, flags w=%b b=%b c=%b", o, cyc, flags.white, flags.black, flags.change);
  endtask

  initial begin
    for (int m = 0; m < 4; m++) begin b_we[m] = 0; b_addr[m] = '0; b_wdata[m] = '0; end
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        img[0][r][c] = 8'($urandom);
        img[1][r][c] = 8'($urandom);
        img[2][r][c] = 8'd77;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(0); load(1); load(2);
    run(G_AVG, 2, 2, 3);      // constant image: no change
    for (int o = 0; o < 11; o++) run(gray_op_e'(o), 0, 1, (o % 2) ? 3 : 2);
    run(G_DIFFUSE, 3, 3, 2);  // the target of one operation as the next source
    // all-white and all-black results
    for (int r = 0; r < 128; r++) for (int c = 0; c < 128; c++) img[1][r][c] = 8'hFF;
    load(1);
    run(G_ADD, 0, 1, 2);
    run(G_SUB, 0, 1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
