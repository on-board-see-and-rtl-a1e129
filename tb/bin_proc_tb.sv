// bin_proc_tb: loads random binary foveas (different densities) into the four memory blocks
// through the 32-bit system ports, runs every binary operation and reads each target back,
// comparing every pixel with a reference computed here (erosion pads with 1, everything else
// with 0), and the white/black/change flags. The time from instruction to done must be
// 129..130 clocks (one fovea row per clock). Finally it reconstructs a mask from a single
// seed by repeating RECON until the change flag drops, ping-ponging between two blocks, and
// compares the result with a flood fill computed here.
module bin_proc_tb;
  import saa_pkg::*;
  logic clk = 0, b_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge for the asynchronous resets
  logic instr_valid = 0, instr_ready, done;
  bin_instr_t instr = '0;
  gflags_t flags;
  logic [10:0] b_addr [4];
  logic b_we [4];
  logic [31:0] b_wdata [4], b_rdata [4];
  int checks = 0, failures = 0;
  logic [127:0] img [16][128];
  logic [127:0] res [128];

  always #5 clk = ~clk;
  always #4 b_clk = ~b_clk;

  bin_proc #(.NBLK(4)) dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic px(int i, int r, int c, logic pad);
    return (r < 0 || r > 127 || c < 0 || c > 127) ? pad : img[i][r][c];
  endfunction

  function automatic logic model(bin_op_e o, int s1, int s2, int r, int c);
    logic pad, all1, any1, anyn;
    pad = (o == B_ERODE);
    all1 = 1; any1 = 0; anyn = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) begin
        logic v;
        v = px(s1, r + dr, c + dc, pad);
        all1 &= v; any1 |= v;
        if (dr != 0 || dc != 0) anyn |= v;
      end
    case (o)
      B_ERODE:  return all1;
      B_DILATE: return any1;
      B_SPR:    return img[s1][r][c] & anyn;
      B_RECON:  return any1 & img[s2][r][c];
      B_AND:    return img[s1][r][c] & img[s2][r][c];
      B_OR:     return img[s1][r][c] | img[s2][r][c];
      default:  return img[s1][r][c] ^ img[s2][r][c];
    endcase
  endfunction

  task automatic load(int i);
    int blk;
    blk = i / 4;
    for (int w = 0; w < 512; w++) begin
      @(negedge b_clk);
      b_we[blk] = 1; b_addr[blk] = {2'(i % 4), 9'(w)};
      b_wdata[blk] = img[i][w / 4][32*(w % 4) +: 32];
    end
    @(negedge b_clk); b_we[blk] = 0;
  endtask

  task automatic readback(int i);
    int blk;
    blk = i / 4;
    for (int w = 0; w < 512; w++) begin
      @(negedge b_clk); b_addr[blk] = {2'(i % 4), 9'(w)};
      @(negedge b_clk);
      res[w / 4][32*(w % 4) +: 32] = b_rdata[blk];
    end
  endtask

  task automatic run(bin_op_e o, int s1, int s2, int d, bit check_pixels);
    int cyc, nbad;
    logic e, ew, eb, ec;
    logic [127:0] nimg [128];
    @(negedge clk);
    instr = '{op: o, src1: 4'(s1), src2: 4'(s2), dst: 4'(d)};
    instr_valid = 1;
    @(negedge clk);
    instr_valid = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc < 129 || cyc > 130) begin failures++; $display("op %0d took %0d clocks", o, cyc); end
    if (check_pixels) readback(d);
    nbad = 0; ew = 1; eb = 1; ec = 0;
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        e = model(o, s1, s2, r, c);
        ew &= e; eb &= !e; ec |= (e != img[s1][r][c]);
        nimg[r][c] = e;
        if (check_pixels) begin
          checks++;
          if (res[r][c] != e) begin
            failures++; nbad++;
            if (nbad < 5) $display("op %0d (%0d,%0d): got %b", o, r, c, res[r][c]);
          end
        end
      end
    for (int r = 0; r < 128; r++) img[d][r] = nimg[r];
    checks++;
    if (flags != '{white: ew, black: eb, change: ec}) begin
      failures++; $display("op %0d flags %b exp %b%b%b", o, flags, ew, eb, ec);
    end
    $display("op %0d: %0d clocks, flags w=%b b=%b c=%b", o, cyc, flags.white, flags.black, flags.change);
  endtask

  initial begin
    int iters;
    for (int k = 0; k < 4; k++) begin b_we[k] = 0; b_addr[k] = '0; b_wdata[k] = '0; end
    for (int i = 0; i < 16; i++)
      for (int r = 0; r < 128; r++)
        for (int c = 0; c < 128; c++)
          img[i][r][c] = ($urandom_range(0, 99) < ((i % 4) * 25 + 10));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) load(i);
    run(B_ERODE, 3, 3, 4, 1);     // dense source (85 %)
    run(B_DILATE, 1, 1, 8, 1);
    run(B_SPR, 0, 0, 13, 1);      // sparse source: many single pixels
    run(B_RECON, 2, 6, 12, 1);
    run(B_AND, 1, 5, 9, 1);
    run(B_OR, 2, 7, 14, 1);
    run(B_XOR, 15, 11, 3, 1);
    run(B_XOR, 1, 1, 10, 1);      // all black
    run(B_DILATE, 11, 11, 2, 1);  // dense: all white
    run(B_AND, 6, 6, 15, 1);      // unchanged copy
    // reconstruction of mask image 11 (about 85 % white) from one seed pixel
    for (int r = 0; r < 128; r++) img[0][r] = '0;
    img[11][64][64] = 1'b1;
    img[0][64][64] = 1'b1;
    load(0); load(11);
    iters = 0;
    do begin
      if (iters % 2 == 0) run(B_RECON, 0, 11, 4, 0); else run(B_RECON, 4, 11, 0, 0);
      iters++;
    end while (flags.change && iters < 400);
    readback((iters % 2) ? 4 : 0);
    // reference flood fill of the mask from the seed (8-connected)
    begin
      logic [127:0] ff [128];
      bit grown;
      for (int r = 0; r < 128; r++) ff[r] = '0;
      ff[64][64] = 1;
      do begin
        grown = 0;
        for (int r = 0; r < 128; r++)
          for (int c = 0; c < 128; c++)
            if (!ff[r][c] && img[11][r][c])
              for (int dr = -1; dr <= 1; dr++)
                for (int dc = -1; dc <= 1; dc++)
                  if (r+dr >= 0 && r+dr < 128 && c+dc >= 0 && c+dc < 128 && ff[r+dr][c+dc]) begin
                    ff[r][c] = 1; grown = 1;
                  end
      end while (grown);
      checks++;
      for (int r = 0; r < 128; r++)
        if (res[r] != ff[r]) begin failures++; $display("reconstruction row %0d differs", r); break; end
    end
    $display("reconstruction converged after %0d steps", iters);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
