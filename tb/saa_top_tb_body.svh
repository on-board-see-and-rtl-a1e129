// saa_top_tb_body.svh: body shared by the end-to-end testbenches of saa_top. The including
// module defines W, H, NFR (frames to send), NSLOT (DRAM frame slots of the design), AW,
// STRIDE, HBL/VBL (camera blanking in pixel clocks), MAXCYC (watchdog, system clocks) and
// the macro SAA_DUT that instantiates the design.

  logic cam_clk = 0, sys_clk = 0, proc_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge for the asynchronous resets
  logic cam_fval = 0, cam_lval = 0;
  logic [7:0] cam_data = '0;
  logic [7:0] cfg_thr = 8'd20;
  logic [1:0] cfg_win = 2'd2;
  logic tile_valid, tile_ready = 1, tile_overflow, frame_overflow;
  tile_rec_t tile;
  logic mw_valid, mw_ready = 0, frame_done;
  logic [AW-1:0] mw_addr, mr_addr;
  logic [31:0] mw_data, rd_data = '0;
  logic [15:0] frame_count;
  logic mr_valid, mr_ready = 0, rd_valid = 0;
  logic dma_cmd_valid = 0, dma_cmd_ready, dma_done;
  dma_cmd_t dma_cmd = '0;
  logic gray_instr_valid = 0, gray_instr_ready, gray_done;
  gray_instr_t gray_instr = '0;
  gflags_t gray_flags, bin_flags;
  logic bin_instr_valid = 0, bin_instr_ready, bin_done;
  bin_instr_t bin_instr = '0;
  logic [1:0] cpu_g_sel = '0, cpu_b_sel = '0;
  logic [11:0] cpu_g_addr = '0;
  logic [10:0] cpu_b_addr = '0;
  logic cpu_g_we = 0, cpu_b_we = 0;
  logic [31:0] cpu_g_wdata = '0, cpu_b_wdata = '0, cpu_g_rdata, cpu_b_rdata;

  always #3 cam_clk = ~cam_clk;       // ~165 MHz pixel clock
  always #7.5 sys_clk = ~sys_clk;     // ~66 MHz control processor clock
  always #3.3 proc_clk = ~proc_clk;   // ~150 MHz processor clock

  `SAA_DUT

  int checks = 0, failures = 0;
  int n_frames = 0, n_tiles = 0, n_dma_g = 0, n_dma_b = 0, n_gdone = 0, n_bdone = 0;
  int n_white = 0, n_black = 0, n_steady = 0, n_qfull = 0, n_wrap = 0;
  int win_used [3];
  int sys_cyc = 0;

  // ---------------- watchdog ----------------
  always @(posedge sys_clk) begin
    sys_cyc++;
    if (sys_cyc > MAXCYC) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ---------------- DRAM model: write port and in-order read port ----------------
  logic [31:0] dram [int];
  logic [AW-1:0] rq [$];
  always @(posedge sys_clk) begin
    if (mw_valid && mw_ready) dram[int'(mw_addr)] = mw_data;
    mw_ready <= ($urandom_range(0, 9) != 0);
    if (mr_valid && mr_ready) rq.push_back(mr_addr);
    mr_ready <= ($urandom_range(0, 7) != 0);
    if (rq.size() > 0 && $urandom_range(0, 3) != 0) begin
      rd_valid <= 1'b1;
      rd_data  <= dram.exists(int'(rq[0])) ? dram[int'(rq[0])] : 32'h0;
      void'(rq.pop_front());
    end else begin
      rd_valid <= 1'b0;
    end
  end

  // ---------------- event counters ----------------
  tile_rec_t got_tiles [$];
  always @(posedge sys_clk) if (rst_n && sys_cyc > 20) begin   // count once out of reset
    if (tile_valid && tile_ready) begin got_tiles.push_back(tile); n_tiles++; end
    if (frame_done) n_frames++;
    if (dma_done) begin if (dma_cmd.binary) n_dma_b++; else n_dma_g++; end
    if (gray_done) n_gdone++;
    if (bin_done) n_bdone++;
    if (bin_instr_valid && !bin_instr_ready) n_qfull++;
  end

  // ---------------- reference images ----------------
  logic [7:0] img [H][W];
  logic       bref [H][W];
  tile_rec_t  exp_tiles [$];

  task automatic make_frame(int f);
    int ax, ay;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = 120 + (y * 60) / H + $urandom_range(0, 6);
        if (x > W/2 + 16 + y/4) v = 215 + $urandom_range(0, 6);      // cloud with a slanted edge
        img[y][x] = 8'(v);
      end
    for (int k = 0; k < 2; k++) begin
      ax = (k == 0) ? 40 + 9*f : W/2 + 60;
      ay = (k == 0) ? 50 + 5*f : H - 40;
      for (int dy = 0; dy < 3; dy++)
        for (int dx = 0; dx < 4; dx++) img[ay+dy][ax+dx] = 8'd45;
    end
  endtask

  task automatic make_ref(int k, int thr);
    int r;
    r = k / 2;
    exp_tiles.delete();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int s;
        s = 0;
        if (x < r || x >= W - r || y < r || y >= H - r) bref[y][x] = 0;
        else begin
          for (int dy = -r; dy <= r; dy++)
            for (int dx = -r; dx <= r; dx++) s += int'(img[y+dy][x+dx]);
          bref[y][x] = (s > k*k*(int'(img[y][x]) + thr));
        end
      end
    for (int ty = 0; ty < (H + 31) / 32; ty++)
      for (int tx = 0; tx < W / 32; tx++) begin
        int c;
        c = 0;
        for (int y = ty*32; y < ty*32 + 32 && y < H; y++)
          for (int x = tx*32; x < tx*32 + 32; x++) c += int'(bref[y][x]);
        if (c != 0) exp_tiles.push_back('{tx: 8'(tx), ty: 8'(ty), count: 11'(c)});
      end
  endtask

  task automatic send_frame();
    @(negedge cam_clk); cam_fval = 1;
    repeat (4) @(negedge cam_clk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        cam_lval = 1; cam_data = img[y][x];
        @(negedge cam_clk);
      end
      cam_lval = 0; cam_data = 8'($urandom);
      repeat (HBL) @(negedge cam_clk);
    end
    cam_fval = 0;
    repeat (VBL) @(negedge cam_clk);
  endtask

  task automatic check_frame(int f);
    int base, nbad;
    base = (f % NSLOT) * STRIDE;
    nbad = 0;
    for (int y = 0; y < H; y++)
      for (int w = 0; w < W/4; w++) begin
        logic [31:0] e;
        e = {img[y][4*w+3], img[y][4*w+2], img[y][4*w+1], img[y][4*w]};
        checks++;
        if (!dram.exists(base + y*(W/4) + w) || dram[base + y*(W/4) + w] != e) begin
          failures++; nbad++;
          if (nbad < 4) $display("frame %0d gray word (%0d,%0d) wrong", f, y, w);
        end
      end
    for (int y = 0; y < H; y++)
      for (int w = 0; w < W/32; w++) begin
        logic [31:0] e;
        int a;
        for (int b = 0; b < 32; b++) e[b] = bref[y][32*w + b];
        a = base + W*H/4 + y*(W/32) + w;
        checks++;
        if (!dram.exists(a) || dram[a] != e) begin
          failures++; nbad++;
          if (nbad < 8) $display("frame %0d binary word (%0d,%0d) wrong", f, y, w);
        end
      end
    checks++;
    if (got_tiles.size() != exp_tiles.size()) begin
      failures++; $display("frame %0d: %0d tile reports, expected %0d", f, got_tiles.size(), exp_tiles.size());
    end else begin
      foreach (exp_tiles[i]) begin
        checks++;
        if (got_tiles[i] != exp_tiles[i]) begin
          failures++; $display("frame %0d tile report %0d differs", f, i);
        end
      end
    end
    $display("frame %0d (window %0dx%0d): %0d tiles reported", f, 3 + 2*(f % 3), 3 + 2*(f % 3), got_tiles.size());
  endtask

  // ---------------- control processor helpers ----------------
  task automatic sys_wait(int n);
    repeat (n) @(negedge sys_clk);
  endtask

  task automatic dma(bit bin, int slot, int tx, int ty, int dst);
    @(negedge sys_clk);
    while (!dma_cmd_ready) @(negedge sys_clk);
    dma_cmd = '{binary: bin, slot: 2'(slot), tx: 8'(tx), ty: 8'(ty), dst: 4'(dst)};
    dma_cmd_valid = 1;
    @(negedge sys_clk); dma_cmd_valid = 0;
    while (!dma_done) @(negedge sys_clk);
  endtask

  logic [7:0] gmem [4][128][128];   // reference fovea memories
  logic       bmem [16][128][128];

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  task automatic gray_check(int m);
    int nbad;
    nbad = 0;
    for (int w = 0; w < 4096; w++) begin
      @(negedge sys_clk); cpu_g_sel = 2'(m); cpu_g_addr = 12'(w);
      @(negedge sys_clk);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (cpu_g_rdata[8*k +: 8] != gmem[m][w/32][4*(w%32)+k]) begin
          failures++; nbad++;
          if (nbad < 4) $display("gray mem %0d pixel %0d: %0d exp %0d", m, 4*w+k, cpu_g_rdata[8*k +: 8], gmem[m][w/32][4*(w%32)+k]);
        end
      end
    end
  endtask

  task automatic bin_check(int i);
    int nbad;
    nbad = 0;
    for (int w = 0; w < 512; w++) begin
      @(negedge sys_clk); cpu_b_sel = 2'(i / 4); cpu_b_addr = {2'(i % 4), 9'(w)};
      @(negedge sys_clk);
      for (int b = 0; b < 32; b++) begin
        checks++;
        if (cpu_b_rdata[b] != bmem[i][w/4][32*(w%4)+b]) begin
          failures++; nbad++;
          if (nbad < 4) $display("binary image %0d pixel (%0d,%0d) wrong", i, w/4, 32*(w%4)+b);
        end
      end
    end
  endtask

  // grayscale op on the reference memories (only the ops this test uses)
  task automatic gray_model(gray_op_e o, int s1, int s2, int d);
    logic [7:0] t [128][128];
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        int a, b, s;
        a = int'(gmem[s1][r][c]); b = int'(gmem[s2][r][c]);
        s = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) s += int'(gmem[s1][clampi(r+dr, 0, 127)][clampi(c+dc, 0, 127)]);
        case (o)
          G_AVG:    t[r][c] = 8'(s / 9);
          G_SUB:    t[r][c] = 8'((a > b) ? a - b : 0);
          G_THRESH: t[r][c] = (a > b) ? 8'hFF : 8'h00;
          default:  t[r][c] = 8'h00;
        endcase
      end
    for (int r = 0; r < 128; r++) for (int c = 0; c < 128; c++) gmem[d][r][c] = t[r][c];
  endtask

  function automatic logic bpx(int i, int r, int c, logic pad);
    return (r < 0 || r > 127 || c < 0 || c > 127) ? pad : bmem[i][r][c];
  endfunction

  // binary op on the reference memories; returns the change flag
  function automatic logic bin_model(bin_op_e o, int s1, int s2, int d);
    logic t [128][128];
    logic ch;
    ch = 0;
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        logic pad, all1, any1, anyn;
        pad = (o == B_ERODE); all1 = 1; any1 = 0; anyn = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            logic v;
            v = bpx(s1, r+dr, c+dc, pad);
            all1 &= v; any1 |= v;
            if (dr != 0 || dc != 0) anyn |= v;
          end
        case (o)
          B_ERODE:  t[r][c] = all1;
          B_DILATE: t[r][c] = any1;
          B_SPR:    t[r][c] = bmem[s1][r][c] & anyn;
          B_RECON:  t[r][c] = any1 & bmem[s2][r][c];
          B_AND:    t[r][c] = bmem[s1][r][c] & bmem[s2][r][c];
          B_OR:     t[r][c] = bmem[s1][r][c] | bmem[s2][r][c];
          default:  t[r][c] = bmem[s1][r][c] ^ bmem[s2][r][c];
        endcase
        ch |= (t[r][c] != bmem[s1][r][c]);
      end
    for (int r = 0; r < 128; r++) for (int c = 0; c < 128; c++) bmem[d][r][c] = t[r][c];
    return ch;
  endfunction

  task automatic gray_op(gray_op_e o, int s1, int s2, int d);
    int t0;
    @(negedge sys_clk);
    while (!gray_instr_ready) @(negedge sys_clk);
    gray_instr = '{op: o, src1: 2'(s1), src2: 2'(s2), dst: 2'(d)};
    gray_instr_valid = 1;
    @(negedge sys_clk); gray_instr_valid = 0;
    t0 = sys_cyc;
    while (!gray_done) @(negedge sys_clk);
    sys_wait(2);
    gray_model(o, s1, s2, d);
    if (gray_flags.white) n_white++;
    if (gray_flags.black) n_black++;
    $display("gray op %0d: %0d system clocks, flags w=%b b=%b c=%b", o, sys_cyc - t0,
             gray_flags.white, gray_flags.black, gray_flags.change);
  endtask

  task automatic bin_issue(bin_op_e o, int s1, int s2, int d);
    @(negedge sys_clk);
    bin_instr = '{op: o, src1: 4'(s1), src2: 4'(s2), dst: 4'(d)};
    bin_instr_valid = 1;
    @(posedge sys_clk);
    while (!bin_instr_ready) @(posedge sys_clk);
    @(negedge sys_clk); bin_instr_valid = 0;
    void'(bin_model(o, s1, s2, d));
  endtask

  // ---------------- main sequence ----------------
  initial begin
    tile_rec_t best;
    int ftx, fty, slot, nb0, iters, nprev;
    logic ch;
    repeat (5) @(posedge sys_clk);
    rst_n = 1;
    repeat (10) @(posedge sys_clk);
    for (int f = 0; f < NFR; f++) begin
      cfg_win = 2'((NFR == 1) ? 2 : f % 3);
      cfg_thr = 8'(16 + 4*f);
      win_used[int'(cfg_win)]++;
      make_frame(f);
      make_ref(3 + 2*int'(cfg_win), int'(cfg_thr));
      got_tiles.delete();
      nprev = n_frames;
      send_frame();
      while (n_frames == nprev) @(negedge sys_clk);
      sys_wait(20);
      if (f >= NSLOT) n_wrap++;
      check_frame(f);
    end
    checks++;
    if (tile_overflow || frame_overflow) begin failures++; $display("overflow flag set"); end

    // candidate selection: tile with the most white pixels in the last frame
    best = got_tiles[0];
    foreach (got_tiles[i]) if (got_tiles[i].count > best.count) best = got_tiles[i];
    ftx = clampi(int'(best.tx) - 1, 0, W/32 - 4);
    fty = clampi(int'(best.ty) - 1, 0, (H - 128) / 32);
    slot = (NFR - 1) % NSLOT;
    $display("fovea at (%0d,%0d) around tile (%0d,%0d) with %0d candidate pixels",
             ftx*32, fty*32, best.tx, best.ty, best.count);
    dma(0, slot, ftx, fty, 0);
    dma(1, slot, ftx, fty, 0);
    nb0 = 0;
    for (int r = 0; r < 128; r++)
      for (int c = 0; c < 128; c++) begin
        gmem[0][r][c] = img[fty*32 + r][ftx*32 + c];
        bmem[0][r][c] = bref[fty*32 + r][ftx*32 + c];
        nb0 += int'(bmem[0][r][c]);
      end
    gray_check(0);
    bin_check(0);

    // grayscale processing of the fovea
    gray_op(G_AVG, 0, 0, 1);
    gray_check(1);
    gray_op(G_SUB, 1, 0, 2);           // local contrast of dark objects
    gray_check(2);
    gray_op(G_THRESH, 0, 0, 3);        // a > a never holds: all black
    gray_check(3);
    gray_op(G_THRESH, 0, 3, 2);        // every pixel above 0: all white
    gray_check(2);

    // binary processing: a queue of operations issued back to back
    bin_issue(B_DILATE, 0, 0, 4);
    bin_issue(B_ERODE, 4, 4, 8);       // closing of the candidate mask
    bin_issue(B_SPR, 8, 8, 12);
    bin_issue(B_OR, 12, 0, 5);
    bin_issue(B_AND, 5, 12, 9);
    bin_issue(B_XOR, 9, 9, 13);        // all black
    while (n_bdone < 6) @(negedge sys_clk);
    sys_wait(3);
    checks++;
    if (!bin_flags.black) begin failures++; $display("black flag missing"); end
    else n_black++;
    bin_check(4); bin_check(8); bin_check(12); bin_check(5); bin_check(9); bin_check(13);

    // iterated reconstruction from the closed mask's top-left candidate, until steady
    for (int r = 0; r < 128; r++) for (int c = 0; c < 128; c++) bmem[1][r][c] = 1'b0;
    begin
      bit found;
      found = 0;
      for (int r = 0; r < 128 && !found; r++)
        for (int c = 0; c < 128 && !found; c++)
          if (bmem[8][r][c]) begin bmem[1][r][c] = 1'b1; found = 1; end
    end
    for (int w = 0; w < 512; w++) begin
      @(negedge sys_clk);
      cpu_b_sel = 2'd0; cpu_b_addr = {2'd1, 9'(w)}; cpu_b_we = 1;
      for (int b = 0; b < 32; b++) cpu_b_wdata[b] = bmem[1][w/4][32*(w%4)+b];
    end
    @(negedge sys_clk); cpu_b_we = 0;
    iters = 0;
    do begin
      int s, d;
      s = (iters % 2 == 0) ? 1 : 14;
      d = (iters % 2 == 0) ? 14 : 1;
      bin_issue(B_RECON, s, 8, d);
      nprev = n_bdone;
      while (n_bdone == nprev) @(negedge sys_clk);
      sys_wait(3);
      ch = bin_flags.change;
      iters++;
    end while (ch && iters < 300);
    if (!ch) n_steady++;
    bin_check((iters % 2) ? 14 : 1);
    $display("reconstruction steady after %0d steps", iters);

    // every mechanism must have happened
    checks++;
    if (n_frames != NFR || n_tiles == 0 || n_dma_g != 1 || n_dma_b != 1 || n_gdone != 4 ||
        n_bdone != 6 + iters || n_white == 0 || n_black < 2 || n_steady == 0 || n_qfull == 0 ||
        (NFR > NSLOT && n_wrap == 0) || (NFR >= 3 && (win_used[0] == 0 || win_used[1] == 0 || win_used[2] == 0))) begin
      failures++;
    end
    $display("events: frames=%0d tiles=%0d dma gray=%0d bin=%0d gray ops=%0d bin ops=%0d white=%0d black=%0d steady=%0d queue full=%0d slot wrap=%0d windows 3/5/7=%0d/%0d/%0d",
             n_frames, n_tiles, n_dma_g, n_dma_b, n_gdone, n_bdone, n_white, n_black, n_steady, n_qfull, n_wrap,
             win_used[0], win_used[1], win_used[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
