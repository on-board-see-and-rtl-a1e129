// adaptive_threshold_tb: sends three 16x12 frames (one for each window size 3x3, 5x5, 7x7,
// different thresholds) with random gaps between pixels, random backgrounds and a few dark
// spots, and compares every binary output pixel, in raster order and with its coordinates,
// with a reference computed here from the rule
//   white <=> not within k/2 of the border and sum(k x k) > k*k*(pixel + thr).
// It also checks that each frame yields exactly W*H outputs, that out_last marks the last
// one, and that the first output of a frame follows its 3*W+3-th input pixel.
module adaptive_threshold_tb;
  localparam int W = 16, H = 12;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge for the asynchronous resets
  logic [7:0] cfg_thr = '0;
  logic [1:0] cfg_win = '0;
  logic in_valid = 0, in_sof = 0;
  logic [7:0] in_pix = '0;
  logic out_valid, out_bin, out_last;
  logic [3:0] out_x;
  logic [3:0] out_y;
  int checks = 0, failures = 0, nout = 0, nin = 0, nwhite = 0;
  logic [7:0] img [H][W];
  logic ref_bin [H][W];

  always #5 clk = ~clk;

  adaptive_threshold #(.W(W), .H(H)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_ref(int k, int thr);
    int r;
    r = k / 2;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int s;
        s = 0;
        if (x < r || x >= W - r || y < r || y >= H - r) begin
          ref_bin[y][x] = 0;
        end else begin
          for (int dy = -r; dy <= r; dy++)
            for (int dx = -r; dx <= r; dx++) s += int'(img[y+dy][x+dx]);
          ref_bin[y][x] = (s > k*k*(int'(img[y][x]) + thr));
        end
      end
  endtask

  always @(posedge clk) if (out_valid) begin
    int ex, ey;
    ex = nout % W; ey = nout / W;
    checks++;
    if (int'(out_x) != ex || int'(out_y) != ey || out_bin != ref_bin[ey][ex] ||
        out_last != (nout == W*H-1)) begin
      failures++;
      $display("out %0d: (%0d,%0d) bin=%b exp (%0d,%0d) %b", nout, out_x, out_y, out_bin, ex, ey, ref_bin[ey][ex]);
    end
    if (nout == 0) begin
      checks++;
      if (nin < 3*W + 3) begin failures++; $display("first output after only %0d inputs", nin); end
    end
    if (out_bin) nwhite++;
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int k, thr;
      k = 3 + 2*f;
      thr = 4 + 6*f;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[y][x] = 8'($urandom_range(140, 200));
      for (int i = 0; i < 4; i++) img[$urandom_range(0, H-1)][$urandom_range(0, W-1)] = 8'($urandom_range(0, 60));
      cfg_win = 2'(f); cfg_thr = 8'(thr);
      make_ref(k, thr);
      nout = 0; nin = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_pix = img[y][x]; in_sof = (x == 0 && y == 0);
          @(posedge clk); nin++;
          @(negedge clk);
          in_valid = 0; in_sof = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      repeat (3*W + 20) @(negedge clk);
      checks++;
      if (nout != W*H) begin failures++; $display("frame %0d: %0d outputs", f, nout); end
    end
    checks++;
    if (nwhite == 0) begin failures++; $display("no white pixel was ever produced"); end
    $display("white pixels: %0d", nwhite);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
