// frame_writer_tb: sends three 64x8 frames at full pixel rate, the binary stream trailing
// the gray stream by 3*W+3 pixels as it does behind the threshold unit, into a frame_writer
// with two frame slots. A DRAM model with a random ready signal (system clock unrelated to
// the camera clock) stores the writes. After each frame it checks every gray and binary word
// of the slot the frame went to (slot = frame number mod 2, gray at the slot base, binary at
// base + W*H/4), that frame_count advanced by one with a frame_done pulse, and that no word
// was dropped (overflow low).
module frame_writer_tb;
  localparam int W = 64, H = 8, NF = 2, AW = 12, STRIDE = 256, D = 3*W + 3;
  logic cam_clk = 0, sys_clk = 0, cam_rst_n = 1, sys_rst_n = 1;
  initial begin #1; cam_rst_n = 0; sys_rst_n = 0; end   // reset edge for the asynchronous resets
  logic g_valid = 0, g_sof = 0, b_valid = 0, b_bin = 0, b_last = 0;
  logic [7:0] g_pix = '0;
  logic [5:0] g_x = '0, b_x = '0;
  logic [2:0] b_y = '0;
  logic overflow, mw_valid, mw_ready = 0, frame_done;
  logic [AW-1:0] mw_addr;
  logic [31:0] mw_data;
  logic [15:0] frame_count;
  int checks = 0, failures = 0, ndone = 0;
  logic [31:0] dram [1 << AW];
  logic [7:0] gimg [H*W];
  logic bimg [H*W];

  always #5 cam_clk = ~cam_clk;
  always #3 sys_clk = ~sys_clk;

  frame_writer #(.W(W), .H(H), .NFRAMES(NF), .AW(AW), .FRAME_STRIDE(STRIDE)) dut (.*);

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge sys_clk) begin
    if (mw_valid && mw_ready) dram[mw_addr] <= mw_data;
    if (frame_done) ndone++;
    mw_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    for (int i = 0; i < (1 << AW); i++) dram[i] = '0;
    repeat (3) @(posedge cam_clk);
    cam_rst_n = 1; sys_rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int base;
      for (int i = 0; i < W*H; i++) begin
        gimg[i] = 8'($urandom);
        bimg[i] = ($urandom_range(0, 2) == 0);
      end
      for (int i = 0; i < W*H + D; i++) begin
        @(negedge cam_clk);
        g_valid = (i < W*H);
        g_pix = (i < W*H) ? gimg[i] : 8'h0;
        g_x = 6'(i % W);
        g_sof = (i == 0);
        b_valid = (i >= D);
        b_bin = (i >= D) ? bimg[i-D] : 1'b0;
        b_x = 6'((i - D) % W);
        b_y = 3'((i - D) / W);
        b_last = (i - D == W*H - 1);
      end
      @(negedge cam_clk);
      g_valid = 0; b_valid = 0; g_sof = 0; b_last = 0;
      repeat (200) @(posedge sys_clk);
      base = (f % NF) * STRIDE;
      for (int w = 0; w < W*H/4; w++) begin
        logic [31:0] e;
        e = {gimg[4*w+3], gimg[4*w+2], gimg[4*w+1], gimg[4*w]};
        checks++;
        if (dram[base + w] != e) begin
          failures++; $display("frame %0d gray word %0d: %h exp %h", f, w, dram[base + w], e);
        end
      end
      for (int w = 0; w < W*H/32; w++) begin
        logic [31:0] e;
        for (int b = 0; b < 32; b++) e[b] = bimg[32*w + b];
        checks++;
        if (dram[base + W*H/4 + w] != e) begin
          failures++; $display("frame %0d binary word %0d: %h exp %h", f, w, dram[base + W*H/4 + w], e);
        end
      end
      checks++;
      if (int'(frame_count) != f + 1 || ndone != f + 1 || overflow) begin
        failures++; $display("frame_count %0d, done pulses %0d, overflow %b", frame_count, ndone, overflow);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
