// cam_if_tb: drives two 16x4 frames through cam_if with horizontal and vertical blanking and
// random pixel data, and checks every output pixel's value and coordinates against the
// order in which the pixels were sent, the start-of-frame flag (first pixel only), the
// one-pixel-clock latency and one end-of-frame pulse per frame.
module cam_if_tb;
  localparam int W = 16, H = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge for the asynchronous resets
  logic cam_fval = 0, cam_lval = 0;
  logic [7:0] cam_data = '0;
  logic pix_valid, pix_sof, frame_end;
  logic [7:0] pix;
  logic [3:0] pix_x;
  logic [1:0] pix_y;
  int checks = 0, failures = 0;
  int nsent = 0, nrecv = 0, nends = 0, nsof = 0;
  logic [7:0] sent [$];
  int sent_t [$];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  cam_if #(.W(W), .H(H)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (pix_valid) begin
      checks++;
      if (pix != sent[nrecv] || int'(pix_x) != nrecv % W || int'(pix_y) != (nrecv / W) % H ||
          pix_sof != (nrecv % (W*H) == 0) || cyc - sent_t[nrecv] != 1) begin
        failures++;
        $display("pixel %0d: got %h (%0d,%0d) sof=%b", nrecv, pix, pix_x, pix_y, pix_sof);
      end
      if (pix_sof) nsof++;
      nrecv++;
    end
    if (frame_end) nends++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk); cam_fval = 1;
      repeat (3) @(negedge clk);
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          cam_lval = 1; cam_data = 8'($urandom);
          sent.push_back(cam_data); sent_t.push_back(cyc + 1);
          @(negedge clk);
        end
        cam_lval = 0; cam_data = 8'($urandom);
        repeat (5) @(negedge clk);
      end
      cam_fval = 0;
      repeat (20) @(negedge clk);
    end
    checks++;
    if (nrecv != 2*W*H || nends != 2 || nsof != 2) begin
      failures++;
      $display("received %0d pixels, %0d frame ends, %0d sof", nrecv, nends, nsof);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
