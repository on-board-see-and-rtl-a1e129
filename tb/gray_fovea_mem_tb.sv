// gray_fovea_mem_tb: writes random pixels through the pixel-wide port A (processor clock)
// and random words through the 32-bit port B (system clock, unrelated period), then reads
// every location back through both ports and compares with a reference image, checking the
// byte order (pixel p in word p/4, byte p%4) and the one-clock read latency.
module gray_fovea_mem_tb;
  logic clk_a = 0, clk_b = 0;
  logic [13:0] a_addr = '0;
  logic a_we = 0;
  logic [7:0] a_wdata = '0, a_rdata;
  logic [11:0] b_addr = '0;
  logic b_we = 0;
  logic [31:0] b_wdata = '0, b_rdata;
  logic [7:0] ref_img [16384];
  int checks = 0, failures = 0;

  always #5 clk_a = ~clk_a;
  always #4 clk_b = ~clk_b;

  gray_fovea_mem dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // port B fills the whole memory
    for (int w = 0; w < 4096; w++) begin
      @(negedge clk_b);
      b_we = 1; b_addr = 12'(w); b_wdata = $urandom;
      for (int k = 0; k < 4; k++) ref_img[4*w + k] = b_wdata[8*k +: 8];
    end
    @(negedge clk_b); b_we = 0;
    // port A overwrites random pixels
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk_a);
      a_we = 1; a_addr = 14'($urandom); a_wdata = 8'($urandom);
      ref_img[a_addr] = a_wdata;
    end
    @(negedge clk_a); a_we = 0;
    // read back through port A
    for (int p = 0; p < 16384; p += 7) begin
      @(negedge clk_a); a_addr = 14'(p);
      @(negedge clk_a);
      checks++;
      if (a_rdata != ref_img[p]) begin failures++; $display("A %0d: %h exp %h", p, a_rdata, ref_img[p]); end
    end
    // read back through port B
    for (int w = 0; w < 4096; w += 3) begin
      @(negedge clk_b); b_addr = 12'(w);
      @(negedge clk_b);
      checks++;
      if (b_rdata != {ref_img[4*w+3], ref_img[4*w+2], ref_img[4*w+1], ref_img[4*w]}) begin
        failures++; $display("B %0d: %h", w, b_rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
