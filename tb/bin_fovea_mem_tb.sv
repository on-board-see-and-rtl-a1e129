// bin_fovea_mem_tb: fills the 512-row binary memory block through the 32-bit port B, then
// overwrites random rows through the 128-bit port A, and reads everything back through both
// ports, comparing with a reference: word w of a row is columns 32w..32w+31 (bit 0 first),
// row address = {slot, row}, one clock of read latency on each port.
module bin_fovea_mem_tb;
  logic clk_a = 0, clk_b = 0;
  logic [8:0] a_addr = '0;
  logic a_we = 0;
  logic [127:0] a_wdata = '0, a_rdata;
  logic [10:0] b_addr = '0;
  logic b_we = 0;
  logic [31:0] b_wdata = '0, b_rdata;
  logic [127:0] ref_rows [512];
  int checks = 0, failures = 0;

  always #5 clk_a = ~clk_a;
  always #4 clk_b = ~clk_b;

  bin_fovea_mem dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2048; w++) begin
      @(negedge clk_b);
      b_we = 1; b_addr = 11'(w); b_wdata = $urandom;
      ref_rows[w / 4][32*(w % 4) +: 32] = b_wdata;
    end
    @(negedge clk_b); b_we = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk_a);
      a_we = 1; a_addr = 9'($urandom); a_wdata = {$urandom, $urandom, $urandom, $urandom};
      ref_rows[a_addr] = a_wdata;
    end
    @(negedge clk_a); a_we = 0;
    for (int r = 0; r < 512; r++) begin
      @(negedge clk_a); a_addr = 9'(r);
      @(negedge clk_a);
      checks++;
      if (a_rdata != ref_rows[r]) begin failures++; $display("A row %0d mismatch", r); end
    end
    for (int w = 0; w < 2048; w += 5) begin
      @(negedge clk_b); b_addr = 11'(w);
      @(negedge clk_b);
      checks++;
      if (b_rdata != ref_rows[w / 4][32*(w % 4) +: 32]) begin failures++; $display("B word %0d mismatch", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
