// async_fifo_tb: checks the dual-clock FIFO with unrelated write (10 ns) and read (7 ns)
// clocks: 500 random words are written with random gaps while the reader pops at random,
// every popped word must equal the next word of a reference queue, full must stop writes at
// DEPTH words (checked by filling it with the reader stalled) and empty must be set at the end.
module async_fifo_tb;
  localparam int WIDTH = 16, DEPTH = 8;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  initial begin #1; wrst_n = 0; rrst_n = 0; end   // reset edge for the asynchronous resets
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] q[$];

  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nread = 0;
  bit stall_rd = 1;
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      checks++;
      if (q.size() == 0 || rdata != q[0]) begin
        failures++;
        $display("mismatch: got %h", rdata);
      end
      if (q.size() != 0) void'(q.pop_front());
      nread++;
    end
    rd_en <= !stall_rd && ($urandom_range(0, 2) != 0);
  end

  initial begin
    int n;
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    // fill with the reader stalled: exactly DEPTH words must go in
    n = 0;
    for (int i = 0; i < DEPTH + 4; i++) begin
      @(negedge wclk);
      wdata = WIDTH'($urandom); wr_en = 1;
      @(posedge wclk);
      if (!full) begin q.push_back(wdata); n++; end
    end
    @(negedge wclk); wr_en = 0;
    checks++;
    if (n != DEPTH) begin failures++; $display("accepted %0d words before full", n); end
    stall_rd = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge wclk);
      wr_en = ($urandom_range(0, 3) != 0);
      wdata = WIDTH'($urandom);
      @(posedge wclk);
      if (wr_en && !full) q.push_back(wdata);
      #1;
    end
    @(negedge wclk); wr_en = 0;
    repeat (100) @(posedge rclk);
    checks++;
    if (!empty || q.size() != 0) begin failures++; $display("not drained: %0d left", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
