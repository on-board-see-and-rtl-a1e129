// tile_counter_tb: streams six 160x72 binary frames (five tile columns, two full bands of 32
// rows and one short band of 8 rows) with white pixel densities from 3% to 97%, an empty tile
// column and, in the second frame, completely white tiles (count 1024), and compares the sequence of tile reports with one
// computed here: one report per non-empty tile, in the order the tiles close (band by band,
// left to right), each with its tile column, tile row and white pixel count.
module tile_counter_tb;
  import saa_pkg::*;
  localparam int W = 160, H = 72, NF = 6, NTX = W / 32, NTY = (H + 31) / 32;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset edge for the asynchronous resets
  logic in_valid = 0, in_bin = 0;
  logic [7:0] in_x = '0;
  logic [6:0] in_y = '0;
  logic rec_valid;
  tile_rec_t rec;
  int checks = 0, failures = 0;
  tile_rec_t expq [$];
  logic img [H][W];

  always #5 clk = ~clk;

  tile_counter #(.W(W), .H(H)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rec_valid) begin
    checks++;
    if (expq.size() == 0 || rec != expq[0]) begin
      failures++;
      $display("report (%0d,%0d,%0d) unexpected", rec.tx, rec.ty, rec.count);
    end
    if (expq.size() != 0) void'(expq.pop_front());
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      int dens [NF];
      dens = '{3, 3, 20, 50, 80, 97};
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          img[y][x] = ($urandom_range(0, 99) < dens[f]);
          if (x / 32 == 1) img[y][x] = 0;                       // empty tile column
          if (f == 1 && x / 32 >= 2 && y < 64) img[y][x] = 1;   // full tiles
        end
      for (int ty = 0; ty < NTY; ty++)
        for (int tx = 0; tx < NTX; tx++) begin
          int cnt;
          cnt = 0;
          for (int y = ty*32; y < ty*32 + 32 && y < H; y++)
            for (int x = tx*32; x < tx*32 + 32; x++) cnt += int'(img[y][x]);
          if (cnt != 0) expq.push_back('{tx: 8'(tx), ty: 8'(ty), count: 11'(cnt)});
        end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_bin = img[y][x]; in_x = 8'(x); in_y = 7'(y);
          if ($urandom_range(0, 3) == 0) begin
            @(negedge clk); in_valid = 0;
          end
        end
      @(negedge clk); in_valid = 0;
      repeat (5) @(negedge clk);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d reports missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
