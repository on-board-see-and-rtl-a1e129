// tile_counter: counts the white pixels of the binary frame in every non-overlapping 32x32
// tile and reports each tile that holds at least one white pixel as (tile column, tile row,
// count). The per-tile counting comes from the design description; reporting only non-empty
// tiles (so the processor sees just the candidate areas) is this design's choice, as is
// closing the last, shorter band of tiles on the frame's last row when H is not a multiple
// of 32 (1080 = 33*32 + 24).
// How it works: a 6-bit run counter counts the current 32-pixel row segment; at its end the
// segment count is added into a per-tile-column accumulator (W/32 entries). On the last row
// of a band the accumulated total is emitted and the accumulator cleared.
// Interface: binary pixel stream in raster order (in_valid/in_bin/in_x/in_y); rec_valid is a
// one-cycle strobe with rec, one clock after the tile's last pixel. W must be a multiple of 32.
// rec.tx and rec.ty are 8 bits wide for frames up to 8192 pixels; at 1920x1080 their top two
// bits stay 0.
module tile_counter
  import saa_pkg::*;
#(
  parameter int unsigned W  = 1920,
  parameter int unsigned H  = 1080,
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_bin,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  output logic          rec_valid,
  output tile_rec_t     rec
);
  localparam int unsigned NT = W / TILE;
  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1;

  logic [10:0] acc [NT];
  logic [5:0]  run;
  logic [10:0] total;
  logic [7:0]  tx;
  logic [TW-1:0] ti;           // tile column as an accumulator index
  logic        seg_end, band_end;

  assign tx       = 8'(in_x >> 5);     // TILE = 32
  assign ti       = TW'(in_x >> 5);
  assign seg_end  = in_x[4:0] == 5'd31;
  assign band_end = (in_y[4:0] == 5'd31) || (in_y == YW'(H-1));
  assign total    = (in_y[4:0] == 5'd0 ? 11'd0 : acc[ti]) + 11'(run) + 11'(in_bin);

  always_ff @(posedge clk) begin
    if (in_valid && seg_end) acc[ti] <= total;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= '0; rec_valid <= 1'b0; rec <= '0;
    end else begin
      rec_valid <= 1'b0;
      if (in_valid) begin
        if (seg_end) begin
          run <= '0;
          if (band_end && total != 0) begin
            rec_valid <= 1'b1;
            rec.tx    <= tx;
            rec.ty    <= 8'(in_y >> 5);
            rec.count <= total;
          end
        end else begin
          run <= run + 6'(in_bin);
        end
      end
    end
  end

  initial assert (W % TILE == 0) else $error("tile_counter: W must be a multiple of 32");
endmodule
