// adaptive_threshold: full-frame binarisation of the camera stream. Each pixel is compared
// with the average of its k x k neighbourhood, k = 3, 5 or 7 (selected by cfg_win); the
// pixel is marked white (a candidate dark object) when it is darker than that local average
// by more than the global threshold cfg_thr:
//     white  <=>  sum(k x k) > k*k * (pixel + cfg_thr)
// which avoids a divider. The selectable 3x3/5x5/7x7 local average comes from the design
// description; the exact comparison (dark objects against the sky, a single global offset
// added to the local average) is this design's reading of the adaptive-threshold algorithm.
//
// How it works: six line buffers (one W-entry RAM, 48 bits wide) give a 7-pixel column for
// every incoming pixel; the column sum for the selected k is pushed into a 7-entry shift
// register, and the window sum is the sum of the k centre entries. The window is always
// centred three rows and three columns behind the newest pixel, so the latency is 3*W+3
// pixel steps whatever k is. Pixels closer than k/2 to the frame border are output black.
// After the last pixel of a frame the pipeline flushes itself for 3*W+3 cycles, so every
// frame yields exactly W*H binary pixels in raster order; the camera's vertical blanking
// must cover this flush (wVGA and HD sensors blank for tens of lines).
// cfg_thr and cfg_win are sampled on the first pixel of each frame.
// Interface: in_valid/in_pix/in_sof stream in; out_valid/out_bin/out_x/out_y/out_last out.
module adaptive_threshold #(
  parameter int unsigned W  = 1920,
  parameter int unsigned H  = 1080,
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    cfg_thr,
  input  logic [1:0]    cfg_win,   // 0: 3x3, 1: 5x5, 2 or 3: 7x7
  input  logic          in_valid,
  input  logic [7:0]    in_pix,
  input  logic          in_sof,
  output logic          out_valid,
  output logic          out_bin,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output logic          out_last
);
  localparam int unsigned LAT   = 3*W + 3;
  localparam int unsigned TOTAL = W*H + LAT;
  localparam int unsigned SW    = $clog2(TOTAL + 1);

  logic [SW-1:0] s;          // pixel step within the frame
  logic          active;
  logic [XW-1:0] ix;         // column of the newest sample
  logic [7:0]    thr;
  logic [1:0]    win;

  logic [47:0]   lb [W];     // six previous rows, 8 bits each, per column
  logic [7:0]    c [7];      // column: c[0] newest row ... c[6] six rows up
  logic [10:0]   colsum;
  logic [10:0]   cs [7];     // column sums, cs[0] newest column
  logic [7:0]    ctr [4];    // centre row pixel, delayed by column
  logic          adv, start, v1;
  logic [XW-1:0] ox;
  logic [YW-1:0] oy;

  assign start = in_valid && in_sof;
  assign adv   = start || (active && ((s < SW'(W*H)) ? in_valid : 1'b1));

  always_comb begin
    c[0] = (start || (active && s < SW'(W*H))) ? in_pix : 8'd0;
    for (int i = 1; i < 7; i++) c[i] = lb[start ? '0 : ix][8*(i-1) +: 8];
    case (start ? cfg_win : win)
      2'd0:    colsum = 11'(c[2]) + 11'(c[3]) + 11'(c[4]);
      2'd1:    colsum = 11'(c[1]) + 11'(c[2]) + 11'(c[3]) + 11'(c[4]) + 11'(c[5]);
      default: colsum = 11'(c[0]) + 11'(c[1]) + 11'(c[2]) + 11'(c[3]) + 11'(c[4]) + 11'(c[5]) + 11'(c[6]);
    endcase
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      lb[start ? '0 : ix] <= {c[5], c[4], c[3], c[2], c[1], c[0]};
      cs[0] <= colsum;
      for (int i = 1; i < 7; i++) cs[i] <= cs[i-1];
      ctr[0] <= c[3];
      for (int i = 1; i < 4; i++) ctr[i] <= ctr[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0; active <= 1'b0; ix <= '0; thr <= '0; win <= '0; v1 <= 1'b0;
    end else begin
      v1 <= 1'b0;
      if (adv) begin
        if (start) begin
          s <= SW'(1); ix <= XW'(1); thr <= cfg_thr; win <= cfg_win; active <= 1'b1;
        end else begin
          s  <= s + 1'b1;
          ix <= (ix == XW'(W-1)) ? '0 : ix + 1'b1;
          if (s == SW'(TOTAL-1)) active <= 1'b0;
          v1 <= (s >= SW'(LAT));
        end
      end
    end
  end

  // window sum of the selected size, centred on cs[3]
  logic [13:0] wsum;
  logic [14:0] lim;
  logic [2:0]  rad;
  always_comb begin
    case (win)
      2'd0: begin
        wsum = 14'(cs[2]) + 14'(cs[3]) + 14'(cs[4]);
        lim  = 15'd9 * (15'(ctr[3]) + 15'(thr));
        rad  = 3'd1;
      end
      2'd1: begin
        wsum = 14'(cs[1]) + 14'(cs[2]) + 14'(cs[3]) + 14'(cs[4]) + 14'(cs[5]);
        lim  = 15'd25 * (15'(ctr[3]) + 15'(thr));
        rad  = 3'd2;
      end
      default: begin
        wsum = 14'(cs[0]) + 14'(cs[1]) + 14'(cs[2]) + 14'(cs[3]) + 14'(cs[4]) + 14'(cs[5]) + 14'(cs[6]);
        lim  = 15'd49 * (15'(ctr[3]) + 15'(thr));
        rad  = 3'd3;
      end
    endcase
  end

  logic border;
  assign border = (32'(ox) < 32'(rad)) || (32'(ox) >= W - 32'(rad)) ||
                  (32'(oy) < 32'(rad)) || (32'(oy) >= H - 32'(rad));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_bin <= 1'b0; out_x <= '0; out_y <= '0; out_last <= 1'b0;
      ox <= '0; oy <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        out_bin  <= !border && (15'(wsum) > lim);
        out_x    <= ox;
        out_y    <= oy;
        out_last <= (ox == XW'(W-1)) && (oy == YW'(H-1));
        if (ox == XW'(W-1)) begin
          ox <= '0;
          oy <= (oy == YW'(H-1)) ? '0 : oy + 1'b1;
        end else begin
          ox <= ox + 1'b1;
        end
      end
      if (start) begin ox <= '0; oy <= '0; end
    end
  end
endmodule
