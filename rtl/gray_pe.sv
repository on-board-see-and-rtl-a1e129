// gray_pe: the arithmetic unit of the grayscale processor, an array of processing elements
// of which the instruction selects exactly one. Every PE sees the 3x3 neighbourhood of the
// first source (n[0..8], row-major, n[4] the centre) and the centre pixel of the second
// source (b), and produces one 8-bit result. The operation set (diffusion, local average,
// orientation selective edge detection, thresholding, addition, subtraction, multiplication
// and absolute value) follows the design description; the exact arithmetic is this design's:
//   ADD  min(a+b,255)        SUB  max(a-b,0)       MUL  (a*b)>>8     ABS |a-b|
//   THRESH a>b ? 255 : 0 (b is a constant or a space-variant threshold image)
//   AVG  floor(sum(n)/9), computed as (sum*7282)>>16, exact for all 8-bit inputs
//   DIFFUSE ([1 2 1;2 4 2;1 2 1] * n) >> 4, one explicit step of the heat equation
//   EDGE_H/V/D1/D2  |Sobel response| >> 2 for horizontal, vertical, 45 and 135 degree edges
// Purely combinational; the processor registers the result.
module gray_pe
  import saa_pkg::*;
(
  input  gray_op_e   op,
  input  logic [7:0] n [9],
  input  logic [7:0] b,
  output logic [7:0] y
);
  logic [7:0]  a;
  logic [8:0]  sum2;
  logic [15:0] prod;
  logic [11:0] s9;
  logic [27:0] avg_m;
  logic [11:0] diff;

  assign a = n[4];

  // signed weighted sum of the neighbourhood, weights in -2..2
  function automatic logic [7:0] sobel(input logic [7:0] nn [9], input int w [9]);
    int acc;
    acc = 0;
    for (int i = 0; i < 9; i++) acc += w[i] * int'(nn[i]);
    if (acc < 0) acc = -acc;
    return 8'(acc >>> 2);
  endfunction

  localparam int KH  [9] = '{ 1,  2,  1,  0, 0,  0, -1, -2, -1};
  localparam int KV  [9] = '{ 1,  0, -1,  2, 0, -2,  1,  0, -1};
  localparam int KD1 [9] = '{ 0,  1,  2, -1, 0,  1, -2, -1,  0};
  localparam int KD2 [9] = '{ 2,  1,  0,  1, 0, -1,  0, -1, -2};

  always_comb begin
    sum2  = 9'(a) + 9'(b);
    prod  = 16'(a) * 16'(b);
    s9    = '0;
    for (int i = 0; i < 9; i++) s9 += 12'(n[i]);
    avg_m = 28'(s9) * 28'd7282;
    diff  = 12'(n[0]) + 12'(n[2]) + 12'(n[6]) + 12'(n[8]) +
            ((12'(n[1]) + 12'(n[3]) + 12'(n[5]) + 12'(n[7])) << 1) + (12'(n[4]) << 2);
    unique case (op)
      G_ADD:     y = sum2[8] ? 8'hFF : sum2[7:0];
      G_SUB:     y = (a > b) ? a - b : 8'd0;
      G_MUL:     y = prod[15:8];
      G_ABS:     y = (a > b) ? a - b : b - a;
      G_THRESH:  y = (a > b) ? 8'hFF : 8'h00;
      G_AVG:     y = avg_m[23:16];
      G_DIFFUSE: y = diff[11:4];
      G_EDGE_H:  y = sobel(n, KH);
      G_EDGE_V:  y = sobel(n, KV);
      G_EDGE_D1: y = sobel(n, KD1);
      G_EDGE_D2: y = sobel(n, KD2);
      default:   y = a;
    endcase
  end
endmodule
