// cam_if: physical interface of one parallel-output camera (frame valid, line valid and
// 8-bit gray pixel data, all sampled on the camera pixel clock). It registers the camera
// signals and produces a pixel stream tagged with its column and row, plus a start-of-frame
// flag on the first pixel and a one-cycle end-of-frame pulse when frame valid falls.
// The design description only says that the preprocessor gives the cameras their physical
// interface and receives the pixel data; the signal set (that of common global-shutter
// CMOS sensors) and the coordinate counters are this design's choice.
// Timing: outputs follow the camera pins by one pixel clock (input register).
module cam_if #(
  parameter int unsigned W  = 1920,
  parameter int unsigned H  = 1080,
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cam_fval,
  input  logic          cam_lval,
  input  logic [7:0]    cam_data,
  output logic          pix_valid,
  output logic [7:0]    pix,
  output logic [XW-1:0] pix_x,
  output logic [YW-1:0] pix_y,
  output logic          pix_sof,
  output logic          frame_end
);
  logic          fval_q, lval_q, fval_d;
  logic [7:0]    data_q;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          first, lval_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fval_q <= 1'b0; lval_q <= 1'b0; data_q <= '0; fval_d <= 1'b0; lval_d <= 1'b0;
      x <= '0; y <= '0; first <= 1'b1;
    end else begin
      fval_q <= cam_fval;
      lval_q <= cam_lval;
      data_q <= cam_data;
      fval_d <= fval_q;
      lval_d <= lval_q && fval_q;
      if (!fval_q) begin
        x <= '0; y <= '0; first <= 1'b1;
      end else if (lval_q) begin
        x <= x + 1'b1;
        first <= 1'b0;
      end else begin
        x <= '0;
        if (lval_d) y <= y + 1'b1;   // falling edge of line valid ends a row
      end
    end
  end

  assign pix_valid = fval_q && lval_q;
  assign pix       = data_q;
  assign pix_x     = x;
  assign pix_y     = y;
  assign pix_sof   = pix_valid && first;
  assign frame_end = fval_d && !fval_q;
endmodule
