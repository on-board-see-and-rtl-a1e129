// bin_pe_array: the linear array of N binary processors that computes one whole fovea row
// per clock. Processor c sees the 3x3 neighbourhood of column c in the first source (rows
// up/cur/dn) and bit c of the second source's row (m), and applies the selected operation:
//   ERODE   1 where all 9 neighbourhood pixels are 1
//   DILATE  1 where any of the 9 neighbourhood pixels is 1
//   SPR     single pixel removal: a 1 with no 1 among its 8 neighbours becomes 0
//   RECON   one step of reconstruction of the mask m from the marker: DILATE(a) & m
//   AND, OR, XOR of the centre pixel and m
// The operation set and the one-processor-per-column organisation follow the design
// description; the 8-connected 3x3 structuring element and the padding are this design's
// choices: pixels outside the fovea count as 1 for erosion (so the fovea edge is not eroded
// away) and as 0 for every other operation (saa_pkg::bin_pad). The caller supplies the rows
// above and below already padded. Purely combinational.
module bin_pe_array
  import saa_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  bin_op_e      op,
  input  logic [N-1:0] up,
  input  logic [N-1:0] cur,
  input  logic [N-1:0] dn,
  input  logic [N-1:0] m,
  output logic [N-1:0] y
);
  for (genvar c = 0; c < N; c++) begin : g_pe
    logic [8:0] nb;
    logic       all1, any1, anyn;
    if (c == 0) begin : g_left
      assign nb = {bin_pad(op), up[c], up[c+1], bin_pad(op), cur[c], cur[c+1], bin_pad(op), dn[c], dn[c+1]};
    end else if (c == N - 1) begin : g_right
      assign nb = {up[c-1], up[c], bin_pad(op), cur[c-1], cur[c], bin_pad(op), dn[c-1], dn[c], bin_pad(op)};
    end else begin : g_mid
      assign nb = {up[c-1], up[c], up[c+1], cur[c-1], cur[c], cur[c+1], dn[c-1], dn[c], dn[c+1]};
    end
    assign all1 = &nb;
    assign any1 = |nb;
    assign anyn = |{nb[8:5], nb[3:0]};
    always_comb begin
      unique case (op)
        B_ERODE:  y[c] = all1;
        B_DILATE: y[c] = any1;
        B_SPR:    y[c] = cur[c] && anyn;
        B_RECON:  y[c] = any1 && m[c];
        B_AND:    y[c] = cur[c] & m[c];
        B_OR:     y[c] = cur[c] | m[c];
        B_XOR:    y[c] = cur[c] ^ m[c];
        default:  y[c] = cur[c];
      endcase
    end
  end
endmodule
