// gray_pe_tb: applies random 3x3 neighbourhoods (plus all-0 and all-255 corner cases) to
// every grayscale PE and compares the result with reference arithmetic written here:
// saturating add/subtract, (a*b)>>8, |a-b|, threshold, floor(sum/9), the [1 2 1;2 4 2;1 2 1]/16
// diffusion step and |Sobel|/4 for the four edge orientations.
module gray_pe_tb;
  import saa_pkg::*;
  gray_op_e op;
  logic [7:0] n [9];
  logic [7:0] b, y;
  int checks = 0, failures = 0;

  gray_pe dut (.*);

  function automatic int sob(logic [7:0] nn [9], int k);
    int g [4][9] = '{'{1, 2, 1, 0, 0, 0, -1, -2, -1},
                     '{1, 0, -1, 2, 0, -2, 1, 0, -1},
                     '{0, 1, 2, -1, 0, 1, -2, -1, 0},
                     '{2, 1, 0, 1, 0, -1, 0, -1, -2}};
    int acc;
    acc = 0;
    for (int i = 0; i < 9; i++) acc += g[k][i] * int'(nn[i]);
    return (acc < 0 ? -acc : acc) / 4;
  endfunction

  function automatic int model(gray_op_e o, logic [7:0] nn [9], logic [7:0] bb);
    int a, s;
    a = int'(nn[4]);
    case (o)
      G_ADD:     return (a + int'(bb) > 255) ? 255 : a + int'(bb);
      G_SUB:     return (a - int'(bb) < 0) ? 0 : a - int'(bb);
      G_MUL:     return (a * int'(bb)) / 256;
      G_ABS:     return (a > int'(bb)) ? a - int'(bb) : int'(bb) - a;
      G_THRESH:  return (a > int'(bb)) ? 255 : 0;
      G_AVG: begin
        s = 0;
        for (int i = 0; i < 9; i++) s += int'(nn[i]);
        return s / 9;
      end
      G_DIFFUSE: begin
        s = int'(nn[0]) + int'(nn[2]) + int'(nn[6]) + int'(nn[8]) +
            2 * (int'(nn[1]) + int'(nn[3]) + int'(nn[5]) + int'(nn[7])) + 4 * a;
        return s / 16;
      end
      G_EDGE_H:  return sob(nn, 0);
      G_EDGE_V:  return sob(nn, 1);
      G_EDGE_D1: return sob(nn, 2);
      G_EDGE_D2: return sob(nn, 3);
      default:   return -1;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int e;
      op = gray_op_e'(t % 11);
      for (int i = 0; i < 9; i++)
        n[i] = (t < 11) ? 8'h00 : (t < 22) ? 8'hFF : (t < 33 && i < 3) ? 8'hFF : 8'($urandom);
      b = (t < 11) ? 8'hFF : 8'($urandom);
      #1;
      e = model(op, n, b);
      checks++;
      if (int'(y) != e) begin
        failures++;
        $display("op %0d: got %0d exp %0d", op, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
