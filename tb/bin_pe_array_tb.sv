// bin_pe_array_tb: applies random rows of different densities (and all-0/all-1 rows) to the
// 128 binary processors for every operation and compares each output bit with a reference
// written here from the definitions: erosion pads outside columns with 1, every other
// operation with 0; SPR keeps a 1 only if one of its 8 neighbours is 1; RECON = dilate & m.
module bin_pe_array_tb;
  import saa_pkg::*;
  localparam int N = 128;
  bin_op_e op;
  logic [N-1:0] up, cur, dn, m, y;
  int checks = 0, failures = 0;

  bin_pe_array #(.N(N)) dut (.*);

  function automatic logic px(logic [N-1:0] row, int c, logic pad);
    return (c < 0 || c >= N) ? pad : row[c];
  endfunction

  function automatic logic model(bin_op_e o, int c);
    logic pad, all1, any1, anyn;
    pad = (o == B_ERODE);
    all1 = 1; any1 = 0; anyn = 0;
    for (int dc = -1; dc <= 1; dc++) begin
      logic u, v, d;
      u = px(up, c + dc, pad); v = px(cur, c + dc, pad); d = px(dn, c + dc, pad);
      all1 &= u & v & d;
      any1 |= u | v | d;
      anyn |= u | d | (dc != 0 && v);
    end
    case (o)
      B_ERODE:  return all1;
      B_DILATE: return any1;
      B_SPR:    return cur[c] & anyn;
      B_RECON:  return any1 & m[c];
      B_AND:    return cur[c] & m[c];
      B_OR:     return cur[c] | m[c];
      B_XOR:    return cur[c] ^ m[c];
      default:  return 1'bx;
    endcase
  endfunction

  function automatic logic [N-1:0] rnd(int dens);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = ($urandom_range(0, 99) < dens);
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 700; t++) begin
      int dens;
      op = bin_op_e'(t % 7);
      dens = (t < 7) ? 0 : (t < 14) ? 100 : (t % 3 == 0) ? 10 : (t % 3 == 1) ? 50 : 90;
      up = rnd(dens); cur = rnd(dens); dn = rnd(dens); m = rnd(50);
      #1;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (y[c] !== model(op, c)) begin
          failures++;
          if (failures < 10) $display("op %0d col %0d: got %b", op, c, y[c]);
        end
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
