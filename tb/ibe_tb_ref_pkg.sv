// ibe_tb_ref_pkg: reference models for the decoder testbenches.
//
// Written from the function table and the transformation equations, not from
// the RTL: the 16 operations are spelled out by name, and the partition map of
// the default configuration (six 5-bit partitions, bits 30 and 5 unencoded)
// is listed bit by bit.
package ibe_tb_ref_pkg;

  // Two-input Boolean function F_n of the function table, by name.
  function automatic logic ref_op(input int n, input logic a, input logic b);
    case (n)
      0:  return 1'b0;
      1:  return a & b;
      2:  return a & ~b;     // not (a -> b)
      3:  return a;
      4:  return ~a & b;     // not (b -> a)
      5:  return b;
      6:  return a ^ b;
      7:  return a | b;
      8:  return ~(a | b);
      9:  return ~(a ^ b);
      10: return ~b;
      11: return a | ~b;     // b -> a
      12: return ~a;
      13: return ~a | b;     // a -> b
      14: return ~(a & b);
      default: return 1'b1;
    endcase
  endfunction

  // Restore a 5-bit partition with function code f (f >= 16: Type 2).
  function automatic logic [4:0] ref_dec5(input int f, input logic [4:0] xp,
                                          input logic [4:0] yp, input logic [4:0] y);
    logic [4:0] r;
    for (int b = 0; b < 5; b++)
      r[b] = ref_op(f % 16, (f >= 16) ? yp[b] : xp[b], y[b]);
    return r;
  endfunction

  // Partition map of the default configuration, LSB first within a partition.
  function automatic int part_bit(input int p, input int j);
    int map [6][5] = '{
      '{ 0,  1,  2,  3,  4},
      '{ 6,  7,  8,  9, 10},
      '{11, 12, 13, 14, 15},
      '{16, 17, 18, 19, 20},
      '{21, 22, 23, 24, 25},
      '{26, 27, 28, 29, 31}
    };
    return map[p][j];
  endfunction

  function automatic logic [4:0] get_part(input logic [31:0] w, input int p);
    logic [4:0] r;
    for (int j = 0; j < 5; j++) r[j] = w[part_bit(p, j)];
    return r;
  endfunction

  function automatic logic [31:0] set_part(input logic [31:0] w, input int p, input logic [4:0] v);
    logic [31:0] r = w;
    for (int j = 0; j < 5; j++) r[part_bit(p, j)] = v[j];
    return r;
  endfunction

  // Restore a whole word: bits 30 and 5 pass, partition p uses code f[p].
  function automatic logic [31:0] ref_dec_word(input int f [6], input logic [31:0] xp,
                                               input logic [31:0] yp, input logic [31:0] y);
    logic [31:0] r = y;
    for (int p = 0; p < 6; p++)
      r = set_part(r, p, ref_dec5(f[p], get_part(xp, p), get_part(yp, p), get_part(y, p)));
    return r;
  endfunction

  function automatic int popc(input logic [31:0] v);
    int c = 0;
    for (int i = 0; i < 32; i++) c += int'(v[i]);
    return c;
  endfunction

endpackage
