// ibe_pkg: shared constants, types and helper functions of the instruction bus
// decoder.
//
// The decoder restores instructions that a static-time encoder transformed to
// cut bit transitions on the instruction bus. Every 32-bit word is split into
// partitions of PART_W bits; the bits that belong to no partition travel
// unencoded. Each partition of an encoded instruction is restored by one of 32
// decoding functions, named by a 5-bit function code:
//   code[4]   = 0: Type 1, X_i = X_{i-1} OP Y_i
//             = 1: Type 2, X_i = Y_{i-1} OP Y_i
//   code[3:0] = n, OP is the two-input function F_n, with the truth table
//               numbered as usual: F_n(A,B) = n[{~A,~B}]
//               (F1 = A and B, F6 = A xor B, F14 = A nand B, F5 = B ...).
// The two types, the 16 operations and their numbering follow the document;
// the bit that tells the types apart is this design's choice.
//
// The configuration port that loads BBIT, TT and TSIR uses one shared write
// bus (cfg_sel/cfg_addr/cfg_wdata); its layout is this design's own.
package ibe_pkg;

  // Width of a decoding function code: 2 types x 16 operations.
  localparam int unsigned FCODE_W = 5;
  typedef logic [FCODE_W-1:0] fcode_t;

  // Type 1, F5 (= B): X_i = Y_i, i.e. the identity. Reset value of the TSIR.
  localparam fcode_t FCODE_IDENTITY = 5'd5;

  // Configuration bus.
  localparam int unsigned CFG_ADDR_W = 16;
  localparam int unsigned CFG_DATA_W = 128;  // holds a TT entry of up to 127 bits

  typedef enum logic [1:0] {
    CFG_BBIT = 2'd0,   // addr = entry; wdata[31:0] = start PC, [47:32] = TT index, [63] = valid
    CFG_TT   = 2'd1,   // addr = entry; wdata[0] = E, wdata[1+p*IDX_W +: IDX_W] = index of partition p
    CFG_TSIR = 2'd2,   // addr = register; wdata[4:0] = function code
    CFG_NONE = 2'd3
  } cfg_sel_e;

  // Bit position of BBIT fields in cfg_wdata.
  localparam int unsigned CFG_BBIT_IDX_LSB = 32;
  localparam int unsigned CFG_BBIT_VALID   = 63;

  // Number of set bits of a mask.
  function automatic int unsigned popcount32(input logic [31:0] m);
    int unsigned c = 0;
    for (int i = 0; i < 32; i++) c += int'(m[i]);
    return c;
  endfunction

  // Position of the n-th set bit (n counted from 0, from the LSB) of a mask.
  // Partitions are built from the encoded bits in this order: partition p
  // takes encoded bits p*PART_W .. p*PART_W+PART_W-1.
  function automatic int unsigned nth_set_bit(input logic [31:0] m, input int unsigned n);
    int unsigned c = 0;
    int unsigned pos = 0;
    for (int i = 0; i < 32; i++) begin
      if (m[i]) begin
        if (c == n) pos = i;
        c++;
      end
    end
    return pos;
  endfunction

  // Number of bits needed to index `n` items (at least 1).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
