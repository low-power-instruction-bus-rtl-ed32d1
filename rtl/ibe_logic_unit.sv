// ibe_logic_unit: universal logic unit that restores one partition.
//
// For function code `fcode` (see ibe_pkg) it computes, bit by bit,
//   Type 1 (fcode[4] = 0): x = F_n(x_prev, y)
//   Type 2 (fcode[4] = 1): x = F_n(y_prev, y)
// with n = fcode[3:0] and F_n(A,B) = n[{~A,~B}], so all 16 two-input Boolean
// operations of both types (32 functions) are available. x_prev is the
// restored partition of the previous instruction, y_prev the previous bus
// value of the partition and y the current bus value.
// Example: x_prev = 10011, y = 01101 and F14 (nand), Type 1, give x = 11110.
//
// Purely combinational, no clock. The two transformation types and the
// function table follow the document; the code layout is this design's choice.
module ibe_logic_unit
  import ibe_pkg::*;
#(
  parameter int unsigned PART_W = 5
) (
  input  fcode_t              fcode,
  input  logic [PART_W-1:0]   x_prev,
  input  logic [PART_W-1:0]   y_prev,
  input  logic [PART_W-1:0]   y,
  output logic [PART_W-1:0]   x
);

  logic [PART_W-1:0] a;
  logic [3:0]        op;

  assign a  = fcode[4] ? y_prev : x_prev;
  assign op = fcode[3:0];

  always_comb begin
    for (int b = 0; b < PART_W; b++) begin
      x[b] = op[{~a[b], ~y[b]}];
    end
  end

endmodule
