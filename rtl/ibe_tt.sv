// ibe_tt: transformation table.
//
// One entry per encoded instruction of every encoded basic block, stored in
// program order from the block's BBIT index onward. An entry holds, for each
// partition p, the short TSIR index at bits [1+p*IDX_W +: IDX_W], and the end
// bit E at bit 0, set in the entry of the last instruction of the block. With
// six partitions and four functions an entry is 6*2+1 = 13 bits, as in the
// document; the default depth of 945 entries is the 1.5 KByte table it
// costs (945 * 13 bits).
//
// Synchronous single-port read (rdata is mem[raddr] one clock later) and a
// separate write port, like a small SRAM; a write and a read of the same
// entry in one cycle return the old entry. The memory is not reset. The
// entry layout and port timing are this design's choice.
module ibe_tt #(
  parameter int unsigned DEPTH  = 945,
  parameter int unsigned ENTRY_W = 13,
  localparam int unsigned ADDR_W = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [ADDR_W-1:0]    waddr,
  input  logic [ENTRY_W-1:0]   wdata,
  input  logic [ADDR_W-1:0]    raddr,
  output logic [ENTRY_W-1:0]   rdata
);

  logic [ENTRY_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= mem[(int'(raddr) < DEPTH) ? raddr : '0];
  end

endmodule
