// ibe_tsir: transformation subset identification registers.
//
// NUM_FUNCS five-bit registers hold the decoding function codes chosen for
// the current hot-spot. Each of the NUM_PARTS partitions presents its short
// index (from its TT entry) and gets back the full function code, so the TT
// stores log2(NUM_FUNCS) bits per partition instead of five.
//
// Write: on a clock edge with we = 1, register waddr takes wdata.
// Read:  combinational, one port per partition.
// Reset: every register returns to the identity function (Type 1, F5), so an
// unloaded bank leaves words unchanged; the reset value is this design's
// choice, the register bank and its indexing follow the document.
module ibe_tsir
  import ibe_pkg::*;
#(
  parameter int unsigned NUM_FUNCS = 4,
  parameter int unsigned NUM_PARTS = 6,
  localparam int unsigned IDX_W    = idx_w(NUM_FUNCS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [IDX_W-1:0]     waddr,
  input  fcode_t               wdata,
  input  logic [IDX_W-1:0]     rindex [NUM_PARTS],
  output fcode_t               rcode  [NUM_PARTS]
);

  fcode_t regs [NUM_FUNCS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_FUNCS; i++) regs[i] <= FCODE_IDENTITY;
    end else if (we && (int'(waddr) < NUM_FUNCS)) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PARTS; p++) begin
      rcode[p] = (int'(rindex[p]) < NUM_FUNCS) ? regs[rindex[p]] : FCODE_IDENTITY;
    end
  end

endmodule
