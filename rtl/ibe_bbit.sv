// ibe_bbit: basic block identification table.
//
// An associative table of ENTRIES entries, each holding the start PC of an
// encoded basic block and the TT index of that block's first entry (the entry
// for its second instruction, since the first is sent unencoded). A lookup
// compares the word address `lookup_pc` (PC[31:2]) against every valid entry in
// parallel and returns hit and the TT index of the matching entry; the lowest
// entry wins if software loads the same PC twice.
//
// Lookup is combinational. Write: on a clock edge with we = 1, entry waddr
// takes {valid, pc, index}. Reset clears every valid bit. The default of 40
// entries is the 0.2 KByte table of the document at 30 PC bits plus a 10-bit
// TT index per entry; the entry count, the priority and the reset are this
// design's choices.
module ibe_bbit #(
  parameter int unsigned ENTRIES = 40,
  parameter int unsigned IDX_W   = 10,
  localparam int unsigned EA_W   = (ENTRIES <= 2) ? 1 : $clog2(ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [EA_W-1:0]      waddr,
  input  logic                 wvalid,
  input  logic [31:2]          wpc,
  input  logic [IDX_W-1:0]     windex,
  input  logic [31:2]          lookup_pc,
  output logic                 hit,
  output logic [IDX_W-1:0]     index
);

  typedef struct packed {
    logic [29:0]       pc;     // word address, PC[31:2]
    logic [IDX_W-1:0]  index;
  } entry_t;

  logic [ENTRIES-1:0] valid;
  entry_t             tab [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (we && (int'(waddr) < ENTRIES)) begin
      valid[waddr] <= wvalid;
    end
  end

  // The PC and index fields need no reset: they are only read behind valid.
  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < ENTRIES)) tab[waddr] <= '{pc: wpc, index: windex};
  end

  always_comb begin
    hit   = 1'b0;
    index = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && (tab[i].pc == lookup_pc)) begin
        hit   = 1'b1;
        index = tab[i].index;
      end
    end
  end

endmodule
