// ibe_decoding_logic: restores one encoded instruction word.
//
// The word is split by ENC_MASK: clear bits are not encoded and are copied
// from the bus; the set bits, taken from the LSB upwards, form NUM_PARTS
// partitions of PART_W bits. With the default mask (bits 30 and 5 clear) the
// partitions of a MIPS word are {31,29:26}, 25:21, 20:16, 15:11, 10:6 and 4:0.
// For each partition the TT index selects a TSIR register, whose function
// code drives that partition's logic unit. The previous restored word x_prev
// and previous bus word y_prev feed the Type 1 / Type 2 history inputs.
//
// Combinational from y/x_prev/y_prev/tt_index to x; the TSIR inside is
// written on the clock edge. The partitioning, TSIR and logic units follow the
// document; which bits are left out comes from its 5-bit partition example
// and is a parameter.
module ibe_decoding_logic
  import ibe_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned PART_W    = 5,
  parameter logic [31:0] ENC_MASK  = 32'hBFFF_FFDF,
  parameter int unsigned NUM_FUNCS = 4,
  localparam int unsigned NUM_PARTS = popcount32(ENC_MASK) / PART_W,
  localparam int unsigned IDX_W     = idx_w(NUM_FUNCS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // TSIR write port
  input  logic                 tsir_we,
  input  logic [IDX_W-1:0]     tsir_waddr,
  input  fcode_t               tsir_wdata,
  // decode
  input  logic [DATA_W-1:0]    y,
  input  logic [DATA_W-1:0]    x_prev,
  input  logic [DATA_W-1:0]    y_prev,
  input  logic [IDX_W-1:0]     tt_index [NUM_PARTS],
  output logic [DATA_W-1:0]    x
);

  initial begin
    assert (DATA_W == 32) else $error("ibe_decoding_logic: DATA_W must be 32");
    assert (popcount32(ENC_MASK) % PART_W == 0)
      else $error("ibe_decoding_logic: encoded bit count not a multiple of PART_W");
  end

  fcode_t fcode [NUM_PARTS];

  ibe_tsir #(.NUM_FUNCS(NUM_FUNCS), .NUM_PARTS(NUM_PARTS)) u_tsir (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (tsir_we),
    .waddr  (tsir_waddr),
    .wdata  (tsir_wdata),
    .rindex (tt_index),
    .rcode  (fcode)
  );

  logic [DATA_W-1:0] x_enc;

  for (genvar p = 0; p < NUM_PARTS; p++) begin : g_part
    logic [PART_W-1:0] py, pxp, pyp, px;
    for (genvar j = 0; j < PART_W; j++) begin : g_bit
      localparam int unsigned POS = nth_set_bit(ENC_MASK, p * PART_W + j);
      assign py[j]  = y[POS];
      assign pxp[j] = x_prev[POS];
      assign pyp[j] = y_prev[POS];
      assign x_enc[POS] = px[j];
    end
    ibe_logic_unit #(.PART_W(PART_W)) u_lu (
      .fcode  (fcode[p]),
      .x_prev (pxp),
      .y_prev (pyp),
      .y      (py),
      .x      (px)
    );
  end

  for (genvar b = 0; b < DATA_W; b++) begin : g_raw
    if (!ENC_MASK[b]) begin : g_pass
      assign x_enc[b] = y[b];
    end
  end

  assign x = x_enc;

endmodule
