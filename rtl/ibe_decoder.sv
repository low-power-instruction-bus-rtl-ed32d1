// ibe_decoder: low-power instruction bus decoder (top level).
//
// Hot-spot basic blocks of the program are stored in memory in an encoded
// form that toggles fewer instruction-bus lines. This block sits between the
// CPU fetch port and the instruction bus and gives the CPU back the original
// instructions:
//   * the instruction fetcher forwards each PC request to the address bus and
//     tags the returning bus word with its PC;
//   * the BBIT looks the PC up; a hit marks the first instruction of an
//     encoded basic block, which is sent unencoded and passed on as is, and
//     gives the TT index of the block's first TT entry;
//   * every following instruction of the block (fetched at PC+4) is restored
//     by the decoding logic with the next TT entry: each partition's short
//     index selects a TSIR function code, and X_i = X_{i-1} OP Y_i (Type 1)
//     or X_i = Y_{i-1} OP Y_i (Type 2) restores the partition;
//   * the entry whose end bit E is set closes the block; the output mux then
//     passes raw bus words again until the next BBIT hit.
// History registers hold the previous restored word (X_{i-1}) and previous
// bus word (Y_{i-1}).
//
// Timing: the restored word reaches the CPU (cpu_rvalid, cpu_rdata) one clock
// after the bus word arrives (mem_rvalid); the address path is
// combinational. The TT is read one cycle ahead, so back-to-back words decode
// at full rate.
//
// Loading: BBIT, TT and TSIR are written through the cfg_* port (layout in
// ibe_pkg), before the hot-spot is entered; writing them while a block is
// being decoded is not supported.
//
// Follows the document: the four components, the unencoded first instruction,
// the TT entry per later instruction with its end bit, the TSIR indirection,
// the two transformation types and the raw/decoded output mux. This design's
// own choices: the handshakes, the one-cycle output register, the
// configuration port, and that a fetch that is neither a BBIT hit nor the
// next sequential PC of the open block leaves the block and passes raw (a
// basic block is entered only at its start).
module ibe_decoder
  import ibe_pkg::*;
#(
  parameter int unsigned DATA_W          = 32,
  parameter int unsigned PART_W          = 5,
  parameter logic [31:0] ENC_MASK        = 32'hBFFF_FFDF,
  parameter int unsigned NUM_FUNCS       = 4,
  parameter int unsigned TT_DEPTH        = 945,
  parameter int unsigned BBIT_ENTRIES    = 40,
  parameter int unsigned MAX_OUTSTANDING = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // CPU fetch port
  input  logic                   cpu_req,
  input  logic [31:0]            cpu_addr,
  output logic                   cpu_gnt,
  output logic                   cpu_rvalid,
  output logic [DATA_W-1:0]      cpu_rdata,
  output logic                   cpu_rdecoded,  // word came through the decoding logic
  // address bus and instruction bus
  output logic                   mem_req,
  output logic [31:0]            mem_addr,
  input  logic                   mem_gnt,
  input  logic                   mem_rvalid,
  input  logic [DATA_W-1:0]      mem_rdata,
  // table loading
  input  logic                   cfg_we,
  input  cfg_sel_e               cfg_sel,
  input  logic [CFG_ADDR_W-1:0]  cfg_addr,
  input  logic [CFG_DATA_W-1:0]  cfg_wdata
);

  localparam int unsigned NUM_PARTS = popcount32(ENC_MASK) / PART_W;
  localparam int unsigned FIDX_W    = idx_w(NUM_FUNCS);
  localparam int unsigned ENTRY_W   = NUM_PARTS * FIDX_W + 1;
  localparam int unsigned TT_AW     = (TT_DEPTH <= 2) ? 1 : $clog2(TT_DEPTH);
  localparam int unsigned BB_AW     = (BBIT_ENTRIES <= 2) ? 1 : $clog2(BBIT_ENTRIES);

  initial begin
    assert (ENTRY_W <= CFG_DATA_W) else $error("ibe_decoder: TT entry wider than cfg_wdata");
    assert (TT_AW <= CFG_DATA_W - CFG_BBIT_IDX_LSB - 1)
      else $error("ibe_decoder: TT index does not fit the BBIT cfg field");
  end

  // ---------------------------------------------------------------- fetcher
  logic              rsp_valid;
  logic [31:0]       rsp_pc;
  logic [DATA_W-1:0] rsp_word;

  ibe_instr_fetcher #(.DATA_W(DATA_W), .MAX_OUTSTANDING(MAX_OUTSTANDING)) u_fetch (
    .clk        (clk),
    .rst_n      (rst_n),
    .cpu_req    (cpu_req),
    .cpu_addr   (cpu_addr),
    .cpu_gnt    (cpu_gnt),
    .mem_req    (mem_req),
    .mem_addr   (mem_addr),
    .mem_gnt    (mem_gnt),
    .mem_rvalid (mem_rvalid),
    .mem_rdata  (mem_rdata),
    .rsp_valid  (rsp_valid),
    .rsp_pc     (rsp_pc),
    .rsp_word   (rsp_word)
  );

  // ---------------------------------------------------------- configuration
  logic bbit_we, tt_we, tsir_we;
  assign bbit_we = cfg_we && (cfg_sel == CFG_BBIT) && (int'(cfg_addr) < BBIT_ENTRIES);
  assign tt_we   = cfg_we && (cfg_sel == CFG_TT)   && (int'(cfg_addr) < TT_DEPTH);
  assign tsir_we = cfg_we && (cfg_sel == CFG_TSIR) && (int'(cfg_addr) < NUM_FUNCS);

  // ------------------------------------------------------------------- BBIT
  logic             bb_hit;
  logic [TT_AW-1:0] bb_index;

  ibe_bbit #(.ENTRIES(BBIT_ENTRIES), .IDX_W(TT_AW)) u_bbit (
    .clk       (clk),
    .rst_n     (rst_n),
    .we        (bbit_we),
    .waddr     (cfg_addr[BB_AW-1:0]),
    .wvalid    (cfg_wdata[CFG_BBIT_VALID]),
    .wpc       (cfg_wdata[31:2]),
    .windex    (cfg_wdata[CFG_BBIT_IDX_LSB +: TT_AW]),
    .lookup_pc (rsp_pc[31:2]),
    .hit       (bb_hit),
    .index     (bb_index)
  );

  // --------------------------------------------------------------------- TT
  logic [TT_AW-1:0]   ptr_q, ptr_d;
  logic [ENTRY_W-1:0] tt_entry;

  ibe_tt #(.DEPTH(TT_DEPTH), .ENTRY_W(ENTRY_W)) u_tt (
    .clk   (clk),
    .we    (tt_we),
    .waddr (cfg_addr[TT_AW-1:0]),
    .wdata (cfg_wdata[ENTRY_W-1:0]),
    .raddr (ptr_d),
    .rdata (tt_entry)
  );

  logic              tt_end;
  logic [FIDX_W-1:0] tt_index [NUM_PARTS];

  assign tt_end = tt_entry[0];
  for (genvar p = 0; p < NUM_PARTS; p++) begin : g_idx
    assign tt_index[p] = tt_entry[1 + p * FIDX_W +: FIDX_W];
  end

  // ---------------------------------------------------------- decoding logic
  logic [DATA_W-1:0] x_hist_q, y_hist_q, dec_word;

  ibe_decoding_logic #(
    .DATA_W(DATA_W), .PART_W(PART_W), .ENC_MASK(ENC_MASK), .NUM_FUNCS(NUM_FUNCS)
  ) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .tsir_we    (tsir_we),
    .tsir_waddr (cfg_addr[FIDX_W-1:0]),
    .tsir_wdata (cfg_wdata[FCODE_W-1:0]),
    .y          (rsp_word),
    .x_prev     (x_hist_q),
    .y_prev     (y_hist_q),
    .tt_index   (tt_index),
    .x          (dec_word)
  );

  // ---------------------------------------------------------------- control
  logic              active_q;
  logic [31:0]       last_pc_q;
  logic              start, cont;
  logic [DATA_W-1:0] out_word;

  // start: first instruction of an encoded block (sent unencoded).
  // cont:  next sequential instruction of the open block (encoded).
  assign start    = rsp_valid && bb_hit;
  assign cont     = rsp_valid && !bb_hit && active_q && (rsp_pc == last_pc_q + 32'd4);
  assign out_word = cont ? dec_word : rsp_word;   // output mux: 1 = decoded, 0 = raw

  always_comb begin
    ptr_d = ptr_q;
    if (start)                ptr_d = bb_index;
    else if (cont && !tt_end) ptr_d = ptr_q + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q     <= 1'b0;
      ptr_q        <= '0;
      last_pc_q    <= '0;
      x_hist_q     <= '0;
      y_hist_q     <= '0;
      cpu_rvalid   <= 1'b0;
      cpu_rdata    <= '0;
      cpu_rdecoded <= 1'b0;
    end else begin
      ptr_q      <= ptr_d;
      cpu_rvalid <= rsp_valid;
      if (rsp_valid) begin
        x_hist_q     <= out_word;
        y_hist_q     <= rsp_word;
        last_pc_q    <= rsp_pc;
        cpu_rdata    <= out_word;
        cpu_rdecoded <= cont;
        if (start)     active_q <= 1'b1;
        else if (cont) active_q <= !tt_end;
        else           active_q <= 1'b0;
      end
    end
  end

endmodule
