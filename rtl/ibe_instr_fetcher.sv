// ibe_instr_fetcher: instruction fetcher between the CPU fetch port and the
// instruction memory.
//
// It takes the CPU's PC request and puts it on the address bus, and keeps the
// PC of every request still in flight in a small FIFO, so that each word that
// comes back on the instruction bus leaves the fetcher tagged with its own PC
// (rsp_pc) for the BBIT lookup.
//
// Interface: a request is accepted in a cycle with cpu_req && cpu_gnt
// (cpu_gnt follows the memory's mem_gnt unless MAX_OUTSTANDING requests are
// already in flight). The memory answers every accepted request, in order,
// with one mem_rvalid pulse carrying mem_rdata, at any latency of one cycle
// or more; rsp_valid/rsp_pc/rsp_word present it in that same cycle. The
// address path is combinational. The document gives the fetcher's function;
// the request/grant/response handshake and the tag FIFO are this design's.
module ibe_instr_fetcher #(
  parameter int unsigned DATA_W          = 32,
  parameter int unsigned MAX_OUTSTANDING = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // CPU side
  input  logic                 cpu_req,
  input  logic [31:0]          cpu_addr,
  output logic                 cpu_gnt,
  // address bus
  output logic                 mem_req,
  output logic [31:0]          mem_addr,
  input  logic                 mem_gnt,
  // instruction bus
  input  logic                 mem_rvalid,
  input  logic [DATA_W-1:0]    mem_rdata,
  // tagged response to the decoder
  output logic                 rsp_valid,
  output logic [31:0]          rsp_pc,
  output logic [DATA_W-1:0]    rsp_word
);

  localparam int unsigned PTR_W = (MAX_OUTSTANDING <= 2) ? 1 : $clog2(MAX_OUTSTANDING);
  localparam int unsigned CNT_W = $clog2(MAX_OUTSTANDING + 1);

  logic [31:0]       tag_q [MAX_OUTSTANDING];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [CNT_W-1:0]  count;
  logic              room, push, pop;

  // A slot frees up in the same cycle a response returns.
  assign room     = (int'(count) < MAX_OUTSTANDING) || mem_rvalid;
  assign mem_req  = cpu_req && room;
  assign mem_addr = cpu_addr;
  assign cpu_gnt  = mem_gnt && room;
  assign push     = cpu_req && cpu_gnt;
  assign pop      = mem_rvalid;

  function automatic logic [PTR_W-1:0] ptr_inc(input logic [PTR_W-1:0] p);
    return (int'(p) == MAX_OUTSTANDING - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= ptr_inc(wr_ptr);
      if (pop)  rd_ptr <= ptr_inc(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) tag_q[wr_ptr] <= cpu_addr;
  end

  assign rsp_valid = mem_rvalid;
  assign rsp_pc    = tag_q[rd_ptr];
  assign rsp_word  = mem_rdata;

  // The memory may only answer requests that are in flight.
  a_no_stray_rsp: assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> (count != '0))
    else $error("ibe_instr_fetcher: instruction bus response with no request in flight");

endmodule
