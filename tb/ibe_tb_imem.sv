// ibe_tb_imem: behavioural model of the instruction memory (not hardware).
//
// WORDS 32-bit words at byte address BASE. Requests are granted when `gnt`
// is high; gnt is random (GNT_PCT percent of cycles) so the fetch port sees
// back-pressure. Granted requests are answered in order, each with a one-
// cycle rvalid pulse, after a random latency of one cycle or more
// (RSP_PCT percent chance per cycle that the oldest request answers).
// The model also counts the bit transitions on its data lines between
// consecutive responses (`transitions`), which is the quantity the encoding
// minimises. Load `mem` hierarchically before use.
module ibe_tb_imem #(
  parameter int          WORDS   = 1024,
  parameter logic [31:0] BASE    = 32'h0000_0000,
  parameter int          GNT_PCT = 80,
  parameter int          RSP_PCT = 70
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic [31:0] addr,
  output logic        gnt,
  output logic        rvalid,
  output logic [31:0] rdata
);

  logic [31:0] mem [WORDS];
  logic [31:0] q [$];
  logic [31:0] last_bus = '0;
  longint      transitions = 0;
  longint      responses = 0;

  function automatic logic [31:0] rd(input logic [31:0] a);
    int unsigned w = (a - BASE) >> 2;
    return (w < WORDS) ? mem[w] : 32'h0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    logic [31:0] w;
    if (!rst_n) begin
      gnt    <= 1'b0;
      rvalid <= 1'b0;
      rdata  <= '0;
      q.delete();
    end else begin
      rvalid <= 1'b0;
      if (q.size() > 0 && ($urandom() % 100) < RSP_PCT) begin
        w = rd(q.pop_front());
        rvalid <= 1'b1;
        rdata  <= w;
        transitions <= transitions + longint'($countones(w ^ last_bus));
        responses   <= responses + 1;
        last_bus    <= w;
      end
      if (req && gnt) q.push_back(addr);
      gnt <= ($urandom() % 100) < GNT_PCT;
    end
  end

endmodule
