// tb_ibe_bbit: fills the 40-entry table, then checks hits, misses, the TT
// index returned, invalidation, and that reset clears every entry.
module tb_ibe_bbit;
  localparam int E = 40, IW = 10;
  logic clk = 0, rst_n = 0, we = 0, wvalid = 0;
  logic [5:0] waddr = '0;
  logic [31:2] wpc = '0, lookup_pc = '0;
  logic [IW-1:0] windex = '0, index;
  logic hit;
  logic [31:2] m_pc [E];
  logic [IW-1:0] m_idx [E];
  logic m_v [E];
  int checks = 0, failures = 0;

  ibe_bbit #(.ENTRIES(E), .IDX_W(IW)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wvalid(wvalid), .wpc(wpc),
    .windex(windex), .lookup_pc(lookup_pc), .hit(hit), .index(index));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic look(input logic [31:2] pc);
    logic eh = 0;
    logic [IW-1:0] ei = '0;
    lookup_pc = pc;
    for (int i = 0; i < E; i++) if (m_v[i] && m_pc[i] == pc && !eh) begin eh = 1; ei = m_idx[i]; end
    #1;
    checks++;
    if (hit !== eh || (eh && index !== ei)) begin
      failures++;
      if (failures < 10) $display("FAIL pc %h hit %b/%b idx %0d/%0d", pc, hit, eh, index, ei);
    end
  endtask

  initial begin
    for (int i = 0; i < E; i++) begin m_v[i] = 0; m_pc[i] = '0; m_idx[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill all entries with distinct PCs in a small region
    for (int i = 0; i < E; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wvalid = 1; wpc = 30'(32'h0000_1000 / 4 + i * 3); windex = IW'($urandom());
      m_v[i] = 1; m_pc[i] = wpc; m_idx[i] = windex;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < E; i++) look(m_pc[i]);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if ($urandom() % 8 == 0) begin
        int k;
        k = $urandom() % E;
        we = 1; waddr = 6'(k); wvalid = ($urandom() % 3) != 0;
        wpc = 30'(32'h0000_1000 / 4 + ($urandom() % 150)); windex = IW'($urandom());
        @(posedge clk);
        m_v[k] = wvalid; m_pc[k] = wpc; m_idx[k] = windex;
        @(negedge clk);
        we = 0;
      end
      look(30'(32'h0000_1000 / 4 + ($urandom() % 160)));
    end
    // reset clears every entry
    rst_n = 0;
    #1 rst_n = 1;
    for (int i = 0; i < E; i++) m_v[i] = 0;
    for (int t = 0; t < 150; t++) look(30'(32'h0000_1000 / 4 + t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
