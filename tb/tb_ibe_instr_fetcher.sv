// tb_ibe_instr_fetcher: drives random fetch requests against the memory
// model (random grant and latency) and checks that every response carries
// its own PC and word in request order, that no more than MAX_OUTSTANDING
// requests are ever in flight, and that the outstanding limit stalls the CPU.
module tb_ibe_instr_fetcher;
  localparam int MO = 2;
  logic clk = 0, rst_n = 0;
  logic cpu_req = 0, cpu_gnt, mem_req, mem_gnt, mem_rvalid, rsp_valid;
  logic [31:0] cpu_addr = '0, mem_addr, mem_rdata, rsp_pc, rsp_word;
  logic [31:0] exp_q [$];
  int inflight = 0, max_inflight = 0, full_stalls = 0;
  int checks = 0, failures = 0;

  ibe_instr_fetcher #(.DATA_W(32), .MAX_OUTSTANDING(MO)) dut (
    .clk(clk), .rst_n(rst_n), .cpu_req(cpu_req), .cpu_addr(cpu_addr), .cpu_gnt(cpu_gnt),
    .mem_req(mem_req), .mem_addr(mem_addr), .mem_gnt(mem_gnt), .mem_rvalid(mem_rvalid),
    .mem_rdata(mem_rdata), .rsp_valid(rsp_valid), .rsp_pc(rsp_pc), .rsp_word(rsp_word));

  ibe_tb_imem #(.WORDS(256), .GNT_PCT(85), .RSP_PCT(35)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(mem_req), .addr(mem_addr), .gnt(mem_gnt),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent view of the traffic at every clock edge.
  always @(posedge clk) if (rst_n) begin
    logic [31:0] a;
    if (rsp_valid) begin
      a = exp_q.pop_front();
      checks++;
      if (rsp_pc !== a || rsp_word !== u_mem.mem[a[9:2]]) begin
        failures++;
        if (failures < 10) $display("FAIL rsp pc %h word %h exp pc %h word %h", rsp_pc, rsp_word, a, u_mem.mem[a[9:2]]);
      end
      inflight--;
    end
    if (cpu_req && cpu_gnt) begin
      exp_q.push_back(cpu_addr);
      inflight++;
    end
    if (cpu_req && mem_gnt && !cpu_gnt) full_stalls++;
    if (inflight > max_inflight) max_inflight = inflight;
    checks++;
    if (mem_req && (mem_addr !== cpu_addr)) begin failures++; $display("FAIL address bus"); end
  end

  initial begin
    for (int i = 0; i < 256; i++) u_mem.mem[i] = $urandom();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; ) begin
      @(negedge clk);
      if (cpu_req && cpu_gnt_seen) begin cpu_req = 0; n++; end
      if (!cpu_req && ($urandom() % 4) != 0) begin
        cpu_req = 1;
        cpu_addr = {22'h0, 8'($urandom()), 2'b00};
      end
    end
    @(negedge clk) cpu_req = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || max_inflight > MO || max_inflight < MO || full_stalls == 0) begin
      failures++;
      $display("FAIL left %0d max_inflight %0d full_stalls %0d", exp_q.size(), max_inflight, full_stalls);
    end
    $display("fetcher: max in flight %0d, stalls at limit %0d", max_inflight, full_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Grant as sampled at the last edge (the request was taken then).
  logic cpu_gnt_seen = 0;
  always @(posedge clk) cpu_gnt_seen <= cpu_req && cpu_gnt;
endmodule
