// ibe_tb_cfg_run: one end-to-end run of the decoder in a given
// configuration (partition width, encoded-bit mask, number of functions),
// used by tb_ibe_configs. Not hardware.
//
// It builds a MIPS-like program of NBLK basic blocks behind some cold code,
// selects NUM_FUNCS decoding functions by the frequency rule (with the
// fallback that keeps every partition encodable, as in tb_ibe_decoder),
// encodes, loads BBIT/TT/TSIR, and runs a fetch trace of block loops, aborts
// and cold code; or, with PROGRAM = 1, a hand-assembled MIPS matrix-multiply
// kernel fetched along its real control flow. Each word the CPU receives is compared with the original
// program and with whether it had to be decoded, and the added latency must
// be one clock. The partition map is rebuilt here by scanning ENC_MASK from
// the LSB. It reports through done/checks/failures and prints the bus
// transitions with and without encoding.
module ibe_tb_cfg_run
  import ibe_pkg::*;
  import ibe_tb_ref_pkg::*;
#(
  parameter int          PART_W    = 5,
  parameter logic [31:0] ENC_MASK  = 32'hBFFF_FFDF,
  parameter int          NUM_FUNCS = 4,
  parameter int          SEED      = 1,
  parameter int          PROGRAM   = 0,   // 0: random blocks, 1: matrix-multiply kernel
  parameter int          MM_N      = 8    // matrix size of the kernel
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int WORDS = 512, COLD = 32, NBLK = 16, REPS = 80;
  localparam int NP    = popc(ENC_MASK) / PART_W;
  localparam int IW    = (NUM_FUNCS <= 2) ? 1 : $clog2(NUM_FUNCS);
  localparam int EW    = NP * IW + 1;

  logic clk = 0, rst_n = 0;
  logic cpu_req = 0, cpu_gnt, cpu_rvalid, cpu_rdecoded;
  logic [31:0] cpu_addr = '0, cpu_rdata;
  logic mem_req, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_rdata;
  logic cfg_we = 0;
  cfg_sel_e cfg_sel = CFG_NONE;
  logic [CFG_ADDR_W-1:0] cfg_addr = '0;
  logic [CFG_DATA_W-1:0] cfg_wdata = '0;

  ibe_decoder #(.PART_W(PART_W), .ENC_MASK(ENC_MASK), .NUM_FUNCS(NUM_FUNCS)) dut (
    .clk(clk), .rst_n(rst_n),
    .cpu_req(cpu_req), .cpu_addr(cpu_addr), .cpu_gnt(cpu_gnt),
    .cpu_rvalid(cpu_rvalid), .cpu_rdata(cpu_rdata), .cpu_rdecoded(cpu_rdecoded),
    .mem_req(mem_req), .mem_addr(mem_addr), .mem_gnt(mem_gnt),
    .mem_rvalid(mem_rvalid), .mem_rdata(mem_rdata),
    .cfg_we(cfg_we), .cfg_sel(cfg_sel), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata));

  ibe_tb_imem #(.WORDS(WORDS), .GNT_PCT(75), .RSP_PCT(65)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(mem_req), .addr(mem_addr), .gnt(mem_gnt),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int pos [32][8];    // pos[p][j]: bus bit of bit j of partition p
  // Run-time copies of the sizes, so the search loops stay loops.
  int pw_v, ncw_v, np_v, nfn_v, nblk_v;
  logic [31:0] orig [WORDS], enc [WORDS];
  int blk_start [NBLK], blk_len [NBLK], blk_tt [NBLK];
  int tsir_code [NUM_FUNCS];
  logic [EW-1:0] tt_img [1024];
  int tt_used = 0;

  function automatic logic [7:0] gp(input logic [31:0] w, input int p);
    logic [7:0] r = '0;
    for (int j = 0; j < pw_v; j++) r[j] = w[pos[p][j]];
    return r;
  endfunction
  function automatic logic [31:0] sp(input logic [31:0] w, input int p, input logic [7:0] v);
    logic [31:0] r = w;
    for (int j = 0; j < pw_v; j++) r[pos[p][j]] = v[j];
    return r;
  endfunction
  function automatic logic [7:0] dec(input int f, input logic [7:0] xp, input logic [7:0] yp, input logic [7:0] y);
    logic [7:0] r = '0;
    for (int b = 0; b < pw_v; b++) r[b] = ref_op(f % 16, (f >= 16) ? yp[b] : xp[b], y[b]);
    return r;
  endfunction
  function automatic int best(input int cand [], input logic [7:0] xp, input logic [7:0] yp,
                              input logic [7:0] x, output logic [7:0] bc, output int bk);
    int bd = 99;
    bc = '0; bk = -1;
    for (int k = 0; k < cand.size(); k++)
      for (int c = 0; c < ncw_v; c++)
        if (dec(cand[k], xp, yp, 8'(c)) == x && popc(32'(8'(c) ^ yp)) < bd) begin
          bd = popc(32'(8'(c) ^ yp)); bc = 8'(c); bk = k;
        end
    return bd;
  endfunction
  function automatic bit bij(int f);
    return (f % 16) == 5 || (f % 16) == 10 || (f % 16) == 6 || (f % 16) == 9;
  endfunction

  function automatic logic [31:0] gen_instr();
    int k = $urandom() % 10;
    logic [4:0] rs = 5'(8 + $urandom() % 8), rt = 5'(8 + $urandom() % 8), rd = 5'(8 + $urandom() % 12);
    if (k < 4) return {6'h00, rs, rt, rd, 5'd0, 6'h20 | 6'($urandom() % 11)};
    else if (k < 8) return {6'h08 | 6'($urandom() % 4) | 6'(($urandom() % 2) * 32), rs, rt, 16'($urandom() % 64 * 4)};
    else return {6'h04 | 6'($urandom() % 2), rs, 5'd0, 16'(-($urandom() % 16))};
  endfunction

  // MIPS encodings (register numbers: zero 0, at 1, v0 2, a0-a2 4-6,
  // t0-t7 8-15, s0-s2 16-18, t9 25, ra 31).
  function automatic logic [31:0] mR(int rs, int rt, int rd, int sh, int fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] mI(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // C[i][j] = sum_k A[i][k] * B[k][j], word matrices of MM_N x MM_N with
  // MM_N a power of two (row pitch 4 * MM_N bytes), as seven basic blocks:
  //   B0 set-up, B1 i-loop head, B2 j-loop head, B3 k-loop body,
  //   B4 store and j-loop branch, B5 i-loop branch, B6 return.
  // Every branch has its delay-slot nop in the same block.
  task automatic build_mmul();
    int a = COLD, t3, t2, t1;
    int sh = $clog2(MM_N) + 2;
    nblk_v = 7;
    blk_start[0] = a;
    orig[a++] = mI(6'h09, 0, 4, 32'h100); orig[a++] = mI(6'h09, 0, 5, 32'h200 + 4 * MM_N * MM_N);
    orig[a++] = mI(6'h09, 0, 6, 32'h200 + 8 * MM_N * MM_N); orig[a++] = mI(6'h09, 0, 8, 0);
    blk_start[1] = a;
    orig[a++] = mI(6'h09, 0, 9, 0); orig[a++] = mR(0, 8, 17, sh, 6'h00);           // j = 0; s1 = i * pitch
    blk_start[2] = a; t2 = a;
    orig[a++] = mI(6'h09, 0, 10, 0); orig[a++] = mR(0, 0, 2, 0, 6'h21);           // k = 0; sum = 0
    orig[a++] = mR(0, 9, 18, 2, 6'h00);                                            // s2 = j * 4
    blk_start[3] = a; t3 = a;
    orig[a++] = mR(0, 10, 13, 2, 6'h00);  orig[a++] = mR(17, 13, 12, 0, 6'h21);   // t4 = s1 + k*4
    orig[a++] = mR(4, 12, 12, 0, 6'h21);  orig[a++] = mI(6'h23, 12, 14, 0);        // t6 = A[i][k]
    orig[a++] = mR(0, 10, 15, sh, 6'h00); orig[a++] = mR(15, 18, 15, 0, 6'h21);   // t7 = k*pitch + s2
    orig[a++] = mR(5, 15, 15, 0, 6'h21);  orig[a++] = mI(6'h23, 15, 25, 0);        // t9 = B[k][j]
    orig[a++] = mR(14, 25, 0, 0, 6'h18);  orig[a++] = mR(0, 0, 16, 0, 6'h12);      // s0 = t6 * t9
    orig[a++] = mR(2, 16, 2, 0, 6'h21);   orig[a++] = mI(6'h09, 10, 10, 1);        // sum += s0; k++
    orig[a++] = mI(6'h0a, 10, 1, MM_N);   orig[a] = mI(6'h05, 1, 0, t3 - (a + 1)); a++;
    orig[a++] = 32'h0;
    blk_start[4] = a;
    orig[a++] = mR(17, 18, 12, 0, 6'h21); orig[a++] = mR(6, 12, 12, 0, 6'h21);     // t4 = &C[i][j]
    orig[a++] = mI(6'h2b, 12, 2, 0);      orig[a++] = mI(6'h09, 9, 9, 1);          // C[i][j] = sum; j++
    orig[a++] = mI(6'h0a, 9, 1, MM_N);    orig[a] = mI(6'h05, 1, 0, t2 - (a + 1)); a++;
    orig[a++] = 32'h0;
    blk_start[5] = a;
    t1 = blk_start[1];
    orig[a++] = mI(6'h09, 8, 8, 1);       orig[a++] = mI(6'h0a, 8, 1, MM_N);       // i++
    orig[a] = mI(6'h05, 1, 0, t1 - (a + 1)); a++;
    orig[a++] = 32'h0;
    blk_start[6] = a;
    orig[a++] = mR(31, 0, 0, 0, 6'h08);   orig[a++] = 32'h0;                       // jr ra; nop
    for (int b = 0; b < 6; b++) blk_len[b] = blk_start[b + 1] - blk_start[b];
    blk_len[6] = a - blk_start[6];
    for (int i = COLD; i < a; i++) enc[i] = orig[i];
  endtask

  // Fetch sequence of the kernel, following its control flow.
  task automatic mmul_trace();
    for (int x = 0; x < blk_len[0]; x++) trace.push_back(blk_start[0] + x);
    for (int i = 0; i < MM_N; i++) begin
      for (int x = 0; x < blk_len[1]; x++) trace.push_back(blk_start[1] + x);
      for (int j = 0; j < MM_N; j++) begin
        for (int x = 0; x < blk_len[2]; x++) trace.push_back(blk_start[2] + x);
        for (int k = 0; k < MM_N; k++)
          for (int x = 0; x < blk_len[3]; x++) trace.push_back(blk_start[3] + x);
        for (int x = 0; x < blk_len[4]; x++) trace.push_back(blk_start[4] + x);
      end
      for (int x = 0; x < blk_len[5]; x++) trace.push_back(blk_start[5] + x);
    end
    for (int x = 0; x < blk_len[6]; x++) trace.push_back(blk_start[6] + x);
  endtask

  task automatic select_and_encode();
    int freq [32], taken [32];
    int all [] = new[32];
    int cand [] = new[NUM_FUNCS];
    int one [] = new[1];
    for (int f = 0; f < nfn_v; f++) begin freq[f] = 0; taken[f] = 0; all[f] = f; end
    for (int b = 0; b < nblk_v; b++) begin
      logic [31:0] xp = orig[blk_start[b]], yp = orig[blk_start[b]];
      for (int i = 1; i < blk_len[b]; i++) begin
        logic [31:0] x = orig[blk_start[b] + i], y = x;
        for (int p = 0; p < np_v; p++) begin
          logic [7:0] c, c1;
          int k, k1, d;
          d = best(all, gp(xp, p), gp(yp, p), gp(x, p), c, k);
          for (int f = 0; f < nfn_v; f++) begin
            one[0] = f;
            if (best(one, gp(xp, p), gp(yp, p), gp(x, p), c1, k1) == d) freq[f]++;
          end
          y = sp(y, p, c);
        end
        xp = x; yp = y;
      end
    end
    for (int s = 0; s < NUM_FUNCS; s++) begin
      int bf = -1;
      for (int f = 0; f < nfn_v; f++) if (taken[f] == 0 && (bf < 0 || freq[f] > freq[bf])) bf = f;
      tsir_code[s] = bf; taken[bf] = 1;
    end
    begin
      bit any = 0;
      for (int s = 0; s < NUM_FUNCS; s++) if (bij(tsir_code[s])) any = 1;
      if (!any) begin
        int bf = -1;
        for (int f = 0; f < nfn_v; f++) if (bij(f) && (bf < 0 || freq[f] > freq[bf])) bf = f;
        tsir_code[NUM_FUNCS - 1] = bf;
      end
    end
    for (int s = 0; s < NUM_FUNCS; s++) cand[s] = tsir_code[s];
    for (int b = 0; b < nblk_v; b++) begin
      logic [31:0] xp = orig[blk_start[b]], yp = orig[blk_start[b]];
      blk_tt[b] = tt_used;
      for (int i = 1; i < blk_len[b]; i++) begin
        logic [31:0] x = orig[blk_start[b] + i], y = x;
        logic [EW-1:0] e = '0;
        for (int p = 0; p < np_v; p++) begin
          logic [7:0] c;
          int k, d;
          d = best(cand, gp(xp, p), gp(yp, p), gp(x, p), c, k);
          if (k < 0) begin failures++; k = 0; end
          y = sp(y, p, c);
          e[1 + p * IW +: IW] = IW'(k);
        end
        e[0] = (i == blk_len[b] - 1);
        enc[blk_start[b] + i] = y;
        tt_img[tt_used++] = e;
        xp = x; yp = y;
      end
    end
  endtask

  task automatic cfg_write(input cfg_sel_e sel, input int addr, input logic [CFG_DATA_W-1:0] data);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_addr = CFG_ADDR_W'(addr); cfg_wdata = data;
    @(negedge clk);
    cfg_we = 0; cfg_sel = CFG_NONE;
  endtask

  typedef struct { int w; bit decoded; } exp_t;
  exp_t exp_q [$];
  longint rv_q [$];
  int trace [$];
  longint base_trans = 0;
  logic [31:0] base_last = '0;
  int n_dec = 0;
  int exp_n = 0;

  function automatic bit is_follow(int w, int prev);
    for (int b = 0; b < nblk_v; b++)
      if (w > blk_start[b] && w < blk_start[b] + blk_len[b]) return prev == w - 1;
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    exp_t e;
    longint c;
    if (mem_rvalid) rv_q.push_back(cycle);
    if (cpu_rvalid) begin
      e = exp_q.pop_front();
      c = rv_q.pop_front();
      checks += 2;
      if (cpu_rdata !== orig[e.w] || cpu_rdecoded !== e.decoded) begin
        failures++;
        if (failures < 5) $display("FAIL k=%0d N=%0d word %0d got %h exp %h", PART_W, NUM_FUNCS, e.w, cpu_rdata, orig[e.w]);
      end
      if (cycle - c != 1) failures++;
      if (e.decoded) n_dec++;
    end
  end

  initial begin
    int p0, prev, w, b, n, s;
    done = 0; checks = 0; failures = 0;
    pw_v = PART_W; ncw_v = 1 << PART_W; np_v = NP; nfn_v = 32;
    void'($urandom(SEED));
    // partition map from the mask
    p0 = 0;
    for (int i = 0; i < 32; i++) if (ENC_MASK[i]) begin
      if (p0 / PART_W < 32) pos[p0 / PART_W][p0 % PART_W] = i;
      p0++;
    end
    for (int i = 0; i < WORDS; i++) begin orig[i] = gen_instr(); enc[i] = orig[i]; end
    if (PROGRAM == 1) begin
      build_mmul();
    end else begin
      nblk_v = NBLK;
      p0 = COLD;
      for (int b = 0; b < nblk_v; b++) begin blk_start[b] = p0; blk_len[b] = 2 + $urandom() % 12; p0 += blk_len[b]; end
    end
    select_and_encode();
    for (int i = 0; i < WORDS; i++) u_mem.mem[i] = enc[i];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < nblk_v; b++)
      cfg_write(CFG_BBIT, b, CFG_DATA_W'({1'b1, 15'd0, 16'(blk_tt[b]), 32'(blk_start[b] * 4)}));
    for (int i = 0; i < tt_used; i++) cfg_write(CFG_TT, i, CFG_DATA_W'(tt_img[i]));
    for (int s = 0; s < NUM_FUNCS; s++) cfg_write(CFG_TSIR, s, CFG_DATA_W'(tsir_code[s]));
    if (PROGRAM == 1) mmul_trace();
    else for (int r = 0; r < REPS; r++) begin
      b = $urandom() % nblk_v;
      n = ($urandom() % 8 == 0) ? 1 + $urandom() % (blk_len[b] - 1) : blk_len[b];
      if ($urandom() % 6 == 0) begin
        s = $urandom() % (COLD - 4);
        for (int i = 0; i < 3; i++) trace.push_back(s + i);
      end
      for (int i = 0; i < n; i++) trace.push_back(blk_start[b] + i);
    end
    prev = -10;
    while (trace.size() > 0) begin
      w = trace.pop_front();
      exp_q.push_back('{w: w, decoded: is_follow(w, prev)});
      exp_n++;
      base_trans += popc(orig[w] ^ base_last);
      base_last = orig[w];
      prev = w;
      @(negedge clk);
      cpu_req = 1; cpu_addr = 32'(w * 4);
      @(posedge clk);
      while (!cpu_gnt) @(posedge clk);
      @(negedge clk);
      cpu_req = 0;
    end
    while (exp_q.size() > 0) @(posedge clk);
    checks++;
    if (n_dec == 0) begin failures++; $display("FAIL k=%0d N=%0d nothing decoded", PART_W, NUM_FUNCS); end
    if (PROGRAM == 1) $display("%0dx%0d matrix-multiply kernel, %0d fetches:", MM_N, MM_N, exp_n);
    $display("config %0d functions x %0d-bit partitions (%0d partitions, %0d-bit TT entries): transitions %0d -> %0d (%0.1f%% fewer), %0d words decoded",
             NUM_FUNCS, PART_W, NP, EW, base_trans, u_mem.transitions,
             100.0 * real'(base_trans - u_mem.transitions) / real'(base_trans), n_dec);
    done = 1;
  end
endmodule
