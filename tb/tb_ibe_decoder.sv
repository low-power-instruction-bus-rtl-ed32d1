// tb_ibe_decoder: end-to-end test of the decoder at its default parameters.
//
// The testbench plays the static-time tools and the CPU:
//   1. It builds a MIPS-like program: a stretch of cold (never encoded) code
//      followed by 40 basic blocks of 2..14 instructions, split into two
//      hot-spots of 20 blocks each.
//   2. For each hot-spot it selects four decoding functions by the frequency
//      rule: every partition is pseudo-encoded with all 32 functions, each
//      function that reaches the minimum transition count for that partition
//      scores one, and the four best scores win. If none of the four can
//      decode every pattern (the identity, inverse, xor and xnor kinds), the
//      fourth slot takes the best-scoring one that can, so every partition
//      stays encodable; that fallback is the testbench's own rule.
//   3. It encodes every block: the first instruction stays as it is; every
//      partition of each later instruction gets the codeword with the fewest
//      transitions against the previous bus value that one of the four
//      functions decodes back. It fills the memory model with the encoded
//      program and loads BBIT, TT and TSIR through the configuration port.
//   4. It runs a fetch trace through the decoder: loops over random blocks of
//      the hot-spot, fall-through from one block into the next, jumps out of
//      a block half way, and stretches of cold code, some running straight
//      into a block start. Then it loads the other hot-spot's functions into
//      the TSIR and runs that hot-spot.
// Every word the CPU receives is compared with the original program, and
// cpu_rdecoded with whether the word had to be decoded. The decoder's added
// latency (one clock from mem_rvalid to cpu_rvalid) is checked for every
// word. Bus bit transitions with and without encoding are counted for the
// same fetch sequence, and the encoded stream must have fewer. Each mechanism
// (block start, decoded word, block end, abort, fall-through, cold code,
// cold-to-block entry, fetch stall, outstanding-limit stall, TSIR reload,
// every TSIR index, both transformation types) must occur at least once.
module tb_ibe_decoder;
  import ibe_pkg::*;
  import ibe_tb_ref_pkg::*;

  localparam int WORDS   = 1024;
  localparam int COLD    = 64;      // words 0..COLD-1 are cold code
  localparam int NBLK    = 40;      // fills the BBIT
  localparam int NHOT    = 2;
  localparam int REPS    = 250;     // trace iterations per hot-spot
  localparam int WATCHDOG_CYCLES = 400000;

  logic clk = 0, rst_n = 0;
  logic cpu_req = 0, cpu_gnt, cpu_rvalid, cpu_rdecoded;
  logic [31:0] cpu_addr = '0, cpu_rdata;
  logic mem_req, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_rdata;
  logic cfg_we = 0;
  cfg_sel_e cfg_sel = CFG_NONE;
  logic [CFG_ADDR_W-1:0] cfg_addr = '0;
  logic [CFG_DATA_W-1:0] cfg_wdata = '0;

  ibe_decoder dut (
    .clk(clk), .rst_n(rst_n),
    .cpu_req(cpu_req), .cpu_addr(cpu_addr), .cpu_gnt(cpu_gnt),
    .cpu_rvalid(cpu_rvalid), .cpu_rdata(cpu_rdata), .cpu_rdecoded(cpu_rdecoded),
    .mem_req(mem_req), .mem_addr(mem_addr), .mem_gnt(mem_gnt),
    .mem_rvalid(mem_rvalid), .mem_rdata(mem_rdata),
    .cfg_we(cfg_we), .cfg_sel(cfg_sel), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata));

  ibe_tb_imem #(.WORDS(WORDS), .GNT_PCT(80), .RSP_PCT(60)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(mem_req), .addr(mem_addr), .gnt(mem_gnt),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ program
  logic [31:0] orig [WORDS];
  logic [31:0] enc  [WORDS];
  int blk_start [NBLK], blk_len [NBLK], blk_hot [NBLK], blk_tt [NBLK];
  int tsir_code [NHOT][4];
  int tt_used = 0;
  logic [12:0] tt_img [945];
  int n_delta [4] = '{0, 0, 0, 0};

  function automatic logic [31:0] gen_instr();
    int k = $urandom() % 10;
    logic [4:0] rs = 5'(8 + $urandom() % 8), rt = 5'(8 + $urandom() % 8), rd = 5'(8 + $urandom() % 12);
    if (k < 4) begin
      logic [5:0] fn;
      case ($urandom() % 5) 0: fn = 6'h21; 1: fn = 6'h23; 2: fn = 6'h24; 3: fn = 6'h25; default: fn = 6'h2a; endcase
      return {6'h00, rs, rt, rd, 5'd0, fn};
    end else if (k < 8) begin
      logic [5:0] op;
      case ($urandom() % 4) 0: op = 6'h23; 1: op = 6'h2b; 2: op = 6'h09; default: op = 6'h0c; endcase
      return {op, rs, rt, 16'($urandom() % 64 * 4)};
    end else begin
      return {(k == 8) ? 6'h04 : 6'h05, rs, 5'd0, 16'(-($urandom() % 16))};
    end
  endfunction

  function automatic bit bijective(int f);
    int n = f % 16;
    return n == 5 || n == 10 || n == 6 || n == 9;
  endfunction

  // Best codeword for one partition among the functions in `cand`.
  // Returns the distance; sets best_c / best_k (position in cand).
  function automatic int best_code(input int cand [], input logic [4:0] xp, input logic [4:0] yp,
                                   input logic [4:0] x, output logic [4:0] best_c, output int best_k);
    int best = 99;
    best_c = '0; best_k = -1;
    for (int k = 0; k < cand.size(); k++)
      for (int c = 0; c < 32; c++)
        if (ref_dec5(cand[k], xp, yp, 5'(c)) == x && popc(32'(5'(c) ^ yp)) < best) begin
          best = popc(32'(5'(c) ^ yp)); best_c = 5'(c); best_k = k;
        end
    return best;
  endfunction

  // Frequency-based selection of four functions for hot-spot h.
  task automatic select_funcs(input int h);
    int freq [32];
    int all [] = new[32];
    int taken [32];
    for (int f = 0; f < 32; f++) begin freq[f] = 0; all[f] = f; taken[f] = 0; end
    for (int b = 0; b < NBLK; b++) if (blk_hot[b] == h) begin
      logic [31:0] xp = orig[blk_start[b]], yp = orig[blk_start[b]];
      for (int i = 1; i < blk_len[b]; i++) begin
        logic [31:0] x = orig[blk_start[b] + i], y = x;
        for (int p = 0; p < 6; p++) begin
          logic [4:0] bc, one_c;
          int bk, one_k, d, one [] = new[1];
          d = best_code(all, get_part(xp, p), get_part(yp, p), get_part(x, p), bc, bk);
          for (int f = 0; f < 32; f++) begin
            one[0] = f;
            if (best_code(one, get_part(xp, p), get_part(yp, p), get_part(x, p), one_c, one_k) == d) freq[f]++;
          end
          y = set_part(y, p, bc);
        end
        xp = x; yp = y;
      end
    end
    for (int s = 0; s < 4; s++) begin
      int bf = -1;
      for (int f = 0; f < 32; f++) if (!taken[f] && (bf < 0 || freq[f] > freq[bf])) bf = f;
      tsir_code[h][s] = bf; taken[bf] = 1;
    end
    if (!(bijective(tsir_code[h][0]) || bijective(tsir_code[h][1]) ||
          bijective(tsir_code[h][2]) || bijective(tsir_code[h][3]))) begin
      int bf = -1;
      for (int f = 0; f < 32; f++) if (bijective(f) && (bf < 0 || freq[f] > freq[bf])) bf = f;
      tsir_code[h][3] = bf;
    end
    $display("hot-spot %0d functions: %0d %0d %0d %0d", h,
             tsir_code[h][0], tsir_code[h][1], tsir_code[h][2], tsir_code[h][3]);
  endtask

  task automatic encode_block(input int b);
    int cand [] = new[4];
    int h = blk_hot[b];
    logic [31:0] xp, yp;
    for (int s = 0; s < 4; s++) cand[s] = tsir_code[h][s];
    enc[blk_start[b]] = orig[blk_start[b]];
    xp = orig[blk_start[b]]; yp = xp;
    blk_tt[b] = tt_used;
    for (int i = 1; i < blk_len[b]; i++) begin
      logic [31:0] x = orig[blk_start[b] + i], y = x;
      logic [12:0] e = '0;
      for (int p = 0; p < 6; p++) begin
        logic [4:0] bc;
        int bk, d;
        d = best_code(cand, get_part(xp, p), get_part(yp, p), get_part(x, p), bc, bk);
        if (bk < 0) begin failures++; $display("FAIL no codeword"); bk = 0; end
        y = set_part(y, p, bc);
        e[1 + 2 * p +: 2] = 2'(bk);
        n_delta[bk]++;
      end
      e[0] = (i == blk_len[b] - 1);
      enc[blk_start[b] + i] = y;
      tt_img[tt_used] = e;
      tt_used++;
      xp = x; yp = y;
    end
  endtask

  // ---------------------------------------------------------- config port
  task automatic cfg_write(input cfg_sel_e sel, input int addr, input logic [63:0] data);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_addr = CFG_ADDR_W'(addr); cfg_wdata = data;
    @(negedge clk);
    cfg_we = 0; cfg_sel = CFG_NONE;
  endtask

  // --------------------------------------------------------------- trace
  int trace [$];
  int n_start = 0, n_abort = 0, n_chain = 0, n_cold = 0, n_cold_entry = 0, n_block_end = 0;

  task automatic emit_block(input int b, input int upto);
    for (int i = 0; i < upto; i++) trace.push_back(blk_start[b] + i);
    n_start++;
    if (upto == blk_len[b]) n_block_end++;
  endtask

  task automatic build_trace(input int h);
    for (int r = 0; r < REPS; r++) begin
      int b;
      do b = $urandom() % NBLK; while (blk_hot[b] != h);
      case ($urandom() % 10)
        0: begin
             emit_block(b, 1 + $urandom() % (blk_len[b] - 1));
             n_abort++;
           end
        1, 2: begin
             emit_block(b, blk_len[b]);
             if (b + 1 < NBLK && blk_hot[b + 1] == h) begin emit_block(b + 1, blk_len[b + 1]); n_chain++; end
           end
        3: begin
             int s = $urandom() % (COLD - 6);
             for (int i = 0; i < 5; i++) trace.push_back(s + i);
             n_cold += 5;
             emit_block(b, blk_len[b]);
           end
        default: emit_block(b, blk_len[b]);
      endcase
    end
    // cold code that runs straight into the first block of the program
    if (blk_hot[0] == h) begin
      for (int i = COLD - 3; i < COLD; i++) trace.push_back(i);
      n_cold += 3; n_cold_entry++;
      emit_block(0, blk_len[0]);
    end
  endtask

  // ------------------------------------------------- expectations & monitor
  typedef struct { int w; bit decoded; } exp_t;
  exp_t exp_q [$];
  longint mem_rv_cycle [$];
  longint base_trans = 0;
  logic [31:0] base_last = '0;
  int n_decoded = 0, n_raw = 0, n_stall = 0, n_limit_stall = 0, n_lat_bad = 0;

  function automatic bit is_follow(int w, int prev);
    for (int b = 0; b < NBLK; b++)
      if (w > blk_start[b] && w < blk_start[b] + blk_len[b]) return prev == w - 1;
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (mem_rvalid) mem_rv_cycle.push_back(cycle);
    if (cpu_req && !cpu_gnt) n_stall++;
    if (cpu_req && mem_gnt && !cpu_gnt) n_limit_stall++;
    if (cpu_rvalid) begin
      exp_t e;
      longint c;
      e = exp_q.pop_front();
      c = mem_rv_cycle.pop_front();
      checks++;
      if (cpu_rdata !== orig[e.w] || cpu_rdecoded !== e.decoded) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d got %h (dec %b) exp %h (dec %b)",
                                    e.w, cpu_rdata, cpu_rdecoded, orig[e.w], e.decoded);
      end
      checks++;
      if (cycle - c != 1) begin failures++; n_lat_bad++; end
      if (e.decoded) n_decoded++; else n_raw++;
    end
  end

  task automatic run_trace();
    int prev = -10;
    while (trace.size() > 0) begin
      int w = trace.pop_front();
      exp_q.push_back('{w: w, decoded: is_follow(w, prev)});
      base_trans += popc(orig[w] ^ base_last);
      base_last = orig[w];
      prev = w;
      @(negedge clk);
      while ($urandom() % 5 == 0) @(negedge clk);
      cpu_req = 1; cpu_addr = 32'(w * 4);
      @(posedge clk);
      while (!cpu_gnt) @(posedge clk);
      @(negedge clk);
      cpu_req = 0;
    end
    // drain
    while (exp_q.size() > 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  // ----------------------------------------------------------------- main
  initial begin
    int pos, n_type1, n_type2;
    pos = COLD; n_type1 = 0; n_type2 = 0;
    for (int i = 0; i < WORDS; i++) begin orig[i] = gen_instr(); enc[i] = orig[i]; end
    for (int b = 0; b < NBLK; b++) begin
      blk_start[b] = pos; blk_len[b] = 2 + $urandom() % 13; blk_hot[b] = (b < NBLK / 2) ? 0 : 1;
      pos += blk_len[b];
    end
    for (int h = 0; h < NHOT; h++) select_funcs(h);
    for (int b = 0; b < NBLK; b++) encode_block(b);
    for (int h = 0; h < NHOT; h++)
      for (int s = 0; s < 4; s++) if (tsir_code[h][s] < 16) n_type1++; else n_type2++;
    for (int i = 0; i < WORDS; i++) u_mem.mem[i] = enc[i];
    $display("program: %0d blocks, %0d TT entries", NBLK, tt_used);

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      cfg_write(CFG_BBIT, b, {1'b1, 15'd0, 16'(blk_tt[b]), 32'(blk_start[b] * 4)});
    for (int i = 0; i < tt_used; i++) cfg_write(CFG_TT, i, 64'(tt_img[i]));

    for (int h = 0; h < NHOT; h++) begin
      for (int s = 0; s < 4; s++) cfg_write(CFG_TSIR, s, 64'(tsir_code[h][s]));
      build_trace(h);
      run_trace();
    end

    begin
      real red;
      red = 100.0 * real'(base_trans - u_mem.transitions) / real'(base_trans);
      $display("bus transitions: unencoded %0d, encoded %0d, reduction %0.1f%%",
               base_trans, u_mem.transitions, red);
      checks++;
      if (u_mem.transitions >= base_trans) begin failures++; $display("FAIL no transition reduction"); end
    end
    $display("mechanisms: starts %0d decoded %0d raw %0d block_ends %0d aborts %0d chains %0d cold %0d cold_entry %0d",
             n_start, n_decoded, n_raw, n_block_end, n_abort, n_chain, n_cold, n_cold_entry);
    $display("            stalls %0d limit_stalls %0d tsir_reloads %0d delta %0d/%0d/%0d/%0d type1 %0d type2 %0d",
             n_stall, n_limit_stall, NHOT, n_delta[0], n_delta[1], n_delta[2], n_delta[3], n_type1, n_type2);
    begin
      int mech [14];
      mech = '{n_start, n_decoded, n_raw, n_block_end, n_abort, n_chain, n_cold, n_cold_entry,
                        n_stall, n_limit_stall, NHOT - 1, n_delta[0], n_delta[1], n_delta[2] + n_delta[3]};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
      checks++;
      if (n_type1 == 0 || n_type2 == 0) begin failures++; $display("FAIL only one transformation type in use"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
