// tb_ibe_configs: runs the decoder end to end in the configurations of the
// function-count / partition-size sweep: 2, 4, 8 and 32 decoding functions
// with partitions of 2 to 6 bits. Sizes that leave bits over (3, 5 and 6 bits)
// leave bits 30 and 5 unencoded. Each run is an ibe_tb_cfg_run instance; the
// result line sums their checks and failures.
module tb_ibe_configs;
  localparam logic [31:0] ALL = 32'hFFFF_FFFF, SKIP2 = 32'hBFFF_FFDF;
  localparam int NR = 8;
  logic done [NR];
  int ck [NR], fl [NR];

  ibe_tb_cfg_run #(.PART_W(2), .ENC_MASK(ALL),   .NUM_FUNCS(2),  .SEED(11)) r0 (done[0], ck[0], fl[0]);
  ibe_tb_cfg_run #(.PART_W(2), .ENC_MASK(ALL),   .NUM_FUNCS(32), .SEED(12)) r1 (done[1], ck[1], fl[1]);
  ibe_tb_cfg_run #(.PART_W(3), .ENC_MASK(SKIP2), .NUM_FUNCS(8),  .SEED(13)) r2 (done[2], ck[2], fl[2]);
  ibe_tb_cfg_run #(.PART_W(4), .ENC_MASK(ALL),   .NUM_FUNCS(4),  .SEED(14)) r3 (done[3], ck[3], fl[3]);
  ibe_tb_cfg_run #(.PART_W(4), .ENC_MASK(ALL),   .NUM_FUNCS(32), .SEED(15)) r4 (done[4], ck[4], fl[4]);
  ibe_tb_cfg_run #(.PART_W(5), .ENC_MASK(SKIP2), .NUM_FUNCS(2),  .SEED(16)) r5 (done[5], ck[5], fl[5]);
  ibe_tb_cfg_run #(.PART_W(5), .ENC_MASK(SKIP2), .NUM_FUNCS(8),  .SEED(17)) r6 (done[6], ck[6], fl[6]);
  ibe_tb_cfg_run #(.PART_W(6), .ENC_MASK(SKIP2), .NUM_FUNCS(4),  .SEED(18)) r7 (done[7], ck[7], fl[7]);

  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int c, f;
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < NR; i++) if (done[i] !== 1'b1) all_done = 0;
    end while (!all_done);
    c = 0; f = 0;
    for (int i = 0; i < NR; i++) begin c += ck[i]; f += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
