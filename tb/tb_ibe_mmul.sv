// tb_ibe_mmul: the matrix-multiply kernel workload at the default decoder
// configuration (four functions, 5-bit partitions). A hand-assembled MIPS
// triple loop (seven basic blocks, every block encoded as one hot-spot) is
// encoded, loaded and fetched along its real control flow for 16 x 16
// matrices; every word the CPU receives must be the original instruction.
module tb_ibe_mmul;
  logic done;
  int ck, fl;

  ibe_tb_cfg_run #(.PART_W(5), .ENC_MASK(32'hBFFF_FFDF), .NUM_FUNCS(4), .SEED(3),
                   .PROGRAM(1), .MM_N(16)) run (done, ck, fl);

  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck, fl + 1);
    $finish;
  end

  initial begin
    do @(posedge clk); while (done !== 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", ck, fl);
    $finish;
  end
endmodule
