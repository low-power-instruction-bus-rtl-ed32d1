// tb_ibe_decoding_logic: loads random function codes into the TSIR and
// checks whole-word restoration against the reference partition map
// (bits 30 and 5 unencoded) and the named function table.
module tb_ibe_decoding_logic;
  import ibe_pkg::*;
  import ibe_tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tsir_we = 0;
  logic [1:0] tsir_waddr = '0;
  fcode_t tsir_wdata = '0;
  logic [31:0] y, xp, yp, x;
  logic [1:0] idx [6];
  int codes [4];
  int checks = 0, failures = 0;

  ibe_decoding_logic dut (
    .clk(clk), .rst_n(rst_n), .tsir_we(tsir_we), .tsir_waddr(tsir_waddr),
    .tsir_wdata(tsir_wdata), .y(y), .x_prev(xp), .y_prev(yp), .tt_index(idx), .x(x));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word();
    int f [6];
    logic [31:0] exp;
    for (int p = 0; p < 6; p++) f[p] = codes[idx[p]];
    exp = ref_dec_word(f, xp, yp, y);
    checks++;
    if (x !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL y=%h xp=%h yp=%h got %h exp %h", y, xp, yp, x, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) codes[i] = 5;
    for (int p = 0; p < 6; p++) idx[p] = '0;
    y = '0; xp = '0; yp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        tsir_we = 1; tsir_waddr = 2'(i); tsir_wdata = 5'($urandom());
        @(posedge clk);
        codes[i] = int'(tsir_wdata);
      end
      @(negedge clk);
      tsir_we = 0;
      for (int t = 0; t < 100; t++) begin
        y = $urandom(); xp = $urandom(); yp = $urandom();
        for (int p = 0; p < 6; p++) idx[p] = 2'($urandom());
        #1 check_word();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
