// tb_ibe_tt: writes random entries over the full 945-entry table and reads
// them back, checking the one-cycle read latency and read-old-on-collision.
module tb_ibe_tt;
  localparam int D = 945, W = 13;
  logic clk = 0, we = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  ibe_tt #(.DEPTH(D), .ENTRY_W(W)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wdata = W'($urandom());
      model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      raddr = 10'($urandom() % D);
      we = ($urandom() % 4) == 0;
      waddr = ($urandom() % 2) ? raddr : 10'($urandom() % D);
      wdata = W'($urandom());
      exp = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
