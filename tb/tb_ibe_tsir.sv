// tb_ibe_tsir: checks reset to the identity code, writes, out-of-range
// writes being ignored, and per-partition reads by short index.
module tb_ibe_tsir;
  import ibe_pkg::*;

  localparam int N = 4, P = 6;
  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] waddr = '0;
  fcode_t wdata = '0;
  logic [1:0] rindex [P];
  fcode_t rcode [P];
  fcode_t model [N];
  int checks = 0, failures = 0;

  ibe_tsir #(.NUM_FUNCS(N), .NUM_PARTS(P)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
    .rindex(rindex), .rcode(rcode));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int p = 0; p < P; p++) begin
      checks++;
      if (rcode[p] !== model[rindex[p]]) begin
        failures++;
        $display("FAIL part %0d idx %0d got %0d exp %0d", p, rindex[p], rcode[p], model[rindex[p]]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = 5'd5;
    for (int p = 0; p < P; p++) rindex[p] = 2'(p);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = ($urandom() % 2) == 1;
      waddr = 2'($urandom());
      wdata = 5'($urandom());
      for (int p = 0; p < P; p++) rindex[p] = 2'($urandom());
      #1 check_all();   // reads are combinational; the write lands at the edge
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
