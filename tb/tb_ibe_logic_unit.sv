// tb_ibe_logic_unit: checks the universal logic unit against the named
// function table, for all 32 function codes, exhaustively over the 5-bit
// x_prev / y inputs with random y_prev (and the other way round for Type 2),
// plus the worked example x_prev = 10011, y = 01101, nand -> 11110.
module tb_ibe_logic_unit;
  import ibe_pkg::*;
  import ibe_tb_ref_pkg::*;

  fcode_t     fcode;
  logic [4:0] xp, yp, y, x;
  int checks = 0, failures = 0;

  ibe_logic_unit #(.PART_W(5)) dut (.fcode(fcode), .x_prev(xp), .y_prev(yp), .y(y), .x(x));

  task automatic check(input string what);
    logic [4:0] exp = ref_dec5(int'(fcode), xp, yp, y);
    checks++;
    if (x !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s f=%0d xp=%b yp=%b y=%b got %b exp %b", what, fcode, xp, yp, y, x, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: Type 1, F14 (nand).
    fcode = 5'd14; xp = 5'b10011; yp = 5'b01101; y = 5'b01101; #1;
    checks++;
    if (x !== 5'b11110) begin failures++; $display("FAIL nand example got %b", x); end
    for (int f = 0; f < 32; f++) begin
      for (int a = 0; a < 32; a++) begin
        for (int b = 0; b < 32; b++) begin
          fcode = f[4:0];
          y = b[4:0];
          if (f < 16) begin xp = a[4:0]; yp = $urandom(); end
          else        begin yp = a[4:0]; xp = $urandom(); end
          #1;
          check("exh");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
