// tb_bk_adder8: exhaustive check of the 8-bit Brent-Kung adder against integer addition
// for all 2 x 256 x 256 combinations of carry-in and operands.
module tb_bk_adder8;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0, failures = 0;

  bk_adder8 dut (.*);

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); cin = 1'(c);
          #1;
          checks++;
          if ({cout, sum} !== 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d", i, j, c, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
