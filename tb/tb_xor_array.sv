// tb_xor_array: checks the 32-bit XOR unit bit by bit on walking-one patterns and random
// operands.
module tb_xor_array;
  logic [31:0] a, b, y;
  int          checks = 0, failures = 0;

  xor_array #(.W(32)) dut (.*);

  task automatic one(input logic [31:0] x, input logic [31:0] z);
    a = x; b = z;
    #1;
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (y[i] !== (x[i] != z[i])) begin
        failures++;
        $display("FAIL bit %0d: %h ^ %h = %h", i, x, z, y);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin
      one(32'd1 << i, 32'd0);
      one(32'd0, 32'd1 << i);
      one('1, 32'd1 << i);
    end
    for (int i = 0; i < 1000; i++) one($urandom(), $urandom());
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
