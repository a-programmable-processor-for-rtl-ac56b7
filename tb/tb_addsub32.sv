// tb_addsub32: checks the 32-bit adder/subtractor on corner cases and random operands,
// including a 96-bit addition and subtraction done word by word through the carry ports.
module tb_addsub32;
  logic [31:0] a, b, sum;
  logic        sub, cin, cout;
  int          checks = 0, failures = 0;

  addsub32 dut (.*);

  task automatic one(input logic [31:0] x, input logic [31:0] y, input logic s, input logic c);
    logic [32:0] e;
    a = x; b = y; sub = s; cin = c;
    #1;
    e = s ? ({1'b0, x} + {1'b0, ~y} + 33'(c)) : ({1'b0, x} + {1'b0, y} + 33'(c));
    checks++;
    if ({cout, sum} !== e) begin
      failures++;
      $display("FAIL %h %s %h cin=%b -> %b %h expected %h", x, s ? "-" : "+", y, c, cout, sum, e);
    end
  endtask

  initial begin
    logic [95:0] x, y, r;
    logic        c;
    one(32'hFFFF_FFFF, 32'h0000_0001, 0, 0);
    one(32'hFFFF_FFFF, 32'hFFFF_FFFF, 0, 1);
    one(32'h0000_0000, 32'h0000_0001, 1, 1);
    one(32'h8000_0000, 32'h8000_0000, 0, 0);
    for (int i = 0; i < 20000; i++) one($urandom(), $urandom(), 1'($urandom()), 1'($urandom()));
    // multi-word operation through the carry
    for (int t = 0; t < 200; t++) begin
      for (int s = 0; s < 2; s++) begin
        x = {$urandom(), $urandom(), $urandom()};
        y = {$urandom(), $urandom(), $urandom()};
        if (t == 0) begin x = '1; y = 96'd1; end
        c = 1'(s);
        for (int w = 0; w < 3; w++) begin
          a = x[32*w +: 32]; b = y[32*w +: 32]; sub = 1'(s); cin = c;
          #1;
          r[32*w +: 32] = sum;
          c = cout;
        end
        checks++;
        if (r !== (s ? x - y : x + y)) begin
          failures++;
          $display("FAIL 96-bit %s", s ? "sub" : "add");
        end
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
