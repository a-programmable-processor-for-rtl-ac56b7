// tb_mont_mult: self-checking test of the two-stream Montgomery multiplier.
//
// Random odd moduli N of 1 to 4 32-bit groups and operands A0, A1, B < N are multiplied;
// each result is compared with A*B*2^-n mod N (n = 32 * groups) computed here with wide
// integers, halving modulo N n times. The testbench supplies the operand bits the way the
// exponentiation unit does, from registers of n bits rotated right by two on each a_shift
// pulse, and checks that the registers are back to their starting value (exactly n/2
// pulses each) and that done arrives mm_latency(groups) cycles after start.
module tb_mont_mult;
  import crypto_pkg::*;

  localparam int unsigned G = MAX_GROUPS;
  localparam int unsigned W = 32 * G;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [2:0]   ng;
  logic [W-1:0] n_in, b_in, res0, res1;
  logic [W-1:0] areg0, areg1, a0_init, a1_init;
  logic [1:0]   a_shift;
  logic         busy, done;
  int           checks = 0, failures = 0;
  int           nbits;

  always #5 clk = ~clk;

  mont_mult #(.MAXG(G)) dut (
    .clk, .rst_n, .start, .ng, .n_in, .b_in,
    .a_digit0(areg0[1:0]), .a_digit1(areg1[1:0]), .a_shift,
    .busy, .done, .res0, .res1
  );

  function automatic logic [W-1:0] rot2(logic [W-1:0] v, int bits);
    logic [W-1:0] r;
    r = v >> 2;
    r[bits-2 +: 2] = v[1:0];
    return r;
  endfunction

  always @(posedge clk) begin
    if (a_shift[0]) areg0 <= rot2(areg0, nbits);
    if (a_shift[1]) areg1 <= rot2(areg1, nbits);
  end

  function automatic logic [W-1:0] mont_ref(logic [W-1:0] a, logic [W-1:0] b,
                                            logic [W-1:0] n, int bits);
    logic [2*W+1:0] r;
    r = (2*W+2)'(a) * (2*W+2)'(b);
    r = r % (2*W+2)'(n);
    for (int i = 0; i < bits; i++) begin
      if (r[0]) r = r + (2*W+2)'(n);
      r = r >> 1;
    end
    return W'(r);
  endfunction

  function automatic logic [W-1:0] rand_w(int groups);
    logic [W-1:0] v;
    v = '0;
    for (int i = 0; i < groups; i++) v[32*i +: 32] = $urandom();
    return v;
  endfunction

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (groups %0d): got %h expected %h", what, ng, got, exp);
    end
  endtask

  task automatic run(input int groups, input logic [W-1:0] n, input logic [W-1:0] a0,
                     input logic [W-1:0] a1, input logic [W-1:0] b);
    int cycles;
    @(negedge clk);
    ng = 3'(groups); nbits = 32 * groups;
    n_in = n; b_in = b; areg0 = a0; areg1 = a1; a0_init = a0; a1_init = a1;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    check("res0", res0, mont_ref(a0, b, n, nbits));
    check("res1", res1, mont_ref(a1, b, n, nbits));
    check("latency", W'(cycles), W'(mm_latency(groups)));
    check("a0 restored", areg0, a0_init);
    check("a1 restored", areg1, a1_init);
  endtask

  initial begin
    logic [W-1:0] n, ones;
    ng = 3'd1; nbits = 32;
    n_in = '0; b_in = '0; areg0 = '0; areg1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 1; g <= int'(G); g++) begin
      // corner cases: all-ones modulus with operands N-1, and the smallest modulus
      ones = '0;
      for (int i = 0; i < 32 * g; i++) ones[i] = 1'b1;
      run(g, ones, ones - 1, ones - 1, ones - 1);
      run(g, W'(3), W'(2), W'(1), W'(2));
      for (int t = 0; t < 40; t++) begin
        n = rand_w(g) | W'(1);
        if (t % 3 == 0) n[32*g-1] = 1'b1;
        run(g, n, rand_w(g) % n, rand_w(g) % n, rand_w(g) % n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
