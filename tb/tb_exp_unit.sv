// tb_exp_unit: self-checking test of the square-and-multiply exponentiation unit.
//
// Computes P0 * M^E mod N for random odd moduli of 1 to 4 32-bit words and compares with a
// plain square-and-multiply reference using wide integers; 2^(2n) mod N is worked out here
// and loaded with the operands, word by word. Also checks single multiplications
// (nbits = 1, E = 1), a zero-bit exponent, the word-wise result read-out and the cycle count
// exp_latency(words, nbits).
module tb_exp_unit;
  import crypto_pkg::*;

  localparam int unsigned G = MAX_GROUPS;
  localparam int unsigned W = 32 * G;

  logic         clk = 0, rst_n = 0, start = 0, ld = 0;
  logic [1:0]   ld_word, rd_word;
  logic [31:0]  m_w, p_w, e_w, n_w, r2_w, result;
  logic [2:0]   ng;
  logic [7:0]   nbits;
  logic         busy, done;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  exp_unit #(.MAXG(G)) dut (.*);

  typedef logic [2*W-1:0] wide_t;

  function automatic logic [W-1:0] r2_of(logic [W-1:0] n, int bits);
    wide_t r = 1;
    for (int i = 0; i < 2 * bits; i++) r = (r * 2) % wide_t'(n);
    return W'(r);
  endfunction

  function automatic logic [W-1:0] pow_ref(logic [W-1:0] p0, logic [W-1:0] m,
                                           logic [W-1:0] e, int nb, logic [W-1:0] n);
    wide_t p = wide_t'(p0) % wide_t'(n), b = wide_t'(m) % wide_t'(n);
    for (int i = 0; i < nb; i++) begin
      if (e[i]) p = (p * b) % wide_t'(n);
      b = (b * b) % wide_t'(n);
    end
    return W'(p);
  endfunction

  function automatic logic [W-1:0] rand_w(int words);
    logic [W-1:0] v = '0;
    for (int i = 0; i < words; i++) v[32*i +: 32] = $urandom();
    return v;
  endfunction

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (words %0d): got %h expected %h", what, ng, got, exp);
    end
  endtask

  task automatic run(input int words, input logic [W-1:0] n, input logic [W-1:0] p0,
                     input logic [W-1:0] m, input logic [W-1:0] e, input int nb);
    int cycles;
    logic [W-1:0] r2, got;
    r2 = r2_of(n, 32 * words);
    for (int i = 0; i < words; i++) begin
      @(negedge clk);
      ld = 1; ld_word = 2'(i);
      n_w = n[32*i +: 32]; p_w = p0[32*i +: 32]; m_w = m[32*i +: 32];
      e_w = e[32*i +: 32]; r2_w = r2[32*i +: 32];
    end
    @(negedge clk);
    ld = 0; ng = 3'(words); nbits = 8'(nb);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    got = '0;
    for (int i = 0; i < words; i++) begin
      rd_word = 2'(i);
      #1 got[32*i +: 32] = result;
    end
    check("result", got, pow_ref(p0, m, e, nb, n));
    check("latency", W'(cycles), W'(exp_latency(words, nb)));
  endtask

  initial begin
    logic [W-1:0] n;
    m_w = '0; p_w = '0; e_w = '0; n_w = '0; r2_w = '0; nbits = '0; ng = 3'd1;
    ld_word = '0; rd_word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 3233, 1, 65, 17, 32);                    // textbook RSA: 65^17 mod 3233 = 2790
    check("rsa example", W'(result), 2790);
    run(1, 3233, 1, 2790, 2753, 32);                // and back
    check("rsa decrypt", W'(result), 65);
    run(1, W'(32'hFFFF_FFFB), 1, W'(32'h1234_5678), 0, 32); // E = 0
    run(1, W'(32'hFFFF_FFFB), 1, W'(32'h1234_5678), 1, 0);  // no exponent bits scanned
    for (int g = 1; g <= int'(G); g++) begin
      for (int t = 0; t < 2; t++) begin
        n = rand_w(g) | W'(1);
        n[32*g-1] = 1'b1;
        run(g, n, 1, rand_w(g) % n, rand_w(g), (t == 0) ? 32 * g : 9);
      end
      for (int t = 0; t < 6; t++) begin
        n = rand_w(g) | W'(1);
        run(g, n, rand_w(g) % n, rand_w(g) % n, 1, 1);  // single modular multiplication
      end
    end
    // a short operand after a long one: the upper words must not linger
    n = rand_w(1) | W'(1);
    run(1, n, rand_w(1) % n, rand_w(1) % n, rand_w(1), 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
