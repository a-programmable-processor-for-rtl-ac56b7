// tb_crypto_top: end-to-end test of the cryptography processor at its default size.
//
// The testbench plays the master: it programs the substitution/permutation EPROM (table 1
// a pseudo-random 8-to-32-bit S-box per byte lane, table 2 a bit-reversal permutation),
// loads instruction programs, starts them and streams operands in and results out, with
// random gaps on the input stream and random back-pressure on the output stream.
//   Program 1 (64-bit operands, 3 rounds): IN, IN, ADD, SUB, XOR, SUBST (S-box), SUBST
//   (P-box), OUT x4.
//   Program 2: IN N, IN 2^(2n) mod N, IN M, IN E, MODEXP, MODMUL, OUT, OUT; run for 2
//   rounds on 64-bit operands (two-word modular multiplier use), then 1 round on 32 bits.
//   Program 3 (128-bit, 1 round): IN N, IN 2^256 mod N, IN M, IN E, MODEXP, OUT.
// Every output word is compared with a reference computed here. The test counts how often
// each mechanism occurred (input-empty stall, output-full stall, carry and borrow passed
// between words, S-box and P-box lookups, modular exponentiation and multiplication, multi-word modular operations, a new
// round starting, a change of operand length) and fails any that never occurred.
module tb_crypto_top;
  import crypto_pkg::*;

  logic          clk = 0, rst_n = 0;
  logic          prog_we = 0, start = 0, busy, done;
  logic [3:0]    prog_addr = '0;
  instr_t        prog_instr = '0;
  logic [4:0]    prog_len = '0;
  logic [7:0]    rounds = '0;
  logic [2:0]    nwords = '0;
  logic          ep_we = 0;
  logic [11:0]   ep_addr = '0;
  logic [31:0]   ep_data = '0;
  logic          in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0]   in_data = '0, out_data;

  int checks = 0, failures = 0;
  logic [31:0] in_q[$], exp_q[$];
  bit          feeding = 0;

  always #5 clk = ~clk;

  crypto_top dut (.*);

  // ---------------- reference helpers
  function automatic logic [31:0] sbox(int t, int l, int v);
    logic [31:0] x = 32'((t * 4 + l) * 256 + v);
    x = x * 32'h9E37_79B1;
    return x ^ (x >> 15) ^ 32'hA5A5_0F0F;
  endfunction
  function automatic logic [31:0] bitrev(logic [31:0] x);
    logic [31:0] y;
    for (int i = 0; i < 32; i++) y[i] = x[31 - i];
    return y;
  endfunction
  function automatic logic [31:0] ep_entry(int t, int l, int v);
    if (t == 2) return bitrev(32'(v) << (8 * l));
    return sbox(t, l, v);
  endfunction
  function automatic logic [31:0] subst(int t, logic [31:0] x);
    logic [31:0] y = '0;
    for (int l = 0; l < 4; l++) y ^= ep_entry(t, l, int'(x[8*l +: 8]));
    return y;
  endfunction
  // operands of up to four words; products in 256 bits
  function automatic logic [127:0] mulmod(logic [127:0] a, logic [127:0] b, logic [127:0] n);
    return 128'((256'(a) * 256'(b)) % 256'(n));
  endfunction
  function automatic logic [127:0] powmod(logic [127:0] m, logic [127:0] e, logic [127:0] n,
                                          int bits);
    logic [127:0] p = 128'(1) % n, b = m % n;
    for (int i = 0; i < bits; i++) begin
      if (e[i]) p = mulmod(p, b, n);
      b = mulmod(b, b, n);
    end
    return p;
  endfunction
  function automatic logic [127:0] r2_of(logic [127:0] n, int bits);
    logic [127:0] r = 128'(1) % n;
    for (int i = 0; i < 2 * bits; i++) r = 128'((129'(r) * 2) % 129'(n));
    return r;
  endfunction
  function automatic instr_t mk(op_e op, int rd, int rs1, int rs2, int tbl);
    instr_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.tbl = 2'(tbl);
    return i;
  endfunction

  // ---------------- input stream with random gaps
  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      void'(in_q.pop_front());
    end
  end
  always @(negedge clk) begin
    if (feeding && in_q.size() > 0 && ($urandom() % 4 != 0)) begin
      in_valid <= 1'b1;
      in_data  <= in_q[0];
    end else if (!(in_valid && !in_ready)) begin
      in_valid <= 1'b0;
    end
  end

  // ---------------- output stream with random back-pressure and checking
  logic hold_out = 0;
  always @(negedge clk) out_ready <= !hold_out && ($urandom() % 3 != 0);
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", out_data);
      end else begin
        logic [31:0] e;
        e = exp_q.pop_front();
        if (out_data !== e) begin
          failures++;
          $display("FAIL output %h expected %h", out_data, e);
        end
      end
    end
  end

  // ---------------- mechanism counters
  int n_stall_in = 0, n_stall_out = 0, n_carry = 0, n_borrow = 0, n_sbox = 0, n_pbox = 0;
  int n_modexp = 0, n_modmul = 0, n_round = 0, n_len_change = 0, n_mod_wide = 0;
  logic [2:0] last_nwords = '0;
  always @(posedge clk) if (rst_n) begin
    if (dut.stall && dut.u_ctrl.ins.op == OP_IN)  n_stall_in++;
    if (dut.stall && dut.u_ctrl.ins.op == OP_OUT) n_stall_out++;
    if (dut.ctrl.we && dut.ctrl.bus_sel == BUS_ADD && dut.u_ctrl.w != 0) begin
      if (!dut.ctrl.sub && dut.ctrl.cin) n_carry++;
      if (dut.ctrl.sub && !dut.ctrl.cin) n_borrow++;
    end
    if (dut.ctrl.we && dut.ctrl.bus_sel == BUS_SBOX) begin
      if (dut.ctrl.tbl == 2'd1) n_sbox++;
      if (dut.ctrl.tbl == 2'd2) n_pbox++;
    end
    if (dut.ctrl.exp_start && !dut.ctrl.exp_mul) n_modexp++;
    if (dut.ctrl.exp_start && dut.ctrl.exp_mul)  n_modmul++;
    if (dut.ctrl.exp_start && dut.words > 1)     n_mod_wide++;
    if (dut.busy && !dut.stall && dut.u_ctrl.last_cyc && dut.u_ctrl.pc == dut.u_ctrl.len_q - 1
        && dut.u_ctrl.round_cnt != dut.u_ctrl.rounds_q - 1) n_round++;
    if (start) begin
      if (last_nwords != 0 && last_nwords != nwords) n_len_change++;
      last_nwords <= nwords;
    end
  end

  task automatic load_prog(input instr_t p[]);
    foreach (p[k]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 4'(k); prog_instr = p[k];
    end
    @(negedge clk);
    prog_we = 0;
    prog_len = 5'(p.size());
  endtask

  task automatic run_prog(input int nr, input int nw);
    int cyc = 0;
    @(negedge clk);
    rounds = 8'(nr); nwords = 3'(nw); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    // let the output stream drain
    cyc = 0;
    while (exp_q.size() != 0 && cyc < 1000) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    instr_t p1[], p2[], p3[];
    logic [63:0] a, b;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // program the EPROM
    for (int t = 0; t < 4; t++)
      for (int l = 0; l < 4; l++)
        for (int v = 0; v < 256; v++) begin
          @(negedge clk);
          ep_we = 1; ep_addr = 12'((t * 4 + l) * 256 + v); ep_data = ep_entry(t, l, v);
        end
    @(negedge clk);
    ep_we = 0;

    // ---- program 1: 64-bit symmetric-style operations, 3 rounds
    p1 = new[11];
    p1[0]  = mk(OP_IN,    0, 0, 0, 0);
    p1[1]  = mk(OP_IN,    2, 0, 0, 0);
    p1[2]  = mk(OP_ADD,   4, 0, 2, 0);
    p1[3]  = mk(OP_SUB,   6, 0, 2, 0);
    p1[4]  = mk(OP_XOR,   8, 4, 6, 0);
    p1[5]  = mk(OP_SUBST, 10, 8, 0, 1);
    p1[6]  = mk(OP_SUBST, 12, 8, 0, 2);
    p1[7]  = mk(OP_OUT,   0, 4, 0, 0);
    p1[8]  = mk(OP_OUT,   0, 6, 0, 0);
    p1[9]  = mk(OP_OUT,   0, 10, 0, 0);
    p1[10] = mk(OP_OUT,   0, 12, 0, 0);
    load_prog(p1);
    for (int r = 0; r < 3; r++) begin
      logic [63:0] s, d, x;
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      if (r == 0) begin a[31:0] = 32'hFFFF_FFF0; b[31:0] = 32'h0000_0100; end  // carry and borrow
      s = a + b; d = a - b; x = s ^ d;
      in_q.push_back(a[31:0]); in_q.push_back(a[63:32]);
      in_q.push_back(b[31:0]); in_q.push_back(b[63:32]);
      exp_q.push_back(s[31:0]); exp_q.push_back(s[63:32]);
      exp_q.push_back(d[31:0]); exp_q.push_back(d[63:32]);
      exp_q.push_back(subst(1, x[31:0])); exp_q.push_back(subst(1, x[63:32]));
      exp_q.push_back(bitrev(x[31:0]));   exp_q.push_back(bitrev(x[63:32]));
    end
    // inputs arrive only after the program has started and stalled
    fork
      begin repeat (20) @(negedge clk); feeding = 1; end
      begin hold_out = 1; repeat (300) @(negedge clk); hold_out = 0; end
    join_none
    run_prog(3, 2);

    // ---- program 2: RSA-style modular arithmetic; 64-bit operands for 2 rounds, then
    //      the same program on 32-bit operands for 1 round
    p2 = new[8];
    p2[0] = mk(OP_IN,     8, 0, 0, 0);    // N
    p2[1] = mk(OP_IN,     12, 0, 0, 0);   // 2^(2n) mod N
    p2[2] = mk(OP_IN,     0, 0, 0, 0);    // M
    p2[3] = mk(OP_IN,     2, 0, 0, 0);    // E
    p2[4] = mk(OP_MODEXP, 4, 0, 2, 0);
    p2[5] = mk(OP_MODMUL, 6, 0, 2, 0);
    p2[6] = mk(OP_OUT,    0, 4, 0, 0);
    p2[7] = mk(OP_OUT,    0, 6, 0, 0);
    load_prog(p2);
    for (int r = 0; r < 3; r++) begin
      logic [63:0] n, m, e, y, z, r2;
      int nw;
      nw = (r < 2) ? 2 : 1;
      n = (r == 2) ? 64'd3233 : {$urandom() | 32'h8000_0000, $urandom() | 32'h1};
      m = (r == 2) ? 64'd65 : {$urandom(), $urandom()} % n;
      e = (r == 2) ? 64'd17 : {$urandom(), $urandom()} % n;
      r2 = 64'(r2_of(128'(n), 32 * nw));
      y = 64'(powmod(128'(m), 128'(e), 128'(n), 32 * nw));
      z = 64'(mulmod(128'(m), 128'(e), 128'(n)));
      in_q.push_back(n[31:0]);  if (nw == 2) in_q.push_back(n[63:32]);
      in_q.push_back(r2[31:0]); if (nw == 2) in_q.push_back(r2[63:32]);
      in_q.push_back(m[31:0]);  if (nw == 2) in_q.push_back(m[63:32]);
      in_q.push_back(e[31:0]);  if (nw == 2) in_q.push_back(e[63:32]);
      exp_q.push_back(y[31:0]); if (nw == 2) exp_q.push_back(y[63:32]);
      exp_q.push_back(z[31:0]); if (nw == 2) exp_q.push_back(z[63:32]);
      if (r == 2) begin
        checks++;
        if (y != 64'd2790) begin failures++; $display("FAIL reference 65^17 mod 3233"); end
      end
    end
    run_prog(2, 2);
    run_prog(1, 1);

    // ---- program 3: one 128-bit exponentiation, the longest operand (all 16 registers)
    p3 = new[6];
    p3[0] = mk(OP_IN,     8, 0, 0, 0);    // N: r8-r11
    p3[1] = mk(OP_IN,     12, 0, 0, 0);   // 2^256 mod N: r12-r15
    p3[2] = mk(OP_IN,     0, 0, 0, 0);    // M: r0-r3
    p3[3] = mk(OP_IN,     4, 0, 0, 0);    // E: r4-r7
    p3[4] = mk(OP_MODEXP, 0, 0, 4, 0);    // result over M
    p3[5] = mk(OP_OUT,    0, 0, 0, 0);
    load_prog(p3);
    begin
      logic [127:0] n, m, e, y, r2;
      n = {$urandom() | 32'h8000_0000, $urandom(), $urandom(), $urandom() | 32'h1};
      m = {$urandom(), $urandom(), $urandom(), $urandom()} % n;
      e = {$urandom(), $urandom(), $urandom(), $urandom()};
      r2 = r2_of(n, 128);
      y = powmod(m, e, n, 128);
      for (int i = 0; i < 4; i++) in_q.push_back(n[32*i +: 32]);
      for (int i = 0; i < 4; i++) in_q.push_back(r2[32*i +: 32]);
      for (int i = 0; i < 4; i++) in_q.push_back(m[32*i +: 32]);
      for (int i = 0; i < 4; i++) in_q.push_back(e[32*i +: 32]);
      for (int i = 0; i < 4; i++) exp_q.push_back(y[32*i +: 32]);
    end
    run_prog(1, 4);

    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++; if (in_q.size() != 0)  begin failures++; $display("FAIL %0d inputs unread", in_q.size()); end

    $display("mechanisms: stall_in=%0d stall_out=%0d carry=%0d borrow=%0d sbox=%0d pbox=%0d modexp=%0d modmul=%0d mod_multiword=%0d new_round=%0d length_change=%0d",
             n_stall_in, n_stall_out, n_carry, n_borrow, n_sbox, n_pbox, n_modexp, n_modmul, n_mod_wide,
             n_round, n_len_change);
    checks += 11;
    if (n_stall_in == 0)   begin failures++; $display("FAIL no input stall"); end
    if (n_stall_out == 0)  begin failures++; $display("FAIL no output stall"); end
    if (n_carry == 0)      begin failures++; $display("FAIL no carry between words"); end
    if (n_borrow == 0)     begin failures++; $display("FAIL no borrow between words"); end
    if (n_sbox == 0)       begin failures++; $display("FAIL no S-box lookup"); end
    if (n_pbox == 0)       begin failures++; $display("FAIL no P-box lookup"); end
    if (n_modexp == 0)     begin failures++; $display("FAIL no exponentiation"); end
    if (n_modmul == 0)     begin failures++; $display("FAIL no modular multiplication"); end
    if (n_mod_wide == 0)   begin failures++; $display("FAIL no multi-word modular operation"); end
    if (n_round == 0)      begin failures++; $display("FAIL no second round"); end
    if (n_len_change == 0) begin failures++; $display("FAIL no change of operand length"); end
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
