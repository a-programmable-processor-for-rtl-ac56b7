// tb_blowfish_rounds: runs a Blowfish-structured 64-bit block cipher on the processor.
//
// Blowfish's Feistel structure is 16 rounds of
//   L ^= P[i];  R ^= F(L);  swap(L, R)
// followed by an undo of the last swap, R ^= P[16] and L ^= P[17], with
//   F(x) = ((S0[x31:24] + S1[x23:16]) ^ S2[x15:8]) + S3[x7:0].
// The four 8-to-32-bit S-boxes and the 18-entry P-array here are pseudo-random (the real ones
// are derived from the key by a long setup that is not the point of this test). Each S-box
// sits in its own EPROM table, in the byte lane of the byte it is indexed by, so a SUBST on
// that table returns one S-box entry. The master streams in the round subkey P[i] each round
// and the round counter repeats a 13-instruction round program 16 times. Three programs run
// per block: load L/R, the 16 rounds, and the output transformation. Four blocks are
// encrypted and the ciphertexts compared with a reference computed here; each ciphertext is
// then decrypted on the processor (P-array in reverse order) and must give back the
// plaintext. The cycle count of the round program is checked against the instruction
// cycle table.
module tb_blowfish_rounds;
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
  logic          in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [31:0]   in_data = '0, out_data;

  int          checks = 0, failures = 0;
  logic [31:0] in_q[$], out_q[$];
  logic [31:0] sbox [4][256];
  logic [31:0] parr [18];

  always #5 clk = ~clk;

  crypto_top dut (.*);

  // input stream: offer the head of in_q whenever there is one
  always @(posedge clk) if (in_valid && in_ready) void'(in_q.pop_front());
  always @(negedge clk) begin
    in_valid <= (in_q.size() > 0);
    in_data  <= (in_q.size() > 0) ? in_q[0] : '0;
  end
  always @(posedge clk) if (out_valid && out_ready) out_q.push_back(out_data);

  function automatic logic [31:0] f_ref(logic [31:0] x);
    return ((sbox[0][x[31:24]] + sbox[1][x[23:16]]) ^ sbox[2][x[15:8]]) + sbox[3][x[7:0]];
  endfunction

  function automatic logic [63:0] bf_ref(logic [63:0] blk, bit decrypt);
    logic [31:0] l = blk[63:32], r = blk[31:0], t;
    for (int i = 0; i < 16; i++) begin
      l ^= parr[decrypt ? 17 - i : i];
      r ^= f_ref(l);
      t = l; l = r; r = t;
    end
    t = l; l = r; r = t;
    r ^= parr[decrypt ? 1 : 16];
    l ^= parr[decrypt ? 0 : 17];
    return {l, r};
  endfunction

  function automatic instr_t mk(op_e op, int rd, int rs1, int rs2, int tbl);
    instr_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.tbl = 2'(tbl);
    return i;
  endfunction

  task automatic load_prog(input instr_t p[]);
    foreach (p[k]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 4'(k); prog_instr = p[k];
    end
    @(negedge clk);
    prog_we = 0;
    prog_len = 5'(p.size());
  endtask

  task automatic run(input int nr, output int cycles);
    @(negedge clk);
    rounds = 8'(nr); nwords = 3'd1; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  instr_t p_load[], p_round[], p_final[];

  task automatic cipher(input logic [63:0] blk, input bit decrypt, output logic [63:0] res);
    int cyc, expect_cyc;
    out_q.delete();
    in_q.push_back(blk[63:32]);
    in_q.push_back(blk[31:0]);
    load_prog(p_load);
    run(1, cyc);
    for (int i = 0; i < 16; i++) in_q.push_back(parr[decrypt ? 17 - i : i]);
    load_prog(p_round);
    run(16, cyc);
    expect_cyc = 0;
    foreach (p_round[k]) expect_cyc += int'(instr_cycles(p_round[k].op, 1));
    chk("cycles of 16 rounds", cyc, 16 * expect_cyc + 1);   // done follows the last cycle
    in_q.push_back(parr[decrypt ? 1 : 16]);
    in_q.push_back(parr[decrypt ? 0 : 17]);
    load_prog(p_final);
    run(1, cyc);
    repeat (5) @(negedge clk);
    chk("output words", out_q.size(), 2);
    res = {out_q[0], out_q[1]};
  endtask

  initial begin
    logic [63:0] pt, ct, back;
    for (int t = 0; t < 4; t++)
      for (int v = 0; v < 256; v++) sbox[t][v] = $urandom();
    foreach (parr[i]) parr[i] = $urandom();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // S-box t in table t, lane (3 - t); every other lane of that table is zero
    for (int t = 0; t < 4; t++)
      for (int l = 0; l < 4; l++)
        for (int v = 0; v < 256; v++) begin
          @(negedge clk);
          ep_we = 1; ep_addr = 12'((t * 4 + l) * 256 + v);
          ep_data = (l == 3 - t) ? sbox[t][v] : '0;
        end
    @(negedge clk);
    ep_we = 0;

    p_load = new[2];
    p_load[0] = mk(OP_IN, 0, 0, 0, 0);          // L
    p_load[1] = mk(OP_IN, 1, 0, 0, 0);          // R
    p_round = new[13];
    p_round[0]  = mk(OP_IN,    5, 0, 0, 0);     // P[i]
    p_round[1]  = mk(OP_XOR,   0, 0, 5, 0);     // L ^= P[i]
    p_round[2]  = mk(OP_SUBST, 6, 0, 0, 0);     // S0[a]
    p_round[3]  = mk(OP_SUBST, 7, 0, 0, 1);     // S1[b]
    p_round[4]  = mk(OP_ADD,   6, 6, 7, 0);
    p_round[5]  = mk(OP_SUBST, 7, 0, 0, 2);     // S2[c]
    p_round[6]  = mk(OP_XOR,   6, 6, 7, 0);
    p_round[7]  = mk(OP_SUBST, 7, 0, 0, 3);     // S3[d]
    p_round[8]  = mk(OP_ADD,   6, 6, 7, 0);     // F(L)
    p_round[9]  = mk(OP_XOR,   1, 1, 6, 0);     // R ^= F(L)
    p_round[10] = mk(OP_XOR,   0, 0, 1, 0);     // swap L and R
    p_round[11] = mk(OP_XOR,   1, 1, 0, 0);
    p_round[12] = mk(OP_XOR,   0, 0, 1, 0);
    p_final = new[9];
    p_final[0] = mk(OP_XOR, 0, 0, 1, 0);        // undo the last swap
    p_final[1] = mk(OP_XOR, 1, 1, 0, 0);
    p_final[2] = mk(OP_XOR, 0, 0, 1, 0);
    p_final[3] = mk(OP_IN,  5, 0, 0, 0);
    p_final[4] = mk(OP_XOR, 1, 1, 5, 0);        // R ^= P[16]
    p_final[5] = mk(OP_IN,  5, 0, 0, 0);
    p_final[6] = mk(OP_XOR, 0, 0, 5, 0);        // L ^= P[17]
    p_final[7] = mk(OP_OUT, 0, 0, 0, 0);
    p_final[8] = mk(OP_OUT, 0, 1, 0, 0);

    for (int b = 0; b < 4; b++) begin
      pt = {$urandom(), $urandom()};
      cipher(pt, 0, ct);
      chk("ciphertext", ct, bf_ref(pt, 0));
      cipher(ct, 1, back);
      chk("decrypted", back, pt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
