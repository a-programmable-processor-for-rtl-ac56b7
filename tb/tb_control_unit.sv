// tb_control_unit: checks the control words the control unit issues, cycle by cycle.
//
// A six-instruction program (ADD, SUBST, IN, OUT, MODMUL, XOR) runs for two rounds with
// two-word operands while in_empty, out_full and the adder's carry-out are driven at random.
// For every cycle the expected control word is worked out here from the instruction, the
// word/byte position and the cycle count each instruction takes (instr_cycles); register
// addresses, write enables, bus source, carry-in (chained from the previous word's
// carry-out), byte lane, start of the modular unit, buffer pops/pushes and stalls are
// compared (a modular instruction loads its operands word by word, starts the unit and
// writes the result word by word), and done must come exactly after the last cycle of the last round.
module tb_control_unit;
  import crypto_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       prog_we = 0, start = 0, busy, done;
  logic [3:0] prog_addr = '0;
  instr_t     prog_instr = '0;
  logic [4:0] prog_len = '0;
  logic [7:0] rounds = '0;
  logic [2:0] nwords = '0;
  logic       add_cout = 0, in_empty = 0, out_full = 0;
  ctrl_t      ctrl;
  logic       stall;
  logic [2:0] words;
  int         checks = 0, failures = 0, n_stall = 0;

  always #5 clk = ~clk;

  control_unit dut (.*);

  function automatic instr_t mk(op_e op, int rd, int rs1, int rs2, int tbl);
    instr_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.tbl = 2'(tbl);
    return i;
  endfunction

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  instr_t prog [6];

  initial begin
    logic carry;
    prog[0] = mk(OP_ADD,    4, 0, 8, 0);
    prog[1] = mk(OP_SUBST,  1, 2, 0, 3);
    prog[2] = mk(OP_IN,     5, 0, 0, 0);
    prog[3] = mk(OP_OUT,    0, 6, 0, 0);
    prog[4] = mk(OP_MODMUL, 7, 0, 1, 0);
    prog[5] = mk(OP_XOR,   10, 12, 14, 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[k]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 4'(k); prog_instr = prog[k];
    end
    @(negedge clk);
    prog_we = 0; prog_len = 6; rounds = 2; nwords = 2; start = 1;
    @(negedge clk);
    start = 0;
    carry = 0;
    for (int r = 0; r < 2; r++) begin
      foreach (prog[k]) begin
        instr_t ins;
        int n, c;
        ins = prog[k];
        n = int'(instr_cycles(ins.op, 2));
        c = 0;
        while (c < n) begin
          int w;
          bit st;
          w = (ins.op == OP_SUBST) ? c / 4 : c;
          // random status inputs for this cycle
          in_empty = (($urandom() % 3) == 0) || (r == 0 && c == 0 && ins.op == OP_IN && n_stall == 0);
          out_full = (($urandom() % 3) == 0) || (r == 0 && c == 0 && ins.op == OP_OUT && n_stall < 3);
          add_cout = 1'($urandom());
          #1;
          st = (ins.op == OP_IN && in_empty) || (ins.op == OP_OUT && out_full);
          chk("busy", busy, 1);
          chk("stall", stall, st);
          chk("done", done, 0);
          case (ins.op)
            OP_ADD, OP_XOR: begin
              chk("we", ctrl.we, 1);
              chk("wa", ctrl.wa, ins.rd + w);
              chk("ra", ctrl.ra, ins.rs1 + w);
              chk("rb", ctrl.rb, ins.rs2 + w);
              chk("bus", ctrl.bus_sel, (ins.op == OP_ADD) ? BUS_ADD : BUS_XOR);
              if (ins.op == OP_ADD) begin
                chk("sub", ctrl.sub, 0);
                chk("cin", ctrl.cin, (w == 0) ? 0 : carry);
                carry = add_cout;
              end
            end
            OP_SUBST: begin
              chk("we", ctrl.we, (c % 4) == 3);
              chk("ra", ctrl.ra, ins.rs1 + w);
              chk("wa", ctrl.wa, ins.rd + w);
              chk("lane", ctrl.byte_idx, c % 4);
              chk("first", ctrl.sb_first, (c % 4) == 0);
              chk("tbl", ctrl.tbl, ins.tbl);
              chk("bus", ctrl.bus_sel, BUS_SBOX);
            end
            OP_IN: begin
              chk("we", ctrl.we, !st);
              chk("pop", ctrl.in_pop, !st);
              chk("wa", ctrl.wa, ins.rd + w);
              chk("bus", ctrl.bus_sel, BUS_IN);
            end
            OP_OUT: begin
              chk("we", ctrl.we, 0);
              chk("push", ctrl.out_push, !st);
              chk("ra", ctrl.ra, ins.rs1 + w);
            end
            OP_MODMUL: begin
              // two load cycles, start, wait, two result writes
              chk("ld", ctrl.exp_ld, c < 2);
              chk("start", ctrl.exp_start, c == 2);
              chk("mul", ctrl.exp_mul, 1);
              chk("we", ctrl.we, c >= n - 2);
              if (c < 2) begin
                chk("ld word", ctrl.exp_word, c);
                chk("ra", ctrl.ra, ins.rs1 + c);
                chk("rb", ctrl.rb, ins.rs2 + c);
              end
              if (c >= n - 2) begin
                chk("rd word", ctrl.exp_word, c - (n - 2));
                chk("wa", ctrl.wa, ins.rd + c - (n - 2));
              end
              chk("bus", ctrl.bus_sel, BUS_EXP);
              chk("words", words, 2);
            end
            default: ;
          endcase
          if (st) n_stall = n_stall + 1;
          if (!st) c = c + 1;
          @(negedge clk);
        end
      end
    end
    #1;
    chk("done", done, 1);
    chk("busy after", busy, 0);
    $display("stall cycles: %0d", n_stall);
    chk("stalls seen", n_stall > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
