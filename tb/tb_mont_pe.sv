// tb_mont_pe: cycle-by-cycle check of one Montgomery processing unit in isolation.
//
// Random steps (valid, stream, group, selects), random byte multiples of B and N and random
// LSB_IN/CARRY_IN values drive the unit. A reference kept here follows the unit's
// arithmetic: REG 1 takes the selected multiples of B and N one cycle before a step
// executes; executing, the register of the step's stream and group becomes
// REG 1 + {LSB_IN, own bits 7:2} + CARRY_IN. All result registers and the forwarded step are
// compared every cycle, and a clear is issued now and then.
module tb_mont_pe;
  import crypto_pkg::*;

  logic       clk = 0, rst_n = 0, clr = 0;
  mm_step_t   step_in = '0, step_q;
  logic [7:0] bm [4], nm [4];
  logic [1:0] lsb_in = '0, carry_in = '0;
  logic [9:0] res [2][MAX_GROUPS];
  int         checks = 0, failures = 0, execs = 0;

  logic [8:0] m_reg1;
  mm_step_t   m_step;
  logic [9:0] m_res [2][MAX_GROUPS];

  always #5 clk = ~clk;

  mont_pe dut (.*);

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int m = 0; m < 4; m++) begin bm[m] = '0; nm[m] = '0; end
    m_reg1 = '0; m_step = '0;
    for (int s = 0; s < 2; s++) for (int g = 0; g < MAX_GROUPS; g++) m_res[s][g] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // outputs for the current inputs
      chk("step_q", int'(step_q), int'(m_step));
      for (int s = 0; s < 2; s++)
        for (int g = 0; g < MAX_GROUPS; g++) chk("res", res[s][g], m_res[s][g]);
      // new inputs, then the reference state after the coming edge
      step_in.valid = ($urandom() % 5) != 0;
      step_in.s     = 1'($urandom());
      step_in.g     = 2'($urandom());
      step_in.last  = 1'($urandom());
      step_in.da    = 2'($urandom());
      step_in.dq    = 2'($urandom());
      for (int m = 0; m < 4; m++) begin bm[m] = 8'($urandom()); nm[m] = 8'($urandom()); end
      lsb_in   = 2'($urandom());
      carry_in = 2'($urandom());
      clr      = ($urandom() % 100) == 0;
      if (clr) begin
        for (int s = 0; s < 2; s++) for (int g = 0; g < MAX_GROUPS; g++) m_res[s][g] = '0;
      end else if (m_step.valid) begin
        m_res[m_step.s][m_step.g] = 10'(m_reg1 + {lsb_in, m_res[m_step.s][m_step.g][7:2]}
                                        + carry_in);
        execs++;
      end
      m_reg1 = 9'(bm[step_in.da] + nm[step_in.dq]);
      m_step = step_in;
    end
    chk("steps executed", execs > 1000, 1);
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
