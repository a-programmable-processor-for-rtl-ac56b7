// mont_pe: one 8-bit processing unit of the systolic radix-4 Montgomery multiplier.
//
// The row works on a long operand one 32-bit group at a time. For group g, unit j owns byte
// 4g+j of the running sum S = 4R. A step carries the stream s, the group g and the selects
// da = {a_i+1,a_i} and dq = {q_i+1,q_i}. In the cycle a step enters (step_in), MUX B and
// MUX N (outside, in mont_mult) present this unit's byte of 0/B/2B/3B and of 0/N/2N/3N and
// ADDER 1 stores their 9-bit sum in REG 1. In the next cycle (step_q) ADDER 2 adds byte j of
// the previous R (the two LSB_IN bits from the left neighbour above the six high bits of
// this unit's own previous result, which is the divide by 4) to the 2-bit CARRY_IN from the
// right neighbour, and ADDER 3 adds REG 1. The 10-bit sum is steered by the decoder into
// the result register of the step's stream and group. Bits 9:8 of a result register are the
// carry to the left neighbour, bits 1:0 the LSBs to the right neighbour, bits 7:0 RESULT_j.
//
// Timing: a step executes in unit j one cycle after unit j-1. `clr` clears all registers.
// The data path (MUX B, MUX N, ADDER 1, REG 1, ADDER 2, ADDER 3, decoder, RES_REG 1/2) follows
// the source; the source's RES MUX, which picks the register the neighbours see, is in
// mont_mult, because with groups each unit is read by more than one other unit. The source
// also shows a REG 2 after ADDER 2; here ADDER 2 feeds ADDER 3 in the same cycle, because
// CARRY_IN and LSB_IN of a step only exist one cycle before the step must finish if a unit is
// to lag its right neighbour by one cycle as the source's schedule states.
module mont_pe
  import crypto_pkg::*;
#(
  parameter int unsigned MAXG = MAX_GROUPS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  mm_step_t   step_in,          // step entering REG 1 this cycle
  output mm_step_t   step_q,           // step executing this cycle (to the left neighbour)
  input  logic [7:0] bm [4],           // this unit's byte of 0, B, 2B, 3B for step_in's group
  input  logic [7:0] nm [4],           // this unit's byte of 0, N, 2N, 3N for step_in's group
  input  logic [1:0] lsb_in,           // from the left neighbour
  input  logic [1:0] carry_in,         // from the right neighbour
  output logic [9:0] res [2][MAXG]     // result registers, per stream and group
);
  logic [8:0] reg1;
  logic [9:0] sum3;
  logic [8:0] sum2;

  // ADDER 2 and ADDER 3
  always_comb begin
    sum2 = {1'b0, lsb_in, res[step_q.s][step_q.g][7:2]} + {7'd0, carry_in};
    sum3 = {1'b0, reg1} + {1'b0, sum2};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1   <= '0;
      step_q <= '0;
      for (int s = 0; s < 2; s++)
        for (int g = 0; g < int'(MAXG); g++) res[s][g] <= '0;
    end else begin
      // MUX B, MUX N, ADDER 1 -> REG 1
      reg1   <= {1'b0, bm[step_in.da]} + {1'b0, nm[step_in.dq]};
      step_q <= step_in;
      if (clr) begin
        for (int s = 0; s < 2; s++)
          for (int g = 0; g < int'(MAXG); g++) res[s][g] <= '0;
      end else if (step_q.valid) begin
        res[step_q.s][step_q.g] <= sum3;   // decoder
      end
    end
  end
endmodule
