// mont_mult: systolic radix-4 Montgomery modular multiplier, two interleaved streams.
//
// Computes, for both streams s = 0, 1 at once, res_s = A_s * B * 2^-n mod N with a shared B
// and N (N odd, A_s < N, B < N), n = 32 * ng, where ng (1..MAXG) is the operand length in
// 32-bit groups. The loop-unrolled Montgomery recurrence
//   R <- (R + (2a_i+1 + a_i) B + (2q_i+1 + q_i) N) / 4
// runs n/2 times per stream on a row of five mont_pe units. 0, B, 2B, 3B and 0, N, 2N, 3N are
// formed once at start and held in registers.
//
// Schedule. One recurrence step is issued as ng group steps per stream. Within a step the
// issue order is (s0,g0) (s1,g0) idle idle (s0,g1) (s1,g1) idle idle ... (s0,g_last)
// (s1,g_last), so a step takes 4*ng-2 slots (2 for one group, where the streams simply
// alternate every cycle). A group step executes in unit j j+1 cycles after issue. Units 0-3
// handle bytes 0-3 of the group; unit 4 only works in the most significant group, where it
// holds the top byte and absorbs the carries. The carry out of unit 3 in group g is CARRY_IN
// of unit 0 in group g+1 (the two idle slots give it time to arrive); the LSBs of unit 0 in
// group g+1 are LSB_IN of unit 3 in group g. The q bits of a step are formed by qgen from
// the two low bits of that stream's R in unit 0, group 0, when group 0 is issued, and are
// held, like the operand digits, for the step's other groups.
//
// Interface: pulse `start` with ng, n_in and b_in valid. The operand digits are pulled two
// bits at a time: when a_shift[s] is high, a_digit_s must hold {a_i+1, a_i} of stream s and
// the supplier then shifts (or rotates) its A register right by 2. mm_latency(ng) cycles
// after start (39 for one group) `done` pulses and res0/res1 hold the results, which stay
// valid until the next start.
// Following the source: the unrolled recurrence, 8-bit units, five units in a row, word
// (group) serial use of a 32-bit row for longer operands, the q-generation and precomputed
// multiples. This design's own: the exact group issue order and idle slots, the final
// conditional subtraction of N (the raw recurrence leaves R < 2N) and the operand handshake.
module mont_mult
  import crypto_pkg::*;
#(
  parameter int unsigned MAXG = MAX_GROUPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [2:0]           ng,
  input  logic [32*MAXG-1:0]   n_in,
  input  logic [32*MAXG-1:0]   b_in,
  input  logic [1:0]           a_digit0,
  input  logic [1:0]           a_digit1,
  output logic [1:0]           a_shift,
  output logic                 busy,
  output logic                 done,
  output logic [32*MAXG-1:0]   res0,
  output logic [32*MAXG-1:0]   res1
);
  localparam int unsigned U  = MM_UNITS;
  localparam int unsigned W  = 32 * MAXG;
  localparam int unsigned EW = W + 8;
  localparam int unsigned CW = $clog2(mm_latency(MAXG) + 1);

  logic [EW-1:0] bmul [4];
  logic [EW-1:0] nmul [4];
  logic [CW-1:0] cyc, last_cyc;
  logic [2:0]    ng_q;
  logic [1:0]    grp, sub;          // group and slot within the group of the current step
  logic [6:0]    it, n_it;          // steps issued per stream, steps to issue
  logic          issuing;

  mm_step_t   issue;
  mm_step_t   step_q  [U];
  mm_step_t   step_in [U];
  logic [9:0] r       [U][2][MAXG];
  logic [1:0] lsb_i   [U];
  logic [1:0] carry_i [U];
  logic [1:0] a_hold  [2];
  logic [1:0] q_hold  [2];
  logic [EW-1:0] s_all [2];
  logic [1:0] r_low, a_live, a_dig;
  logic       q_lo, q_hi;

  // cycles from start+1 to the cycle all units have finished, per group count
  always_comb begin
    last_cyc = CW'(mm_latency(1) - 2);
    for (int g = 1; g <= int'(MAXG); g++)
      if (ng_q == 3'(g)) last_cyc = CW'(mm_latency(g) - 2);
  end
  assign n_it    = 7'(16) * 7'(ng_q);
  assign issuing = busy && (it < n_it);

  // ---- step issue and q generation
  assign a_live = sub[0] ? a_digit1 : a_digit0;
  assign a_dig  = (grp == 2'd0) ? a_live : a_hold[sub[0]];
  assign r_low  = r[0][sub[0]][0][3:2];

  qgen u_qgen (
    .r    (r_low),
    .b    (bmul[1][1:0]),
    .n    (nmul[1][1:0]),
    .a_lo (a_live[0]),
    .a_hi (a_live[1]),
    .q_lo (q_lo),
    .q_hi (q_hi)
  );

  always_comb begin
    issue.valid = issuing && !sub[1];
    issue.s     = sub[0];
    issue.g     = grp;
    issue.last  = (3'(grp) == ng_q - 3'd1);
    issue.da    = a_dig;
    issue.dq    = (grp == 2'd0) ? {q_hi, q_lo} : q_hold[sub[0]];
  end
  assign a_shift = {issue.valid && grp == 2'd0 && issue.s, issue.valid && grp == 2'd0 && !issue.s};

  // ---- the systolic row
  for (genvar j = 0; j < U; j++) begin : g_pe
    logic [7:0] bm [4];
    logic [7:0] nm [4];
    mm_step_t   x;       // step this unit executes
    // MUX B / MUX N: byte 4g+j of the multiples (unit 4 only in the top group)
    for (genvar m = 0; m < 4; m++) begin : g_m
      assign bm[m] = bmul[m][8 * (4 * step_in[j].g + j) +: 8];
      assign nm[m] = nmul[m][8 * (4 * step_in[j].g + j) +: 8];
    end
    if (j == 0) begin : g_first
      assign step_in[j] = issue;
    end else if (j < U - 1) begin : g_mid
      assign step_in[j] = step_q[j-1];
    end else begin : g_top
      always_comb begin
        step_in[j]       = step_q[j-1];
        step_in[j].valid = step_q[j-1].valid && step_q[j-1].last;
      end
    end
    assign x = step_q[j];

    // RES MUX: the neighbours' registers of the executing step's stream and group
    if (j == 0) begin : g_c0
      assign carry_i[j] = (x.g == 2'd0) ? 2'b00 : r[U-2][x.s][x.g - 2'd1][9:8];
    end else begin : g_cj
      assign carry_i[j] = r[j-1][x.s][x.g][9:8];
    end
    if (j < U - 2) begin : g_lj
      assign lsb_i[j] = r[j+1][x.s][x.g][1:0];
    end else if (j == U - 2) begin : g_l3
      assign lsb_i[j] = x.last ? r[U-1][x.s][x.g][1:0] : r[0][x.s][x.g + 2'd1][1:0];
    end else begin : g_l4
      assign lsb_i[j] = 2'b00;
    end

    mont_pe #(.MAXG(MAXG)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .clr      (start),
      .step_in  (step_in[j]),
      .step_q   (step_q[j]),
      .bm       (bm),
      .nm       (nm),
      .lsb_in   (lsb_i[j]),
      .carry_in (carry_i[j]),
      .res      (r[j])
    );
  end

  // ---- S of each stream: bytes 0-3 of every group, and unit 4's byte above the top group
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      s_all[s] = '0;
      for (int g = 0; g < int'(MAXG); g++) begin
        for (int j = 0; j < int'(U) - 1; j++)
          s_all[s][8 * (4 * g + j) +: 8] = r[j][s][g][7:0];
      end
      for (int g = 0; g < int'(MAXG); g++)
        if (3'(g) == ng_q - 3'd1) s_all[s][32 * g + 32 +: 8] = r[U-1][s][g][7:0];
    end
  end

  // ---- final result: R = S / 4, then one conditional subtraction of N
  function automatic logic [W-1:0] reduce(logic [EW-1:0] s, logic [EW-1:0] n);
    logic [EW-1:0] rr;
    rr = s >> 2;
    return (rr >= n) ? W'(rr - n) : W'(rr);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      cyc     <= '0;
      ng_q    <= 3'd1;
      grp     <= '0;
      sub     <= '0;
      it      <= '0;
      res0    <= '0;
      res1    <= '0;
      a_hold  <= '{2'b00, 2'b00};
      q_hold  <= '{2'b00, 2'b00};
      bmul[0] <= '0; bmul[1] <= '0; bmul[2] <= '0; bmul[3] <= '0;
      nmul[0] <= '0; nmul[1] <= '0; nmul[2] <= '0; nmul[3] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        cyc     <= '0;
        ng_q    <= ng;
        grp     <= '0;
        sub     <= '0;
        it      <= '0;
        bmul[0] <= '0;
        bmul[1] <= EW'(b_in);
        bmul[2] <= EW'(b_in) << 1;
        bmul[3] <= EW'(b_in) + (EW'(b_in) << 1);
        nmul[0] <= '0;
        nmul[1] <= EW'(n_in);
        nmul[2] <= EW'(n_in) << 1;
        nmul[3] <= EW'(n_in) + (EW'(n_in) << 1);
      end else if (busy) begin
        cyc <= cyc + 1'b1;
        if (issue.valid && grp == 2'd0) begin
          a_hold[issue.s] <= a_live;
          q_hold[issue.s] <= {q_hi, q_lo};
        end
        if (issuing) begin
          // slot counters: two stream slots per group, two idle slots between groups
          if (issue.last && sub == 2'd1) begin
            grp <= '0;
            sub <= '0;
            it  <= it + 1'b1;
          end else begin
            sub <= sub + 1'b1;
            if (sub == 2'd3) grp <= grp + 1'b1;
          end
        end
        if (cyc == last_cyc) begin
          busy <= 1'b0;
          done <= 1'b1;
          res0 <= reduce(s_all[0], nmul[1]);
          res1 <= reduce(s_all[1], nmul[1]);
        end
      end
    end
  end

  // The top unit never carries out, N must be odd, and the group count must be in range.
  a_no_top_carry: assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> r[U-1][0][2'(ng_q - 3'd1)][9:8] == 2'b00
                                            && r[U-1][1][2'(ng_q - 3'd1)][9:8] == 2'b00)
    else $error("mont_mult: carry out of the top unit");
  a_odd_modulus: assert property (@(posedge clk) disable iff (!rst_n) busy |-> nmul[1][0])
    else $error("mont_mult: even modulus");
  a_groups: assert property (@(posedge clk) disable iff (!rst_n)
                             start |-> (ng != 0 && ng <= 3'(MAXG)))
    else $error("mont_mult: bad group count");
endmodule
