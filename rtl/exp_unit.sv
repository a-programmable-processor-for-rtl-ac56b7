// exp_unit: modular exponentiation P = P0 * M^E mod N by square-and-multiply.
//
// Built around mont_mult, whose two streams share the multiplicand held in B-REG. The
// M-SHIFT REG feeds stream 0 and the P-SHIFT REG stream 1, two bits per step; both rotate
// right by two per step, so after a multiplication they hold their old value again. A
// DECODER returns stream 0's result to the M register and stream 1's to the P register.
// The E-SHIFT REG supplies the exponent bits, least significant first. The sequence is
//   1. B-REG = 2^(2n) mod N (input r2_w)  : M <- M 2^n, P <- P0 2^n   (into Montgomery form)
//   2. nbits times, B-REG = M: M <- M*M, and P <- P*M only where e_i = 1
//   3. B-REG = 1: P <- P * 2^-n                                       (out of Montgomery form)
// Every step runs both streams (the square and the multiply of one exponent bit proceed
// side by side); when e_i = 0 the decoder simply does not write P.
//
// Interface: while idle, load the operands one 32-bit word per cycle with `ld` and
// ld_word (word 0 first; loading word 0 clears the upper words): m_w (M < N), p_w (P0 < N;
// 1 for a plain exponentiation), e_w, n_w (odd) and r2_w = 2^(2n) mod N, n = 32 * ng. Then
// pulse `start` with ng (1..MAXG) and nbits (exponent bits to scan, 1..n). `done` pulses
// exp_latency(ng, nbits) cycles after start and `result` then holds word rd_word of P.
// A single modular multiplication A*B mod N is M = B, P0 = A, E = 1, nbits = 1.
// Following the source: the B-REG with its 2^2n / 1 / M input multiplexer, the three shift
// registers, the decoder, the alternation of M and P as the multiplier's a input, the
// pre-multiplication by 2^n and the final multiplication by 1. This design's own: the
// sequencing FSM, the P0 input, the word-wise loading, the rotating (rather than emptying)
// shift registers, and 2^2n mod N being supplied from outside.
module exp_unit
  import crypto_pkg::*;
#(
  parameter int unsigned MAXG = MAX_GROUPS
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              ld,
  input  logic [1:0]                        ld_word,
  input  logic [DW-1:0]                     m_w,
  input  logic [DW-1:0]                     p_w,
  input  logic [DW-1:0]                     e_w,
  input  logic [DW-1:0]                     n_w,
  input  logic [DW-1:0]                     r2_w,
  input  logic                              start,
  input  logic [2:0]                        ng,
  input  logic [$clog2(DW*MAXG+1)-1:0]      nbits,
  output logic                              busy,
  output logic                              done,
  input  logic [1:0]                        rd_word,
  output logic [DW-1:0]                     result
);
  localparam int unsigned WIDTH = DW * MAXG;

  typedef enum logic [1:0] {PH_CONV, PH_LOOP, PH_FINAL} phase_e;
  typedef enum logic [1:0] {S_IDLE, S_LOADB, S_GO, S_WAIT} state_e;

  state_e                     state;
  phase_e                     phase;
  logic [WIDTH-1:0]           m_sr, p_sr, e_sr, b_reg, n_reg, r2_reg;
  logic [$clog2(WIDTH+1)-1:0] cnt;
  logic [2:0]                 ng_q;
  logic [$clog2(WIDTH+1)-1:0] len;   // n = 32 * ng
  logic [1:0]                 a_shift;
  logic                       mm_start, mm_busy, mm_done;
  logic [WIDTH-1:0]           mm_res0, mm_res1;
  logic [WIDTH-1:0]           bmux;

  // B-REG input multiplexer: 2^2n mod N, 1 or M
  always_comb begin
    case (phase)
      PH_CONV: bmux = r2_reg;
      PH_LOOP: bmux = m_sr;
      default: bmux = WIDTH'(1);
    endcase
  end

  assign mm_start = (state == S_GO);

  mont_mult #(.MAXG(MAXG)) u_mm (
    .clk, .rst_n,
    .start   (mm_start),
    .ng      (ng_q),
    .n_in    (n_reg),
    .b_in    (b_reg),
    .a_digit0(m_sr[1:0]),
    .a_digit1(p_sr[1:0]),
    .a_shift (a_shift),
    .busy    (mm_busy),
    .done    (mm_done),
    .res0    (mm_res0),
    .res1    (mm_res1)
  );

  assign busy   = (state != S_IDLE);
  assign result = p_sr[DW * rd_word +: DW];
  assign len    = $bits(len)'(DW) * $bits(len)'(ng_q);

  // rotate right by two within the n-bit operand
  function automatic logic [WIDTH-1:0] rot2(logic [WIDTH-1:0] v, logic [$clog2(WIDTH+1)-1:0] n);
    logic [WIDTH-1:0] r;
    r = v >> 2;
    r[$clog2(WIDTH)'(n - 2) +: 2] = v[1:0];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      phase  <= PH_CONV;
      m_sr   <= '0;
      p_sr   <= '0;
      e_sr   <= '0;
      b_reg  <= '0;
      n_reg  <= '0;
      r2_reg <= '0;
      cnt    <= '0;
      ng_q   <= 3'd1;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      // rotating shift registers feeding the multiplier's a input
      if (a_shift[0]) m_sr <= rot2(m_sr, len);
      if (a_shift[1]) p_sr <= rot2(p_sr, len);
      case (state)
        S_IDLE: if (ld) begin
          if (ld_word == 2'd0) begin
            m_sr   <= WIDTH'(m_w);
            p_sr   <= WIDTH'(p_w);
            e_sr   <= WIDTH'(e_w);
            n_reg  <= WIDTH'(n_w);
            r2_reg <= WIDTH'(r2_w);
          end else begin
            m_sr[DW * ld_word +: DW]   <= m_w;
            p_sr[DW * ld_word +: DW]   <= p_w;
            e_sr[DW * ld_word +: DW]   <= e_w;
            n_reg[DW * ld_word +: DW]  <= n_w;
            r2_reg[DW * ld_word +: DW] <= r2_w;
          end
        end else if (start) begin
          ng_q   <= ng;
          cnt    <= nbits;
          phase  <= PH_CONV;
          state  <= S_LOADB;
        end
        S_LOADB: begin
          b_reg <= bmux;
          state <= S_GO;
        end
        S_GO: state <= S_WAIT;
        S_WAIT: if (mm_done) begin
          // decoder: stream 0 -> M-SHIFT REG, stream 1 -> P-SHIFT REG
          m_sr <= mm_res0;
          if (phase != PH_LOOP || e_sr[0]) p_sr <= mm_res1;
          state <= S_LOADB;
          case (phase)
            PH_CONV: phase <= (cnt == 0) ? PH_FINAL : PH_LOOP;
            PH_LOOP: begin
              e_sr <= e_sr >> 1;
              cnt  <= cnt - 1'b1;
              if (cnt == 1) phase <= PH_FINAL;
            end
            default: begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 (start || ld) |-> state == S_IDLE && !(start && ld))
    else $error("exp_unit: start or load while busy");
endmodule
