// control_unit: sequences the processor's instructions and drives the data path.
//
// A master processor loads up to PROG_DEPTH instructions into the instruction buffer
// (prog_we/prog_addr/prog_instr), then pulses `start` with the program length, the number
// of rounds and the operand length in 32-bit words. The control unit then runs the program
// `rounds` times without further help and pulses `done` at the end.
//
// Three counters keep track: the instruction counter (pc) selects the instruction, the
// read counter counts the cycles spent on it, and the round counter counts completed passes
// of the program. The cycle ROM, indexed by opcode and operand length, says how many cycles
// an instruction takes; when the read counter reaches that number the next instruction
// starts. The read counter also supplies the word index (and, for substitution, the byte
// lane) of multi-word operations, and the carry flag chains word-wise additions and
// subtractions. An IN with the input buffer empty, or an OUT with the output buffer full,
// stalls: the counters hold and nothing is written. A modular instruction loads its operand
// words into the exponentiation unit (N and 2^2n mod N from fixed registers), starts it,
// waits for its latency and writes the result words back.
//
// The control word (ctrl) is combinational from the counters and the current instruction.
// Following the source: a master supplies instructions, bit length and round count; a ROM
// holds the cycles per instruction and bit length; reset/instruction/read counters exist.
// This design's own: the instruction set and encoding, the buffer, the stall rule, the
// mapping of multi-word operands onto consecutive registers, and the reading of the "reset
// counter" as the round counter.
module control_unit
  import crypto_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // master interface
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_instr,
  input  logic                          start,
  input  logic [$clog2(PROG_DEPTH):0]   prog_len,   // 1..PROG_DEPTH
  input  logic [7:0]                    rounds,     // 1..255
  input  logic [2:0]                    nwords,     // 1..MAXWORDS
  output logic                          busy,
  output logic                          done,
  output logic [2:0]                    words,      // operand length of the running program
  // status from the data path
  input  logic                          add_cout,
  input  logic                          in_empty,
  input  logic                          out_full,
  // control word
  output ctrl_t                         ctrl,
  output logic                          stall
);
  localparam int unsigned OPS = 16;
  typedef logic [17:0] rom_t [OPS * MAXWORDS];

  function automatic rom_t make_rom();
    rom_t r;
    for (int o = 0; o < OPS; o++)
      for (int w = 0; w < MAXWORDS; w++)
        r[o * MAXWORDS + w] = 18'(instr_cycles(op_e'(o), w + 1));
    return r;
  endfunction

  localparam rom_t CYC_ROM = make_rom();

  instr_t                        ibuf [PROG_DEPTH];
  instr_t                        ins;
  logic [$clog2(PROG_DEPTH)-1:0] pc;          // instruction counter
  logic [17:0]                   rd_cnt;      // read counter
  logic [7:0]                    round_cnt;   // round ("reset") counter
  logic [$clog2(PROG_DEPTH):0]   len_q;
  logic [7:0]                    rounds_q;
  logic [1:0]                    nw_m1;       // operand length - 1
  logic                          carry_q;
  logic [17:0]                   n_cyc;
  logic [17:0]                   wr_base;     // first result write of a modular instruction
  logic                          mod_op;
  logic                          last_cyc;
  logic [1:0]                    w;           // word index of a multi-word operation
  logic [1:0]                    lane;        // byte lane of a substitution

  always_ff @(posedge clk) begin
    if (prog_we) ibuf[prog_addr] <= prog_instr;
  end

  assign ins      = ibuf[pc];
  assign n_cyc    = CYC_ROM[{ins.op, nw_m1}];
  assign last_cyc = (rd_cnt == n_cyc - 18'd1);
  assign mod_op   = (ins.op == OP_MODMUL) || (ins.op == OP_MODEXP);
  assign wr_base  = n_cyc - 18'(words);
  assign words    = {1'b0, nw_m1} + 3'd1;
  always_comb begin
    if (ins.op == OP_SUBST)               w = rd_cnt[3:2];
    else if (mod_op && rd_cnt >= wr_base) w = 2'(rd_cnt - wr_base);
    else                                  w = rd_cnt[1:0];
  end
  assign lane     = rd_cnt[1:0];

  always_comb begin
    stall = busy && (((ins.op == OP_IN) && in_empty) || ((ins.op == OP_OUT) && out_full));
    ctrl           = '0;
    ctrl.ra        = ins.rs1 + 4'(w);
    ctrl.rb        = ins.rs2 + 4'(w);
    ctrl.wa        = ins.rd + 4'(w);
    ctrl.exp_word  = w;
    ctrl.tbl       = ins.tbl;
    ctrl.byte_idx  = lane;
    ctrl.sb_first  = (lane == 2'd0);
    ctrl.sub       = (ins.op == OP_SUB);
    ctrl.cin       = (w == 2'd0) ? (ins.op == OP_SUB) : carry_q;
    if (busy) begin
      case (ins.op)
        OP_ADD, OP_SUB: begin
          ctrl.bus_sel = BUS_ADD;
          ctrl.we      = 1'b1;
        end
        OP_XOR: begin
          ctrl.bus_sel = BUS_XOR;
          ctrl.we      = 1'b1;
        end
        OP_SUBST: begin
          ctrl.bus_sel = BUS_SBOX;
          ctrl.we      = (lane == 2'd3);
        end
        OP_MODMUL, OP_MODEXP: begin
          // load the operands word by word, start, then write the result word by word
          ctrl.bus_sel   = BUS_EXP;
          ctrl.exp_ld    = (rd_cnt < 18'(words));
          ctrl.exp_start = (rd_cnt == 18'(words));
          ctrl.exp_mul   = (ins.op == OP_MODMUL);
          ctrl.we        = (rd_cnt >= wr_base);
        end
        OP_IN: begin
          ctrl.bus_sel = BUS_IN;
          ctrl.we      = !stall;
          ctrl.in_pop  = !stall;
        end
        OP_OUT: begin
          ctrl.out_push = !stall;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      pc        <= '0;
      rd_cnt    <= '0;
      round_cnt <= '0;
      len_q     <= '0;
      rounds_q  <= '0;
      nw_m1     <= '0;
      carry_q   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          pc        <= '0;
          rd_cnt    <= '0;
          round_cnt <= '0;
          len_q     <= prog_len;
          rounds_q  <= rounds;
          nw_m1     <= 2'(nwords - 3'd1);
        end
      end else if (!stall) begin
        if (ins.op == OP_ADD || ins.op == OP_SUB) carry_q <= add_cout;
        if (last_cyc) begin
          rd_cnt <= '0;
          if (pc == $bits(pc)'(len_q - 1'b1)) begin
            pc <= '0;
            if (round_cnt == rounds_q - 8'd1) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              round_cnt <= round_cnt + 8'd1;
            end
          end else begin
            pc <= pc + 1'b1;
          end
        end else begin
          rd_cnt <= rd_cnt + 18'd1;
        end
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("control_unit: start while busy");
  a_args: assert property (@(posedge clk) disable iff (!rst_n)
                           start |-> (prog_len != 0 && rounds != 0 && nwords != 0
                                      && nwords <= 3'(MAXWORDS)))
    else $error("control_unit: bad program length, round count or word count");
endmodule
