// crypto_pkg: types and constants shared by the programmable cryptography processor.
//
// The datapath is 32 bits wide. The modular multiplier is a radix-4 (two operand bits per
// step) Montgomery multiplier: a row of five 8-bit processing units that handles operands of
// 1 to MAX_GROUPS 32-bit groups, one group at a time, in 16 steps per group. Latency figures below are exact cycle counts of
// the RTL and are what the control unit's cycle ROM holds. The instruction encoding, the
// register conventions and the cycle counts are this design's own choices; the source only
// says that a master sends instructions, the bit length and the round count, and that a ROM
// holds the number of cycles each instruction needs for a given bit length.
package crypto_pkg;

  localparam int unsigned DW        = 32;  // data-path width
  localparam int unsigned NREGS     = 16;  // register-bank entries
  localparam int unsigned MAXWORDS  = 4;   // longest add/sub/xor/substitute operand, in words
  localparam int unsigned PROG_DEPTH = 16; // instruction buffer entries

  localparam int unsigned MAX_GROUPS = 4;  // longest modular operand, in 32-bit groups
  localparam int unsigned MM_UNITS   = 5;   // 8-bit processing units in the multiplier row

  // Register conventions for the modular instructions (multi-word values occupy consecutive
  // registers, least significant word first).
  localparam logic [3:0] REG_N  = 4'd8;    // modulus N: r8..r11
  localparam logic [3:0] REG_R2 = 4'd12;   // 2^(2n) mod N: r12..r15, n = 32 * words

  // Modular multiplier timing for an operand of g 32-bit groups. A radix-4 step is issued
  // group by group, both streams per group; two idle slots between groups let the carry out
  // of a group's top byte reach unit 0 (see mont_mult). Slots per step: 4g - 2.
  function automatic int unsigned mm_slots(int unsigned g);
    return 4 * g - 2;
  endfunction
  function automatic int unsigned mm_steps(int unsigned g);
    return 16 * g;
  endfunction
  // cycles from the start pulse to the done pulse of one multiplication
  function automatic int unsigned mm_latency(int unsigned g);
    return mm_steps(g) * mm_slots(g) + MM_UNITS + 2;
  endfunction
  // cycles from start to done of the exponentiation unit scanning nbits exponent bits:
  // one conversion into the Montgomery domain, nbits square/multiply steps, one conversion back
  function automatic int unsigned exp_latency(int unsigned g, int unsigned nbits);
    return (nbits + 2) * (mm_latency(g) + 2) + 1;
  endfunction

  // One radix-4 Montgomery step travelling along the multiplier's processing units.
  typedef struct packed {
    logic       valid;  // a step is present
    logic       s;      // stream (0 or 1)
    logic [1:0] g;      // 32-bit group of the operands this step works on
    logic       last;   // g is the most significant group
    logic [1:0] da;     // {a_i+1, a_i}: selects 0, B, 2B or 3B
    logic [1:0] dq;     // {q_i+1, q_i}: selects 0, N, 2N or 3N
  } mm_step_t;

  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_ADD    = 4'd1,   // rd..  = rs1.. + rs2..   (multi-word, carry chained)
    OP_SUB    = 4'd2,   // rd..  = rs1.. - rs2..   (multi-word, borrow chained)
    OP_XOR    = 4'd3,   // rd..  = rs1.. ^ rs2..
    OP_SUBST  = 4'd4,   // rd..  = XOR over bytes b of EPROM[tbl][b][byte b of rs1..]
    OP_MODMUL = 4'd5,   // rd    = rs1 * rs2 mod N
    OP_MODEXP = 4'd6,   // rd    = rs1 ^ rs2 mod N
    OP_IN     = 4'd7,   // rd..  <- input buffer
    OP_OUT    = 4'd8    // output buffer <- rs1..
  } op_e;

  typedef struct packed {
    op_e        op;
    logic [3:0] rd;
    logic [3:0] rs1;
    logic [3:0] rs2;
    logic [1:0] tbl;    // S/P table select for OP_SUBST
  } instr_t;

  // Source of the value written back over the shared bus.
  typedef enum logic [2:0] {
    BUS_ADD  = 3'd0,
    BUS_XOR  = 3'd1,
    BUS_SBOX = 3'd2,
    BUS_EXP  = 3'd3,
    BUS_IN   = 3'd4
  } bus_sel_e;

  // Control word issued by the control unit every cycle.
  typedef struct packed {
    logic [3:0] ra;        // register read port A address
    logic [3:0] rb;        // register read port B address
    logic       we;        // register write enable
    logic [3:0] wa;        // register write address
    bus_sel_e   bus_sel;   // bus source
    logic       sub;       // adder/subtractor: 1 = subtract
    logic       cin;       // adder carry in
    logic [1:0] tbl;       // EPROM table
    logic [1:0] byte_idx;  // EPROM byte lane
    logic       sb_first;  // first byte lookup of a word
    logic       exp_ld;    // load one word of each modular operand
    logic [1:0] exp_word;  // word index for loading operands / reading the result
    logic       exp_start; // start the exponentiation unit
    logic       exp_mul;   // 1: single modular multiplication, 0: exponentiation
    logic       in_pop;    // take a word from the input buffer
    logic       out_push;  // put a word into the output buffer
  } ctrl_t;

  // Cycles an instruction takes for a given operand length in words (the control ROM).
  function automatic int unsigned instr_cycles(op_e op, int unsigned nwords);
    case (op)
      OP_ADD, OP_SUB, OP_XOR, OP_IN, OP_OUT: return nwords;
      OP_SUBST:  return 4 * nwords;
      // load the operands word by word, run, write the result back word by word
      OP_MODMUL: return 2 * nwords + exp_latency(nwords, 1);
      OP_MODEXP: return 2 * nwords + exp_latency(nwords, DW * nwords);
      default:   return 1;
    endcase
  endfunction

endpackage
