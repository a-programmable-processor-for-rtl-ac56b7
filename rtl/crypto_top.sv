// crypto_top: programmable cryptography processor.
//
// A 32-bit bus connects the register bank, the adder/subtractor, the XOR unit, the
// substitution/permutation EPROM, the exponentiation unit (which contains the Montgomery
// modular multiplier) and the I/O buffer; the control unit steers them, one instruction at
// a time, through a program the master loads. Each cycle the control word selects two
// register operands (ports A and B), the unit whose output drives the bus, and the register
// written from it. Substitution looks up the four bytes of operand A in the selected table
// and XORs the four entries in an accumulator. The modular instructions work on operands of
// `words` 32-bit words in consecutive registers; they read the modulus from r8.. and
// 2^(2n) mod N (n = 32 * words) from r12.. .
//
// Ports: master program interface (prog_*, start, prog_len, rounds, nwords, busy, done),
// EPROM programming port (ep_*), and valid/ready input and output word streams. A program
// runs to completion (done pulse) and its results leave through the output stream.
// The set of units and their connection to one bus follow the source; the bus protocol,
// instruction set and register conventions are this design's choices (see control_unit).
module crypto_top
  import crypto_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // master: program and run
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_instr,
  input  logic                          start,
  input  logic [$clog2(PROG_DEPTH):0]   prog_len,
  input  logic [7:0]                    rounds,
  input  logic [2:0]                    nwords,
  output logic                          busy,
  output logic                          done,
  // master: EPROM programming
  input  logic                          ep_we,
  input  logic [11:0]                   ep_addr,
  input  logic [DW-1:0]                 ep_data,
  // data streams
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [DW-1:0]                 in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [DW-1:0]                 out_data
);
  ctrl_t         ctrl;
  logic          stall;
  logic [3:0]    raddr [4];
  logic [DW-1:0] rdata [4];
  logic [DW-1:0] opa, opb, reg_n, reg_r2;
  logic [DW-1:0] add_y, xor_y, ep_y, exp_y, in_word, bus;
  logic [DW-1:0] sb_acc, sb_y;
  logic          add_cout, in_empty, out_full, exp_busy, exp_done;
  logic [DW-1:0] one_w;
  logic [2:0]    words;

  control_unit u_ctrl (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_instr, .start, .prog_len, .rounds, .nwords,
    .busy, .done, .words,
    .add_cout, .in_empty, .out_full,
    .ctrl, .stall
  );

  assign raddr[0] = ctrl.ra;
  assign raddr[1] = ctrl.rb;
  assign raddr[2] = REG_N + 4'(ctrl.exp_word);
  assign raddr[3] = REG_R2 + 4'(ctrl.exp_word);
  assign opa      = rdata[0];
  assign opb      = rdata[1];
  assign reg_n    = rdata[2];
  assign reg_r2   = rdata[3];

  reg_bank #(.NREGS(NREGS), .DW(DW), .NREAD(4)) u_regs (
    .clk, .rst_n, .raddr, .rdata,
    .we(ctrl.we), .waddr(ctrl.wa), .wdata(bus)
  );

  addsub32 u_add (.a(opa), .b(opb), .sub(ctrl.sub), .cin(ctrl.cin), .sum(add_y), .cout(add_cout));

  xor_array #(.W(DW)) u_xor (.a(opa), .b(opb), .y(xor_y));

  sp_eprom #(.TABLES(4), .DW(DW)) u_eprom (
    .clk,
    .prog_we(ep_we), .prog_addr(ep_addr), .prog_data(ep_data),
    .tbl (ctrl.tbl),
    .lane(ctrl.byte_idx),
    .idx (opa[8*ctrl.byte_idx +: 8]),
    .data(ep_y)
  );

  // substitution accumulator: XOR of the four byte-lane lookups of one word
  assign sb_y = (ctrl.sb_first ? '0 : sb_acc) ^ ep_y;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sb_acc <= '0;
    else if (ctrl.bus_sel == BUS_SBOX && busy) sb_acc <= sb_y;
  end

  // MODEXP rd, rs1, rs2: rd = rs1^rs2 mod N (P0 = 1, all 32*words exponent bits);
  // MODMUL rd, rs1, rs2: rd = rs1*rs2 mod N (M = rs2, P0 = rs1, E = 1, one exponent bit)
  assign one_w = (ctrl.exp_word == 2'd0) ? DW'(1) : '0;

  exp_unit #(.MAXG(MAX_GROUPS)) u_exp (
    .clk, .rst_n,
    .ld     (ctrl.exp_ld),
    .ld_word(ctrl.exp_word),
    .m_w    (ctrl.exp_mul ? opb : opa),
    .p_w    (ctrl.exp_mul ? opa : one_w),
    .e_w    (ctrl.exp_mul ? one_w : opb),
    .n_w    (reg_n),
    .r2_w   (reg_r2),
    .start  (ctrl.exp_start),
    .ng     (words),
    .nbits  (ctrl.exp_mul ? 8'd1 : 8'(DW) * 8'(words)),
    .busy   (exp_busy),
    .done   (exp_done),
    .rd_word(ctrl.exp_word),
    .result (exp_y)
  );

  io_buffer #(.DW(DW), .DEPTH(8)) u_io (
    .clk, .rst_n,
    .ext_in_valid (in_valid),
    .ext_in_ready (in_ready),
    .ext_in_data  (in_data),
    .in_pop       (ctrl.in_pop),
    .in_data      (in_word),
    .in_empty     (in_empty),
    .out_push     (ctrl.out_push),
    .out_data     (opa),
    .out_full     (out_full),
    .ext_out_valid(out_valid),
    .ext_out_ready(out_ready),
    .ext_out_data (out_data)
  );

  // the shared bus
  always_comb begin
    case (ctrl.bus_sel)
      BUS_ADD:  bus = add_y;
      BUS_XOR:  bus = xor_y;
      BUS_SBOX: bus = sb_y;
      BUS_EXP:  bus = exp_y;
      default:  bus = in_word;
    endcase
  end

  // A modular instruction writes its first result word in the cycle the exponentiation unit
  // signals done (the control ROM's cycle count and the unit's latency agree).
  a_exp_timing: assert property (@(posedge clk) disable iff (!rst_n)
                                 (ctrl.we && ctrl.bus_sel == BUS_EXP && ctrl.exp_word == 2'd0)
                                 |-> exp_done)
    else $error("crypto_top: modular result written before the unit finished");
endmodule
