// reg_bank: the processor's register bank, NREGS words of DW bits.
//
// NREAD combinational read ports and one write port written on the rising clock edge. All
// registers clear on reset. In the processor, ports 0 and 1 read the two source operands and
// ports 2 and 3 read words of the modulus N (r8..) and 2^2n mod N (r12..) for the modular unit.
// The source names a register bank among its synthesized units but gives neither its size
// nor its ports; 16 words, four read ports and one write port are this design's choices.
module reg_bank #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned DW    = 32,
  parameter int unsigned NREAD = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] raddr [NREAD],
  output logic [DW-1:0]            rdata [NREAD],
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [DW-1:0]            wdata
);
  logic [DW-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  for (genvar p = 0; p < NREAD; p++) begin : g_rd
    assign rdata[p] = regs[raddr[p]];
  end
endmodule
