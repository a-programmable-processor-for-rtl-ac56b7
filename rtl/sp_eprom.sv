// sp_eprom: programmable table memory for substitution (S-box) and permutation (P-box).
//
// Organised as TABLES tables of four byte lanes, each lane a 256 x 32-bit lookup indexed by
// one input byte. An S-box or P-box of an algorithm is stored by the host; a full 32-bit
// substitution or permutation is the XOR of the four lane lookups (for a permutation each
// lane's entry holds that byte's bits already moved to their output positions, so the XOR is
// an OR). The programming port (prog_we/prog_addr/prog_data) models the EPROM being written
// before use; reads are combinational.
// The source only says that an EPROM holds the S- and P-boxes of the algorithms; the table
// organisation, the byte-lane split, the size and the asynchronous read are this design's
// choices.
module sp_eprom #(
  parameter int unsigned TABLES = 4,
  parameter int unsigned DW     = 32
) (
  input  logic                              clk,
  // programming port
  input  logic                              prog_we,
  input  logic [$clog2(TABLES)+10-1:0]      prog_addr,   // {table, lane, byte value}
  input  logic [DW-1:0]                     prog_data,
  // lookup port
  input  logic [$clog2(TABLES)-1:0]         tbl,
  input  logic [1:0]                        lane,
  input  logic [7:0]                        idx,
  output logic [DW-1:0]                     data
);
  localparam int unsigned DEPTH = TABLES * 4 * 256;

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign data = mem[{tbl, lane, idx}];
endmodule
