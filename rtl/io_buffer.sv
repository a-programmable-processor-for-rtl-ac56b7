// io_buffer: input and output buffering between the outside world and the internal bus.
//
// Two DEPTH-word FIFOs. The input side accepts words with a valid/ready handshake
// (ext_in_valid & ext_in_ready transfers ext_in_data) and offers its head word to the bus as
// in_data/in_empty, removed by in_pop. The output side takes words from the bus with
// out_push (out_full must be low) and presents them with a valid/ready handshake on
// ext_out_*. A word pushed in one cycle is visible on the other side in the next cycle.
// The source shows an I/O buffer between the external port and the bus but does not
// describe it; the two-FIFO structure, the depth and the handshakes are this design's
// choices.
module io_buffer #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // external input stream
  input  logic          ext_in_valid,
  output logic          ext_in_ready,
  input  logic [DW-1:0] ext_in_data,
  // bus side
  input  logic          in_pop,
  output logic [DW-1:0] in_data,
  output logic          in_empty,
  input  logic          out_push,
  input  logic [DW-1:0] out_data,
  output logic          out_full,
  // external output stream
  output logic          ext_out_valid,
  input  logic          ext_out_ready,
  output logic [DW-1:0] ext_out_data
);
  logic in_full, out_empty;

  sync_fifo #(.DW(DW), .DEPTH(DEPTH)) u_in (
    .clk, .rst_n,
    .push (ext_in_valid && !in_full),
    .wdata(ext_in_data),
    .pop  (in_pop),
    .rdata(in_data),
    .empty(in_empty),
    .full (in_full)
  );

  sync_fifo #(.DW(DW), .DEPTH(DEPTH)) u_out (
    .clk, .rst_n,
    .push (out_push),
    .wdata(out_data),
    .pop  (ext_out_ready && !out_empty),
    .rdata(ext_out_data),
    .empty(out_empty),
    .full (out_full)
  );

  assign ext_in_ready  = !in_full;
  assign ext_out_valid = !out_empty;
endmodule
