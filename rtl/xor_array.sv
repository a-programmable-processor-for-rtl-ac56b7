// xor_array: the processor's XOR unit, a row of 32 two-input XOR gates.
//
// y = a ^ b, combinational. The source names an XOR unit of the data-path width; the
// width parameter's default is that 32-bit width.
module xor_array #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign y[i] = a[i] ^ b[i];
  end
endmodule
