// addsub32: 32-bit adder/subtractor made of four 8-bit Brent-Kung adders.
//
// The four bk_adder8 blocks are chained carry-out to carry-in. For subtraction operand b is
// inverted and the caller supplies carry-in 1 for the lowest word (two's complement); for
// operands longer than 32 bits the caller feeds the previous word's carry-out back as cin, so
// cout is the carry (add) or not-borrow (subtract) of this word. Combinational.
// The 4 x 8-bit construction follows the source; the inversion-based subtract and the
// carry ports are this design's choice.
module addsub32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  input  logic        cin,
  output logic [31:0] sum,
  output logic        cout
);
  logic [31:0] bx;
  logic [4:0]  c;

  assign bx   = sub ? ~b : b;
  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_slice
    bk_adder8 u_add (
      .a   (a[8*i +: 8]),
      .b   (bx[8*i +: 8]),
      .cin (c[i]),
      .sum (sum[8*i +: 8]),
      .cout(c[i+1])
    );
  end

  assign cout = c[4];
endmodule
