// qgen: quotient-bit generation for one radix-4 Montgomery step.
//
// For the running result R (two low bits r), multiplicand B (two low bits b), modulus N (two
// low bits n) and the operand bits a_lo = a_i, a_hi = a_i+1 it returns q_lo = q_i and
// q_hi = q_i+1 such that R + (2a_hi+a_lo)B + (2q_hi+q_lo)N is divisible by 4:
//   q_i    = r[0] xor (a_i and b[0])
//   s      = r + (a_i ? b : 0) + (q_i ? n : 0)           (two-bit sums)
//   q_i+1  = s[1] xor (a_i+1 and b[0])
// s[1] is the low bit of R_i+1 = (R_i + a_i B + q_i N)/2. Combinational.
// The structure (two multiplexers, two 2-bit adders, two XORs) follows the source; N must be
// odd.
module qgen (
  input  logic [1:0] r,
  input  logic [1:0] b,
  input  logic [1:0] n,
  input  logic       a_lo,
  input  logic       a_hi,
  output logic       q_lo,
  output logic       q_hi
);
  logic [1:0] ab, qn, s1, s2;

  always_comb begin
    ab   = a_lo ? b : 2'b00;           // MUX selecting B[1:0] or 00
    q_lo = r[0] ^ ab[0];
    qn   = q_lo ? n : 2'b00;           // MUX selecting N[1:0] or 00
    s1   = ab + qn;                    // first 2-bit adder
    s2   = r + s1;                     // second 2-bit adder
    q_hi = s2[1] ^ (a_hi & b[0]);
  end
endmodule
