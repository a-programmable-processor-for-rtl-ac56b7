// bk_adder8: 8-bit Brent-Kung parallel-prefix adder.
//
// Generate/propagate pairs are combined in a Brent-Kung tree: an up-sweep forms the group
// terms for bits 1:0, 3:0 and 7:0 (and the pairs 3:2, 5:4, 7:6, 7:4), a down-sweep fills in
// the remaining prefixes 2:0, 4:0, 5:0 and 6:0. The carry-in is folded into bit 0's generate
// term, so every carry c[i+1] is the group generate of bits i:0. Purely combinational.
// The tree structure follows the source; the carry-in/carry-out ports that let four of these
// form a 32-bit adder (and chain words for longer operands) are this design's choice.
module bk_adder8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] sum,
  output logic       cout
);
  logic [7:0] g, p;     // bit generate / propagate
  logic [7:0] gg;       // prefix generate of bits i:0
  logic [8:0] c;

  // combine (high group) o (low group)
  function automatic logic [1:0] dot(logic gh, logic ph, logic gl, logic pl);
    return {gh | (ph & gl), ph & pl};
  endfunction

  logic [1:0] g10, g32, g54, g76, g30, g74, g70, g20, g40, g50, g60;

  always_comb begin
    p = a ^ b;
    g = a & b;
    // carry-in enters as the generate term below bit 0
    g[0] = g[0] | (p[0] & cin);
    // up-sweep
    g10 = dot(g[1], p[1], g[0], p[0]);
    g32 = dot(g[3], p[3], g[2], p[2]);
    g54 = dot(g[5], p[5], g[4], p[4]);
    g76 = dot(g[7], p[7], g[6], p[6]);
    g30 = dot(g32[1], g32[0], g10[1], g10[0]);
    g74 = dot(g76[1], g76[0], g54[1], g54[0]);
    g70 = dot(g74[1], g74[0], g30[1], g30[0]);
    // down-sweep
    g50 = dot(g54[1], g54[0], g30[1], g30[0]);
    g20 = dot(g[2], p[2], g10[1], g10[0]);
    g40 = dot(g[4], p[4], g30[1], g30[0]);
    g60 = dot(g[6], p[6], g50[1], g50[0]);
    gg = {g70[1], g60[1], g50[1], g40[1], g30[1], g20[1], g10[1], g[0]};
    c = {gg, cin};
    sum  = (a ^ b) ^ c[7:0];
    cout = c[8];
  end
endmodule
