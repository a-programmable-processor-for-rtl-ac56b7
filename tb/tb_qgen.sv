// tb_qgen: exhaustive check of the q-generation unit. For every combination of the two low
// bits of R, B and N (N odd) and of a_i, a_i+1 it checks that the q bits make
// R + (2a_i+1 + a_i)B + (2q_i+1 + q_i)N divisible by 4, and that q_i alone makes
// R + a_i B + q_i N even; the residues are taken modulo 4, which is all that matters.
module tb_qgen;
  logic [1:0] r, b, n;
  logic       a_lo, a_hi, q_lo, q_hi;
  int         checks = 0, failures = 0;

  qgen dut (.*);

  initial begin
    for (int ri = 0; ri < 4; ri++)
      for (int bi = 0; bi < 4; bi++)
        for (int ni = 1; ni < 4; ni += 2)
          for (int al = 0; al < 2; al++)
            for (int ah = 0; ah < 2; ah++) begin
              r = 2'(ri); b = 2'(bi); n = 2'(ni); a_lo = 1'(al); a_hi = 1'(ah);
              #1;
              checks += 2;
              if (((ri + al * bi + int'(q_lo) * ni) % 2) != 0) begin
                failures++;
                $display("FAIL q_i r=%0d b=%0d n=%0d a=%0d%0d", ri, bi, ni, ah, al);
              end
              if (((ri + (2 * ah + al) * bi + (2 * int'(q_hi) + int'(q_lo)) * ni) % 4) != 0) begin
                failures++;
                $display("FAIL q_i+1 r=%0d b=%0d n=%0d a=%0d%0d", ri, bi, ni, ah, al);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
