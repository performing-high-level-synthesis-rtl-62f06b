// gcd_c: loop condition c of the example SLF program (Euclid's GCD, see gcd_a).
//
// The loop goes on while the operands still differ or the result has not yet been
// copied to the output part: c = (p != q) | ~v. Purely combinational. The example
// program and its flag encoding are this design's own choice.
module gcd_c
  import slf_pkg::*;
(
  input  gcd_state_t s_i,
  output logic       c_o
);

  always_comb c_o = (s_i.x.p != s_i.x.q) || !s_i.v;

endmodule
