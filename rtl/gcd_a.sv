// gcd_a: loop body a of the example SLF program, Euclid's GCD by repeated subtraction.
//
// The program, before its conversion to a single loop, is
//   while (p != q) { if (p > q) p = p - q; else q = q - p; }   result = p;
// Turning the trailing "result = p" into part of the one remaining loop takes a flag in
// the local variable v, the same device the SPT rewrite rules use when they merge control
// structures (a boolean local that records which phase the loop is in). So a is:
//   p != q : subtract the smaller operand from the larger, o and v unchanged
//   p == q : o = p, v = true (done), x unchanged
// Purely combinational: one basic block, no clock. With p == 0 and q != 0 (or the
// reverse) the subtraction makes no progress, so the program does not terminate; the
// interface then never signals ready, which is the defined behaviour of IFC1 for an
// undefined result. The example program is this design's own choice.
module gcd_a
  import slf_pkg::*;
(
  input  gcd_state_t s_i,
  output gcd_state_t s_o
);

  always_comb begin
    s_o = s_i;
    if (s_i.x.p != s_i.x.q) begin
      if (s_i.x.p > s_i.x.q) s_o.x.p = s_i.x.p - s_i.x.q;
      else                   s_o.x.q = s_i.x.q - s_i.x.p;
    end else begin
      s_o.o = s_i.x.p;
      s_o.v = 1'b1;
    end
  end

endmodule
