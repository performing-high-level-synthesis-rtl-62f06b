// slf_unroll: loop body of the example program after n-fold loop unrolling.
//
// The loop-unrolling transformation rewrites
//   WHILE c (PARTIALIZE a)
// into
//   WHILE c ((PARTIALIZE a) THEN FOR_N n (PARTIALIZE (λs. MUX (c s, a s, s))))
// and FOR_N n A expands to n copies of A in sequence. As a single basic block this is a
// chain of combinational stages: the first applies a unconditionally (the loop condition
// was already checked by the surrounding loop), each of the next n stages checks c again
// and applies a only if it still holds, otherwise passes the state through. One clock of
// IMP1 then does up to n+1 loop iterations, so a loop of k iterations needs
// ceil(k / (n+1)) clocks, at the price of n+1 copies of a and n copies of c.
//
// N is the n of the transformation; N = 0 leaves the plain body a. The stages use the
// example program's a and c (gcd_a, gcd_c), as a module cannot take another module as a
// parameter. Purely combinational.
module slf_unroll
  import slf_pkg::*;
#(
  parameter int unsigned N = 1
) (
  input  gcd_state_t s_i,
  output gcd_state_t s_o
);

  gcd_state_t st [N+1];

  gcd_a u_a0 (.s_i(s_i), .s_o(st[0]));

  for (genvar i = 0; i < N; i++) begin : g_stage
    gcd_state_t a_res;
    logic       c_res;
    gcd_c u_c (.s_i(st[i]), .c_o(c_res));
    gcd_a u_a (.s_i(st[i]), .s_o(a_res));
    assign st[i+1] = c_res ? a_res : st[i];
  end

  assign s_o = st[N];

endmodule
