// hls_imp1_top: the IMP1 circuit running the example SLF program with an unrolled body.
//
// The example program computes the greatest common divisor of two operands by repeated
// subtraction (see gcd_a). In single-loop form it is
//   PROGRAM 0 (LOCVAR false (WHILE c (PARTIALIZE a')))
// with c from gcd_c and a' the body after UNROLL_N-fold loop unrolling (slf_unroll).
// imp1 supplies the registers, multiplexers and the IFC1 start/reset/ready protocol.
//
// Interface (IFC1): put the operands on data_in and raise start for one cycle while the
// circuit is ready (or together with reset). ready drops while the loop runs and rises in
// the cycle the result is on data_out; result and ready then stay until the next start.
// A start while busy is ignored. reset aborts a run and makes the circuit ready in the
// same cycle; it is the only way out of a run that never ends (one operand zero, the
// other not).
//
// Timing: with s subtraction steps the program runs k = s + 1 loop iterations (the last
// one copies the result) and ready comes ceil(k / (UNROLL_N + 1)) cycles after the start.
// rst_ni is the asynchronous power-on reset. The wiring of imp1 follows the IMP1
// circuit; the program, the operand width (slf_pkg::GCD_W) and the default unrolling
// factor 1 are this design's own choices.
module hls_imp1_top
  import slf_pkg::*;
#(
  parameter int unsigned UNROLL_N = 1
) (
  input  logic   clk,
  input  logic   rst_ni,
  input  gcd_x_t data_in,
  input  logic   start,
  input  logic   reset,
  output gcd_o_t data_out,
  output logic   ready
);

  gcd_state_t st, a_res;
  logic       c_res;

  imp1 #(
    .XW(GCD_XW),
    .OW(GCD_OW),
    .VW(GCD_VW)
  ) u_imp1 (
    .clk     (clk),
    .rst_ni  (rst_ni),
    .data_in (data_in),
    .reset   (reset),
    .start   (start),
    .data_out(data_out),
    .ready   (ready),
    .o_init  (GCD_O_INIT),
    .v_init  (GCD_V_INIT),
    .st_x_o  (st.x),
    .st_o_o  (st.o),
    .st_v_o  (st.v),
    .c_i     (c_res),
    .a_x_i   (a_res.x),
    .a_o_i   (a_res.o),
    .a_v_i   (a_res.v)
  );

  gcd_c u_c (.s_i(st), .c_o(c_res));

  slf_unroll #(.N(UNROLL_N)) u_body (.s_i(st), .s_o(a_res));

endmodule
