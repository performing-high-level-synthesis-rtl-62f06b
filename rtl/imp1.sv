// imp1: generic register-transfer implementation IMP1 of a single-loop-form program
//
//   PROGRAM o_init (LOCVAR v_init (WHILE c (PARTIALIZE a)))
//
// with the IFC1 start/reset/ready interface. The state is the triple (x, o, v): x is the
// data part loaded from data_in, o the output part, v the local variable. The loop body a
// and the condition c are combinational blocks outside this module: the module drives the
// current state on st_x/st_o/st_v, and takes back c(state) on c_i and a(state) on
// a_x_i/a_o_i/a_v_i. Any a and c may be plugged in; the circuit costs and speed are set by
// them alone.
//
// How it works. Three input multiplexers pick the current state: the initial state
// (data_in, o_init, v_init) in a cycle where a start is accepted, otherwise the registers
// D_q3 (x), D_q2 (o) and D_q1 (v). c and a are evaluated on that state. While c is true
// the registers take a(state), so one loop iteration is done per clock. The output is
// o of a(state) while c is true and o of the state once c is false; when the circuit is
// free and not started the output multiplexer instead passes the held o. D_q2 always
// stores the visible output, so a result stays on data_out until the next start. D_q1 and
// D_q3 load a's x and v parts every cycle; their content only matters while running.
//
// Timing: a start accepted in cycle t with the loop needing k iterations gives ready and
// the result in cycle t + k (in cycle t itself when c is false on the initial state).
// While running, start is ignored; reset high makes the circuit free in that cycle, so a
// start in the same cycle is accepted. A program that does not terminate never raises
// ready until reset.
//
// The multiplexers, registers, gate structure and which register feeds which
// multiplexer follow the circuit IMP1; the control gates are in imp1_ctrl. The register
// initial values Q1/Q2/Q3 (the subscripts of the registers) are parameters, loaded by
// the power-on reset rst_ni, which is this design's own addition. The bus widths are
// parameters as the method leaves the types free.
module imp1 #(
  parameter int unsigned      XW = 32,
  parameter int unsigned      OW = 16,
  parameter int unsigned      VW = 1,
  parameter logic [VW-1:0]    Q1 = '0,   // initial value of D_q1 (v register)
  parameter logic [OW-1:0]    Q2 = '0,   // initial value of D_q2 (o register)
  parameter logic [XW-1:0]    Q3 = '0    // initial value of D_q3 (x register)
) (
  input  logic          clk,
  input  logic          rst_ni,
  // IFC1 interface
  input  logic [XW-1:0] data_in,
  input  logic          reset,
  input  logic          start,
  output logic [OW-1:0] data_out,
  output logic          ready,
  // program constants
  input  logic [OW-1:0] o_init,
  input  logic [VW-1:0] v_init,
  // connection to the DFG-terms a and c
  output logic [XW-1:0] st_x_o,
  output logic [OW-1:0] st_o_o,
  output logic [VW-1:0] st_v_o,
  input  logic          c_i,
  input  logic [XW-1:0] a_x_i,
  input  logic [OW-1:0] a_o_i,
  input  logic [VW-1:0] a_v_i
);

  logic          load, hold;
  logic [XW-1:0] q3_x;
  logic [OW-1:0] q2_o;
  logic [VW-1:0] q1_v;
  logic [OW-1:0] step_o;

  imp1_ctrl u_ctrl (
    .clk   (clk),
    .rst_ni(rst_ni),
    .start (start),
    .reset (reset),
    .c     (c_i),
    .load  (load),
    .hold  (hold),
    .ready (ready)
  );

  always_comb begin
    // input multiplexers
    st_x_o   = load ? data_in : q3_x;
    st_o_o   = load ? o_init  : q2_o;
    st_v_o   = load ? v_init  : q1_v;
    // output multiplexers
    step_o   = c_i  ? a_o_i   : st_o_o;
    data_out = hold ? st_o_o  : step_o;
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      q1_v <= Q1;
      q2_o <= Q2;
      q3_x <= Q3;
    end else begin
      q1_v <= a_v_i;
      q2_o <= data_out;
      q3_x <= a_x_i;
    end
  end

  // IFC1: after reset (or power-on) without start the circuit is ready.
  a_reset_ready: assert property (@(posedge clk) disable iff (!rst_ni)
    (reset && !start) |-> ready);
  // IFC1: ready and no start in the next cycle keeps ready and the output.
  a_ready_hold: assert property (@(posedge clk) disable iff (!rst_ni)
    ready |=> (start || (ready && data_out == $past(data_out))));

endmodule
