// imp1_ctrl: interface control of the IMP1 single-loop circuit.
//
// IMP1 runs one iteration of "WHILE c (PARTIALIZE a)" per clock and talks to its
// environment by the IFC1 protocol: a start is accepted only when the circuit is free,
// that is in the cycle after it was ready or while reset is high; while free and not
// started it stays ready and holds its output; otherwise it is ready exactly when the
// loop condition c is false on the current state.
//
// The gates are those of the circuit's control part:
//   free  = reset | D_T          (OR gate)
//   load  = start & free         (AND gate, steers the input multiplexers to the
//                                 initial state: input, o_init, v_init)
//   hold  = ~start & free        (AND gate with inverted start, steers the output
//                                 multiplexer to the held output)
//   ready = hold | ~c            (OR gate with inverted c)
//   D_T  <= ready                (register, starts at true)
// All outputs are combinational in the current inputs and D_T; c must come from the
// state selected under the current load, so it is combinational in start too.
//
// rst_ni is an asynchronous, active-low power-on reset that gives D_T its initial value
// true, which stands for the "t = 0" case of the protocol. This power-on reset is this
// design's own addition; the protocol's "reset" input is the one of the method and is
// sampled like any other input.
module imp1_ctrl (
  input  logic clk,
  input  logic rst_ni,   // power-on reset, sets D_T to true
  input  logic start,    // request to start the program on the current input
  input  logic reset,    // protocol reset: abort and become free
  input  logic c,        // loop condition on the current state
  output logic load,     // select the initial state this cycle
  output logic hold,     // free and not started: hold the output
  output logic ready     // result valid / circuit free
);

  logic dt_q;
  logic free;

  always_comb begin
    free  = reset | dt_q;
    load  = start & free;
    hold  = ~start & free;
    ready = hold | ~c;
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) dt_q <= 1'b1;
    else         dt_q <= ready;
  end

endmodule
