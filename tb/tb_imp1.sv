// tb_imp1: self-checking testbench of the generic IMP1 circuit.
//
// The testbench supplies its own loop body and condition, independent of the example
// program of the design: the state is x = n (a down-counter), o = an accumulator, v = an
// iteration counter, with
//   c = (n != 0),   a = (n == 255 ? n : n - 1, o + n, v + 1).
// Started on n with o_init = 5 the program returns 5 + n(n+1)/2 (mod 256) after exactly
// n iterations, so ready must come n cycles after the start (in the start cycle for
// n = 0); for n = 255 it never terminates and only reset ends the run.
// Checked: result and latency of each run, ready held with a stable output while idle,
// a start while busy being ignored, reset aborting a run, reset together with start, a
// start in the cycle right after ready, and ready after power-on.
module tb_imp1;

  localparam int W = 8;
  localparam logic [W-1:0] O_INIT = 8'd5;
  localparam logic [W-1:0] V_INIT = 8'd0;

  logic clk = 1'b0, rst_ni = 1'b1;
  logic [W-1:0] data_in = '0;
  logic start = 1'b0, reset = 1'b0;
  logic [W-1:0] data_out;
  logic ready;
  logic [W-1:0] st_x, st_o, st_v, a_x, a_o, a_v;
  logic c;
  int checks = 0, failures = 0;

  imp1 #(.XW(W), .OW(W), .VW(W)) dut (
    .clk, .rst_ni, .data_in, .reset, .start, .data_out, .ready,
    .o_init(O_INIT), .v_init(V_INIT),
    .st_x_o(st_x), .st_o_o(st_o), .st_v_o(st_v),
    .c_i(c), .a_x_i(a_x), .a_o_i(a_o), .a_v_i(a_v)
  );

  // loop body and condition of the test program
  always_comb begin
    c   = (st_x != '0);
    a_x = (st_x == 8'hFF) ? st_x : st_x - 8'd1;
    a_o = st_o + st_x;
    a_v = st_v + 8'd1;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] expected(int n);
    return W'(int'(O_INIT) + n * (n + 1) / 2);
  endfunction

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Start a run on n (optionally together with reset) and check ready/result timing.
  task automatic run(input int n, input logic with_reset);
    @(negedge clk);
    data_in = W'(n); start = 1'b1; reset = with_reset;
    #1;
    if (n == 0) begin
      expect_true(ready && data_out == expected(0), "zero-iteration run not ready in start cycle");
    end else begin
      expect_true(!ready, "ready in start cycle of a run");
    end
    for (int j = 1; j <= n; j++) begin
      @(negedge clk);
      start = 1'b0; reset = 1'b0; data_in = W'($urandom);
      #1;
      if (j < n) expect_true(!ready, $sformatf("ready early, n=%0d cycle %0d", n, j));
      else expect_true(ready && data_out == expected(n),
                       $sformatf("n=%0d: ready=%b out=%0d expected %0d at cycle %0d",
                                 n, ready, data_out, expected(n), j));
    end
    @(negedge clk);
    start = 1'b0; reset = 1'b0;
  endtask

  // Keep start low for some cycles: ready and output must stay.
  task automatic idle(input int cycles);
    logic [W-1:0] held;
    #1 held = data_out;
    for (int j = 0; j < cycles; j++) begin
      @(negedge clk);
      data_in = W'($urandom);
      #1 expect_true(ready && data_out == held, "output or ready not held while idle");
    end
  endtask

  initial begin
    #1 rst_ni = 1'b0; #1 rst_ni = 1'b1;
    #1 expect_true(ready, "not ready after power-on");
    run(3, 1'b0);
    idle(4);
    run(0, 1'b0);
    idle(2);
    // back-to-back: start in the cycle right after ready
    run(6, 1'b0);
    run(1, 1'b0);
    // start while busy is ignored
    @(negedge clk); data_in = 8'd10; start = 1'b1; #1 expect_true(!ready, "busy run ready");
    for (int j = 1; j <= 10; j++) begin
      @(negedge clk);
      start = (j == 3); data_in = 8'd2;
      #1;
      if (j < 10) expect_true(!ready, "start while busy disturbed the run");
      else expect_true(ready && data_out == expected(10), "start while busy changed the result");
    end
    @(negedge clk); start = 1'b0;
    // a run that never terminates, aborted by reset
    @(negedge clk); data_in = 8'hFF; start = 1'b1;
    for (int j = 0; j < 40; j++) begin
      @(negedge clk); start = (j == 10);
      #1 expect_true(!ready, "non-terminating run became ready");
    end
    @(negedge clk); reset = 1'b1; start = 1'b0;
    #1 expect_true(ready, "reset did not make the circuit ready");
    @(negedge clk); reset = 1'b0;
    #1 expect_true(ready, "not ready in the cycle after reset");
    // reset together with start while busy: the start is accepted
    @(negedge clk); data_in = 8'hFF; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (5) @(negedge clk);
    run(4, 1'b1);
    // random runs
    for (int i = 0; i < 40; i++) begin
      run($urandom_range(0, 30), 1'($urandom_range(0, 3) == 0));
      if ($urandom_range(0, 1) == 1) idle($urandom_range(1, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
