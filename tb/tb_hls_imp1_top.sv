// tb_hls_imp1_top: end-to-end testbench of the IMP1 GCD circuit at its default size.
//
// Runs the circuit as an environment following the start/reset/ready protocol would:
// operand pairs are started, the result is compared with a GCD computed here, and the
// number of cycles from start to ready with ceil(k / (n+1)), k being the number of loop
// iterations of the program (subtraction steps plus the final copy) and n the unrolling
// factor. Each mechanism of the circuit is counted and must occur at least once:
//   runs completed, idle cycles with the result held, starts ignored while busy,
//   non-terminating runs aborted by reset, reset and start in the same cycle,
//   starts in the cycle right after ready, and runs whose last clock used only part of the
//   unrolled body (a guarded stage passed its state through).
module tb_hls_imp1_top;
  import slf_pkg::*;

  localparam int UNROLL = 1;   // the top's default unrolling factor

  logic   clk = 1'b0, rst_ni = 1'b1;
  gcd_x_t data_in = '0;
  logic   start = 1'b0, reset = 1'b0;
  gcd_o_t data_out;
  logic   ready;
  int     checks = 0, failures = 0;
  int     n_runs = 0, n_hold = 0, n_busy_start = 0, n_abort = 0, n_reset_start = 0;
  int     n_back_to_back = 0, n_partial_body = 0;

  hls_imp1_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: GCD and number of loop iterations of the program.
  function automatic void ref_gcd(input int unsigned p, input int unsigned q,
                                  output int unsigned g, output int unsigned iters);
    iters = 1;
    while (p != q) begin
      if (p > q) p -= q; else q -= p;
      iters++;
    end
    g = p;
  endfunction

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Start a terminating run on (p, q); optionally raise reset with the start and pulse
  // start once more while busy.
  task automatic run(input word_t p, input word_t q, input logic with_reset,
                     input logic poke_busy);
    int unsigned g, k, m;
    ref_gcd(32'(p), 32'(q), g, k);
    m = (k + UNROLL) / (UNROLL + 1);
    if ((k % (UNROLL + 1)) != 0) n_partial_body++;
    @(negedge clk);
    if (ready) n_back_to_back++;
    data_in = '{p: p, q: q}; start = 1'b1; reset = with_reset;
    if (with_reset) n_reset_start++;
    #1 expect_true(!ready, "ready in the start cycle");
    for (int j = 1; j <= m; j++) begin
      @(negedge clk);
      reset = 1'b0;
      start = poke_busy && (j == 1) && (m > 1);
      if (start) n_busy_start++;
      data_in = '{p: word_t'($urandom), q: word_t'($urandom)};
      #1;
      if (j < m) expect_true(!ready, $sformatf("gcd(%0d,%0d) ready early at cycle %0d of %0d",
                                               p, q, j, m));
      else expect_true(ready && data_out == word_t'(g),
                       $sformatf("gcd(%0d,%0d): ready=%b out=%0d, expected %0d after %0d cycles",
                                 p, q, ready, data_out, g, m));
    end
    n_runs++;
    @(negedge clk);
    start = 1'b0;
  endtask

  task automatic idle(input int cycles);
    gcd_o_t held;
    #1 held = data_out;
    for (int j = 0; j < cycles; j++) begin
      @(negedge clk);
      data_in = '{p: word_t'($urandom), q: word_t'($urandom)};
      #1 expect_true(ready && data_out == held, "result not held while idle");
      n_hold++;
    end
  endtask

  task automatic run_forever_then_reset(input word_t q, input int cycles);
    @(negedge clk);
    data_in = '{p: '0, q: q}; start = 1'b1;
    for (int j = 0; j < cycles; j++) begin
      @(negedge clk); start = 1'b0;
      #1 expect_true(!ready, "non-terminating run became ready");
    end
    @(negedge clk); reset = 1'b1;
    #1 expect_true(ready, "reset did not end the run");
    n_abort++;
    @(negedge clk); reset = 1'b0;
  endtask

  initial begin
    #1 rst_ni = 1'b0; #1 rst_ni = 1'b1;
    #1 expect_true(ready, "not ready after power-on");
    run(12, 8, 1'b0, 1'b0);       // 12,8 -> 4,8 -> 4,4 -> copy: k = 3
    idle(3);
    run(5, 5, 1'b0, 1'b0);        // k = 1
    run(48, 36, 1'b0, 1'b1);
    run(1000, 7, 1'b0, 1'b0);
    run(0, 0, 1'b0, 1'b0);
    run_forever_then_reset(17, 30);
    run(21, 14, 1'b0, 1'b0);
    // a start together with reset in the middle of a non-terminating run
    @(negedge clk); data_in = '{p: 9, q: 0}; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (4) @(negedge clk);
    run(100, 75, 1'b1, 1'b0);
    for (int i = 0; i < 150; i++) begin
      word_t p, q, f;
      f = word_t'($urandom_range(1, 40));
      p = word_t'($urandom_range(1, 600)) * f;
      q = word_t'($urandom_range(1, 600)) * f;
      if (p == 0) p = 1;
      if (q == 0) q = 1;
      run(p, q, 1'($urandom_range(0, 7) == 0), 1'($urandom_range(0, 3) == 0));
      if ($urandom_range(0, 2) == 0) idle($urandom_range(1, 3));
    end
    run(16'hFFFF, 1, 1'b0, 1'b0);   // longest run of the 16-bit program
    $display("runs=%0d hold=%0d busy_start=%0d abort=%0d reset_start=%0d back_to_back=%0d partial_body=%0d",
             n_runs, n_hold, n_busy_start, n_abort, n_reset_start, n_back_to_back, n_partial_body);
    if (n_runs == 0 || n_hold == 0 || n_busy_start == 0 || n_abort == 0 ||
        n_reset_start == 0 || n_back_to_back == 0 || n_partial_body == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
