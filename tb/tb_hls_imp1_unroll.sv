// tb_hls_imp1_unroll: effect of loop unrolling on the IMP1 GCD circuit.
//
// Three copies of the circuit, built with unrolling factors n = 0 (plain loop body), 1
// and 3, run the same operand pairs side by side. Each must give the GCD computed here,
// and each must need exactly ceil(k / (n+1)) cycles from start to ready, k being the
// number of loop iterations of the program, so the copies with more unrolled stages
// finish in fewer clocks. Per factor the total number of cycles is printed.
module tb_hls_imp1_unroll;
  import slf_pkg::*;

  localparam int NCFG = 3;
  localparam int UN [NCFG] = '{0, 1, 3};

  logic   clk = 1'b0, rst_ni = 1'b1;
  gcd_x_t data_in = '0;
  logic   start = 1'b0;
  gcd_o_t data_out [NCFG];
  logic   ready [NCFG];
  int     checks = 0, failures = 0;
  int     total [NCFG] = '{0, 0, 0};

  for (genvar i = 0; i < NCFG; i++) begin : g_dut
    hls_imp1_top #(.UNROLL_N(UN[i])) dut (
      .clk, .rst_ni, .data_in, .start, .reset(1'b0),
      .data_out(data_out[i]), .ready(ready[i])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input word_t p, input word_t q);
    int unsigned a = 32'(p), b = 32'(q), k = 1, g;
    int unsigned m [NCFG];
    int unsigned done_at [NCFG];
    while (a != b) begin
      if (a > b) a -= b; else b -= a;
      k++;
    end
    g = a;
    for (int i = 0; i < NCFG; i++) begin
      m[i] = (k + UN[i]) / (UN[i] + 1);
      done_at[i] = 0;
    end
    @(negedge clk);
    data_in = '{p: p, q: q}; start = 1'b1;
    for (int j = 1; j <= m[0]; j++) begin
      @(negedge clk);
      start = 1'b0;
      #1;
      for (int i = 0; i < NCFG; i++)
        if (ready[i] && done_at[i] == 0) done_at[i] = j;
    end
    for (int i = 0; i < NCFG; i++) begin
      checks++;
      if (done_at[i] != m[i] || data_out[i] != word_t'(g)) begin
        failures++;
        $display("FAIL n=%0d gcd(%0d,%0d): ready after %0d cycles with %0d, expected %0d after %0d",
                 UN[i], p, q, done_at[i], data_out[i], g, m[i]);
      end
      total[i] += m[i];
    end
    @(negedge clk);
  endtask

  initial begin
    #1 rst_ni = 1'b0; #1 rst_ni = 1'b1;
    run(12, 8);
    run(7, 7);
    run(1000, 3);
    for (int i = 0; i < 100; i++)
      run(word_t'($urandom_range(1, 3000)), word_t'($urandom_range(1, 3000)));
    for (int i = 0; i < NCFG; i++)
      $display("unrolling n=%0d: %0d cycles in total", UN[i], total[i]);
    checks++;
    if (!(total[0] > total[1] && total[1] > total[2])) begin
      failures++;
      $display("FAIL unrolling did not reduce the cycle count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
