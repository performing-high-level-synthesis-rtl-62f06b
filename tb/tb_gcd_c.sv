// tb_gcd_c: self-checking testbench of the GCD loop condition.
//
// The loop must go on while the operands differ or the done flag is clear; checked on
// fixed and random states.
module tb_gcd_c;
  import slf_pkg::*;

  gcd_state_t s_i;
  logic c_o;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  gcd_c dut (.s_i(s_i), .c_o(c_o));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input word_t p, input word_t q, input logic v);
    logic exp;
    s_i = '{x: '{p: p, q: q}, o: word_t'($urandom), v: v};
    exp = !((p == q) && v);
    #1;
    checks++;
    if (c_o !== exp) begin
      failures++;
      $display("FAIL p=%0d q=%0d v=%b: c=%b expected %b", p, q, v, c_o, exp);
    end
  endtask

  initial begin
    apply(3, 3, 1);
    apply(3, 3, 0);
    apply(3, 4, 1);
    apply(4, 3, 0);
    apply(0, 0, 1);
    for (int i = 0; i < 2000; i++) begin
      word_t p;
      p = word_t'($urandom);
      apply(p, ($urandom_range(0, 2) == 0) ? p : word_t'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
