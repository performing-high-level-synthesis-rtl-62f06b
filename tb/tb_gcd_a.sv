// tb_gcd_a: self-checking testbench of the GCD loop body.
//
// Applies fixed and random states and compares the next state with the Euclid step
// computed here: subtract the smaller operand from the larger while they differ,
// otherwise copy p to the output part and set the done flag.
module tb_gcd_a;
  import slf_pkg::*;

  gcd_state_t s_i, s_o, exp;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  gcd_a dut (.s_i(s_i), .s_o(s_o));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input word_t p, input word_t q, input word_t o, input logic v);
    int unsigned ip = 32'(p), iq = 32'(q);
    s_i = '{x: '{p: p, q: q}, o: o, v: v};
    exp = s_i;
    if (ip > iq)      exp.x.p = word_t'(ip - iq);
    else if (iq > ip) exp.x.q = word_t'(iq - ip);
    else begin exp.o = p; exp.v = 1'b1; end
    #1;
    checks++;
    if (s_o !== exp) begin
      failures++;
      $display("FAIL p=%0d q=%0d o=%0d v=%b: got %p expected %p", p, q, o, v, s_o, exp);
    end
  endtask

  initial begin
    apply(12, 8, 0, 0);
    apply(8, 12, 3, 0);
    apply(7, 7, 0, 0);
    apply(7, 7, 9, 1);
    apply(0, 0, 5, 0);
    apply(0, 5, 0, 0);
    apply(16'hFFFF, 1, 0, 0);
    for (int i = 0; i < 3000; i++) begin
      word_t p, q;
      p = word_t'($urandom);
      q = ($urandom_range(0, 9) == 0) ? p : word_t'($urandom);
      apply(p, q, word_t'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
