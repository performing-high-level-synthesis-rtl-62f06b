// tb_slf_unroll: self-checking testbench of the unrolled GCD loop body.
//
// Instantiates the body with its default unrolling factor (1) and with 0 and 3, applies
// the same random states to all three and compares each with a model that applies the
// Euclid step once unconditionally and then n more times, each only while the loop
// condition still holds.
module tb_slf_unroll;
  import slf_pkg::*;

  gcd_state_t s_i, s_o1, s_o0, s_o3;
  int checks = 0, failures = 0;
  int n_bypass = 0;   // states where a guarded stage had to pass the state through
  logic clk = 1'b0;

  slf_unroll dut1 (.s_i(s_i), .s_o(s_o1));
  slf_unroll #(.N(0)) dut0 (.s_i(s_i), .s_o(s_o0));
  slf_unroll #(.N(3)) dut3 (.s_i(s_i), .s_o(s_o3));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gcd_state_t ref_step(gcd_state_t s);
    gcd_state_t r = s;
    if (s.x.p > s.x.q)      r.x.p = s.x.p - s.x.q;
    else if (s.x.q > s.x.p) r.x.q = s.x.q - s.x.p;
    else begin r.o = s.x.p; r.v = 1'b1; end
    return r;
  endfunction

  function automatic logic ref_cond(gcd_state_t s);
    return (s.x.p != s.x.q) || !s.v;
  endfunction

  function automatic gcd_state_t ref_unrolled(gcd_state_t s, int n, ref int bypass);
    gcd_state_t r = ref_step(s);
    for (int i = 0; i < n; i++) begin
      if (ref_cond(r)) r = ref_step(r);
      else bypass++;
    end
    return r;
  endfunction

  task automatic apply(input gcd_state_t s);
    gcd_state_t e0, e1, e3;
    int dummy = 0;
    s_i = s;
    e0 = ref_unrolled(s, 0, dummy);
    e1 = ref_unrolled(s, 1, n_bypass);
    e3 = ref_unrolled(s, 3, dummy);
    #1;
    checks += 3;
    if (s_o0 !== e0) begin failures++; $display("FAIL N=0 in=%p got %p exp %p", s, s_o0, e0); end
    if (s_o1 !== e1) begin failures++; $display("FAIL N=1 in=%p got %p exp %p", s, s_o1, e1); end
    if (s_o3 !== e3) begin failures++; $display("FAIL N=3 in=%p got %p exp %p", s, s_o3, e3); end
  endtask

  initial begin
    apply('{x: '{p: 12, q: 8}, o: 0, v: 0});   // 12,8 -> 4,8 -> 4,4
    apply('{x: '{p: 5, q: 10}, o: 0, v: 0});   // 5,10 -> 5,5 -> done
    apply('{x: '{p: 6, q: 6}, o: 0, v: 0});    // done in the first stage
    apply('{x: '{p: 6, q: 6}, o: 6, v: 1});    // already finished: stages pass through
    for (int i = 0; i < 3000; i++) begin
      gcd_state_t s;
      s.x.p = word_t'($urandom_range(0, 40));
      s.x.q = word_t'($urandom_range(0, 40));
      s.o   = word_t'($urandom);
      s.v   = ($urandom_range(0, 3) == 0);
      apply(s);
    end
    checks++;
    if (n_bypass == 0) begin failures++; $display("FAIL no guarded stage was bypassed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
