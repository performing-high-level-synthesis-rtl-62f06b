// tb_imp1_ctrl: self-checking testbench of the IMP1 interface control.
//
// Drives start, reset and the loop condition c with random values (and a few fixed
// sequences) and compares load, hold and ready in every cycle with a model written from
// the protocol rules: the circuit is free after power-on, after a ready cycle or while
// reset is high; a start is accepted only when free; free without start means ready;
// otherwise ready is the negated loop condition.
module tb_imp1_ctrl;

  logic clk = 1'b0;
  logic rst_ni = 1'b1;
  logic start = 1'b0, reset = 1'b0, c = 1'b0;
  logic load, hold, ready;
  int   checks = 0, failures = 0;
  logic prev_ready;   // model of the ready of the previous cycle
  int   n_load = 0, n_hold = 0, n_busy = 0;

  imp1_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check_cycle();
    logic free, e_load, e_hold, e_ready;
    free    = reset || prev_ready;
    e_load  = start && free;
    e_hold  = !start && free;
    e_ready = e_hold || !c;
    checks++;
    if ({load, hold, ready} !== {e_load, e_hold, e_ready}) begin
      failures++;
      $display("FAIL start=%b reset=%b c=%b prev_ready=%b: load=%b hold=%b ready=%b, expected %b %b %b",
               start, reset, c, prev_ready, load, hold, ready, e_load, e_hold, e_ready);
    end
    if (e_load) n_load++;
    if (e_hold) n_hold++;
    if (!free) n_busy++;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev_ready = 1'b1;                // power-on: D_T starts true
    #1 rst_ni = 1'b0; #1 rst_ni = 1'b1;
    // fixed sequence: start a run, keep c true for 3 cycles, start while busy is ignored
    @(negedge clk); start = 1; c = 1; #1 check_cycle(); @(posedge clk); prev_ready = ready;
    @(negedge clk); start = 1; c = 1; #1 check_cycle();
    if (load !== 1'b0) begin failures++; $display("FAIL start accepted while busy"); end
    checks++;
    @(posedge clk); prev_ready = ready;
    @(negedge clk); start = 0; c = 0; #1 check_cycle(); @(posedge clk); prev_ready = ready;
    @(negedge clk); start = 0; c = 1; #1 check_cycle();
    if (!(ready && hold)) begin failures++; $display("FAIL not holding after ready"); end
    checks++;
    @(posedge clk); prev_ready = ready;
    // random stimulus
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      start = ($urandom_range(0, 3) == 0);
      reset = ($urandom_range(0, 15) == 0);
      c     = ($urandom_range(0, 4) != 0);
      #1 check_cycle();
      @(posedge clk);
      prev_ready = ready;
    end
    // power-on reset in the middle of a run gives ready again
    @(negedge clk); start = 1; reset = 1; c = 1; #1 check_cycle(); @(posedge clk); prev_ready = ready;
    @(negedge clk); start = 0; reset = 0; c = 1; #1 check_cycle();
    rst_ni = 1'b0; #1 prev_ready = 1'b1; rst_ni = 1'b1; #1 check_cycle();
    if (n_load == 0 || n_hold == 0 || n_busy == 0) begin
      failures++;
      $display("FAIL coverage load=%0d hold=%0d busy=%0d", n_load, n_hold, n_busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
