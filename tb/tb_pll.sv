// tb_pll -- checks the behavioural PLL model against its configuration.
//
// With a 50 MHz input: locked is low from power-up and rises after
// LOCK_CYCLES input cycles; c0 has a period of exactly 50 input cycles
// (1 MHz) and c1 of 2604 (19201.2 Hz), both high for half the period;
// areset drops lock and stops the outputs, and lock returns afterwards.
`timescale 1ns/1ps
module tb_pll;
  logic inclk0 = 0, areset = 0;
  logic c0, c1, locked;
  int checks = 0, failures = 0;
  longint ncyc = 0;

  pll dut (.areset, .inclk0, .c0, .c1, .locked);

  always #10 inclk0 = ~inclk0;                 // 50 MHz
  always @(posedge inclk0) ncyc++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measure period and high time of a clock, in input cycles, over n periods.
  task automatic measure(input int which, input int n, output longint per, output longint hi);
    longint r0, f0;
    per = 0; hi = 0;
    for (int i = 0; i < n; i++) begin
      if (which == 0) @(posedge c0); else @(posedge c1);
      r0 = ncyc;
      if (which == 0) @(negedge c0); else @(negedge c1);
      f0 = ncyc;
      if (which == 0) @(posedge c0); else @(posedge c1);
      per = ncyc - r0;
      hi  = f0 - r0;
      check(per == ((which == 0) ? 50 : 2604), "clock period in input cycles");
      check(hi  == ((which == 0) ? 25 : 1302), "50 % duty cycle");
    end
  endtask

  initial begin
    longint per, hi, t_lock;
    #1 check(locked == 1'b0, "unlocked at power-up");
    @(posedge locked);
    t_lock = ncyc;
    check(t_lock == 1001, "lock after LOCK_CYCLES input cycles");
    measure(0, 20, per, hi);
    measure(1, 4, per, hi);
    @(negedge inclk0);
    areset = 1;
    #1 check(!locked && !c0 && !c1, "areset drops lock and clocks");
    #200 areset = 0;
    @(posedge locked);
    check(1'b1, "lock regained after areset");
    measure(0, 5, per, hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
