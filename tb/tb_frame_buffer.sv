// tb_frame_buffer -- checks the temporary buffer's clock-domain crossing.
//
// The write clock runs at 100 MHz and the bit clock at about 19 MHz with
// edges that never coincide, the same kind of unrelated pair as 1 MHz and
// 19200 Hz.  After reset q must be all ones.  For a series of words: the
// word is applied, and after the write-side register takes it, q must keep
// the old word through the first three bit-clock edges and show the new one
// after the fourth (two synchroniser stages plus the two-sample agreement).
`timescale 1ns/1ns
module tb_frame_buffer;
  logic       clk = 0, bclk = 0, rst_n = 0, brst_n = 0;
  logic [9:0] d = '1, q;
  int checks = 0, failures = 0;

  frame_buffer dut (.clk, .rst_n, .d, .bclk, .brst_n, .q);

  always #5  clk  = ~clk;     // rising edges at 5, 15, 25, ...
  always #26 bclk = ~bclk;    // rising edges at 26, 78, 130, ...

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t q=%h d=%h)", what, $time, q, d);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] old_w, new_w;
    repeat (3) @(posedge bclk);
    #1;
    check(q == 10'h3FF, "reset value is the standby word");
    rst_n = 1; brst_n = 1;
    repeat (6) @(posedge bclk);
    old_w = 10'h3FF;
    for (int i = 0; i < 40; i++) begin
      new_w = (i % 5 == 4) ? 10'h3FF : 10'($urandom);
      if (new_w == old_w) new_w = ~old_w;
      @(negedge clk);
      d = new_w;
      @(posedge clk); #1;                 // write-side register takes it
      for (int e = 1; e <= 4; e++) begin
        @(posedge bclk); #1;
        if (e < 4) check(q == old_w, "q holds the old word before the 4th bit-clock edge");
        else       check(q == new_w, "q shows the new word after the 4th bit-clock edge");
      end
      repeat ($urandom_range(0, 3)) @(posedge bclk);
      old_w = new_w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
