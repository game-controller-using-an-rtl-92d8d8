// tb_kp_scanner -- checks the column scan and its suspend rule.
//
// With no key down the column select must step 0111, 1011, 1101, 1110,
// 0111 ... one column per clock, always one-cold.  Each of the 16 keys is
// then pressed in turn: within four clocks the scan must stop on the key's
// column, stay there while the key is held (hold high), and step to the
// next column on the first clock after release.
`timescale 1ns/1ns
module tb_kp_scanner;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  kpc, kpr;
  logic [15:0] pressed = '0;
  logic        hold;
  int checks = 0, failures = 0;

  kp_scanner dut (.clk, .rst_n, .kpr, .kpc, .hold);
  keypad_model kp (.kpc, .pressed, .kpr);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t kpc=%b kpr=%b)", what, $time, kpc, kpr);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_kpc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(kpc == 4'b0111, "reset selects the left column");
    exp_kpc = 4'b0111;
    for (int i = 0; i < 12; i++) begin
      @(posedge clk); #1;
      case (exp_kpc)
        4'b0111: exp_kpc = 4'b1011;
        4'b1011: exp_kpc = 4'b1101;
        4'b1101: exp_kpc = 4'b1110;
        default: exp_kpc = 4'b0111;
      endcase
      check(kpc == exp_kpc, "scan sequence");
      check(!hold, "no hold without a key");
    end

    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        int waited;
        logic [3:0] held;
        @(negedge clk);
        pressed = 16'(1) << (r*4 + c);
        waited = 0;
        while (kpc[c] != 1'b0 && waited < 8) begin
          @(posedge clk); #1;
          waited++;
        end
        check(waited <= 3, "scan reaches the key's column within 4 clocks");
        check(kpr == ~(4'(1) << r), "row of the pressed key reads low");
        check(hold, "hold while the key's row is low");
        held = kpc;
        repeat (20) begin
          @(posedge clk); #1;
          check(kpc == held, "column held while key is down");
        end
        @(negedge clk);
        pressed = '0;
        @(posedge clk); #1;
        check(kpc == {held[0], held[3:1]}, "scan resumes on release");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
