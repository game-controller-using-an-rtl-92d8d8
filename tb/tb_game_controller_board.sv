// tb_game_controller_board -- full-size end-to-end test of the board-level
// design: 50 MHz oscillator, PLL model, controller core, default key table.
//
// The keypad model closes switches; the host side is a UART receiver that
// knows nothing of the design's clocks: it waits for a falling edge on TX,
// samples in the middle of each bit at 19200 baud and checks the stop bit.
// The test presses W, A, S, D, an unassigned key and finally reset with a
// key held.  Checked: the scan steps one column per 50 oscillator cycles
// (1 MHz), each held key gives only its character, the first copy within
// 20 bit periods of the press, copies exactly 11 PLL bit periods apart
// (11 x 2604 oscillator cycles), silence after release and for the
// unassigned key, ct[0] while a key is down.  Each mechanism (scan
// wrap-around, suspend, the four characters, standby with a key down,
// reset) must have happened at least once.
`timescale 1ns/1ps
module tb_game_controller_board;
  logic        CLOCK_50 = 0, reset_n = 1;
  logic [3:0]  kpr, kpc, ct;
  logic        TX;
  logic [15:0] pressed = '0;
  int checks = 0, failures = 0;

  localparam realtime TOSC  = 20.0;                 // 50 MHz
  localparam realtime TBIT  = 1.0e9 / 19200.0;      // host's bit period, ns
  localparam realtime TWORD = 11 * 2604 * TOSC;     // PLL bit clock x 11

  game_controller_board dut (.CLOCK_50, .reset_n, .kpr, .kpc, .ct, .TX);
  keypad_model kp (.kpc, .pressed, .kpr);

  always #(TOSC/2) CLOCK_50 = ~CLOCK_50;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Host receiver.
  logic [7:0] rx_data [$];
  realtime    rx_time [$];
  int         frame_errors = 0;
  initial begin
    logic [7:0] b;
    realtime    t0;
    forever begin
      @(negedge TX);
      t0 = $realtime;
      #(1.5 * TBIT);
      for (int i = 0; i < 8; i++) begin
        b[i] = TX;
        #(TBIT);
      end
      if (TX) begin
        rx_data.push_back(b);
        rx_time.push_back(t0);
      end else begin
        frame_errors++;
      end
      #(0.4 * TBIT);
    end
  end

  // Scan activity on the column outputs, counted in oscillator cycles.
  int n_wrap = 0, n_suspend = 0, n_step = 0, n_standby_key = 0, n_reset = 0;
  int n_char [4] = '{0, 0, 0, 0};
  localparam logic [7:0] CH [4] = '{8'h77, 8'h61, 8'h73, 8'h64};
  logic [3:0] prev_kpc = '0;
  longint     osc = 0, last_step = -1;
  logic       prev_still = 0;
  logic       free_run = 0;   // no key and no reset since the last step
  always @(posedge CLOCK_50) begin
    osc++;
    if (pressed != '0 || !reset_n) free_run = 0;
    if (kpc != prev_kpc) begin
      if (free_run) begin
        checks++;
        if (osc - last_step != 50) begin
          failures++;
          $display("FAIL scan step every 50 oscillator cycles (%0d)", osc - last_step);
        end
        n_step++;
      end
      if (prev_kpc == 4'b1110 && kpc == 4'b0111) n_wrap++;
      last_step = osc;
      free_run = (pressed == '0 && reset_n);
      prev_still = 0;
    end else if (reset_n && pressed != '0 && osc - last_step == 60 && !prev_still) begin
      n_suspend++;
      prev_still = 1;
    end
    prev_kpc = kpc;
  end

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int key_pos [4] = '{3*4+2, 2*4+3, 2*4+2, 2*4+1};   // w a s d
    realtime tp, tr;
    int      fi, n;

    #5 reset_n = 0;
    #(5 * TBIT) reset_n = 1;
    #(30 * TBIT);
    check(rx_data.size() == 0, "idle line with no key");

    for (int k = 0; k < 4; k++) begin
      #($urandom_range(0, 50000) * 1.0);
      fi = rx_data.size();
      tp = $realtime;
      pressed = 16'(1) << key_pos[k];
      #(60 * TBIT);
      check(ct[0], "ct[0] lit while a key is down");
      pressed = '0;
      tr = $realtime;
      #(25 * TBIT);
      check(!ct[0], "ct[0] dark after release");
      n = rx_data.size() - fi;
      check(n >= 4 && n <= 7, "about five words per held key");
      for (int i = fi; i < rx_data.size(); i++) begin
        check(rx_data[i] == CH[k], "received the key's character");
        if (rx_data[i] == CH[k]) n_char[k]++;
        if (i > fi) check(rx_time[i] - rx_time[i-1] == TWORD, "words 11 PLL bit periods apart");
      end
      if (n > 0) begin
        check(rx_time[fi] - tp <= 20 * TBIT, "first word within 20 bit periods");
        check(rx_time[rx_data.size()-1] < tr + 20 * TBIT, "sending stops after release");
      end
    end

    // Unassigned key "9" (row 1, column 1): standby.
    n = rx_data.size();
    pressed = 16'(1) << (1*4+1);
    #(40 * TBIT);
    check(ct[0], "ct[0] lit for an unassigned key");
    pressed = '0;
    #(20 * TBIT);
    check(rx_data.size() == n, "unassigned key sends nothing");
    if (rx_data.size() == n) n_standby_key++;

    // Reset with 'a' held.
    pressed = 16'(1) << key_pos[1];
    #(30 * TBIT);
    reset_n = 0;
    n_reset++;
    #(3 * TBIT);
    check(TX == 1'b1 && kpc == 4'b0111, "reset: line idle, scan on the left column");
    pressed = '0;
    reset_n = 1;
    n = rx_data.size();
    #(30 * TBIT);
    check(rx_data.size() == n, "nothing sent after reset");

    check(frame_errors == 0, "no framing errors at the host");
    check(n_step > 0,        "mechanism: 1 MHz scan steps");
    check(n_wrap > 0,        "mechanism: scan wrap-around");
    check(n_suspend > 0,     "mechanism: scan suspend");
    check(n_standby_key > 0, "mechanism: standby with a key down");
    check(n_reset > 0,       "mechanism: reset");
    for (int k = 0; k < 4; k++) check(n_char[k] > 0, "mechanism: character sent");
    $display("mechanisms: steps=%0d wraps=%0d suspends=%0d w=%0d a=%0d s=%0d d=%0d standby_with_key=%0d resets=%0d",
             n_step, n_wrap, n_suspend, n_char[0], n_char[1], n_char[2], n_char[3], n_standby_key, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
