// tb_game_controller -- end-to-end test of the keypad game controller at its
// real clock rates (1 MHz scan clock, 19200 Hz bit clock) and default key
// table.
//
// A keypad model closes switches and a UART receiver model decodes the
// serial line.  The test presses W, A, S and D one after another, each for
// about six words, and checks that only that character arrives, that the
// first copy arrives within 20 bit periods of the press, that copies are
// 11 bit periods apart and that the line goes quiet after release.  It then
// holds an unassigned key and two keys on one column (both must give
// standby: no characters, but ct[0] lit and the scan suspended), and
// finally presses reset while a key is held.  It counts how often each
// mechanism happened -- scan wrap-around, scan suspend, each character
// sent, standby with a key down, reset -- and any that never
// happened counts as a failure.
`timescale 1ns/1ns
module tb_game_controller;
  logic        clk = 0, bclk = 0, reset_n = 1;
  logic [3:0]  kpr, kpc, ct;
  logic        tx;
  logic [15:0] pressed = '0;

  logic       got;
  logic [7:0] data;
  int         words, frame_errors;
  time        start_time;

  int checks = 0, failures = 0;

  localparam time TCLK = 1000;      // 1 MHz
  localparam time TBIT = 52084;     // 19200 Hz (edges never meet clk edges)

  game_controller dut (.clk, .bclk, .reset_n, .kpr, .kpc, .ct, .tx);
  keypad_model    kp  (.kpc, .pressed, .kpr);
  uart_monitor    mon (.bclk, .tx, .got, .data, .words, .frame_errors, .start_time);

  always #(TCLK/2) clk  = ~clk;
  always #(TBIT/2) bclk = ~bclk;

  // Mechanism counters.
  int n_wrap = 0, n_suspend = 0, n_standby_key = 0, n_reset = 0;
  int n_char [4] = '{0, 0, 0, 0};
  localparam logic [7:0] CH [4] = '{8'h77, 8'h61, 8'h73, 8'h64};

  // Scan activity, seen on the column outputs: a suspend is a clock on
  // which kpc does not move, a wrap-around a step from 1110 to 0111.
  logic [3:0] prev_kpc = 4'b0000;
  logic       prev_still = 1'b0;
  always @(posedge clk) begin
    #1;
    if (reset_n && kpc == prev_kpc && !prev_still) n_suspend++;
    if (reset_n && prev_kpc == 4'b1110 && kpc == 4'b0111) n_wrap++;
    prev_still = reset_n && (kpc == prev_kpc);
    prev_kpc   = kpc;
  end

  // Received words.
  logic [7:0] rx_data [$];
  time        rx_time [$];
  always @(posedge got) begin
    rx_data.push_back(data);
    rx_time.push_back(start_time);
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Press a key pattern for 'bits' bit periods, then release and wait
  // 'gap' bit periods.  Returns the words received from press to end.
  task automatic press_for(input logic [15:0] keys, input int bits, input int gap,
                           output time t_press, output time t_release, output int first_idx);
    #($urandom_range(0, 52084));
    first_idx = rx_data.size();
    t_press = $time;
    pressed = keys;
    #(bits * TBIT);
    check(ct[0] == 1'b1, "ct[0] lit while a key is down");
    check(kpr != 4'hF, "scan suspended on the key's column");
    pressed = '0;
    t_release = $time;
    #(gap * TBIT);
    check(ct[0] == 1'b0, "ct[0] dark after release");
  endtask

  initial begin
    #(TBIT * 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time tp, tr;
    int  fi, n;
    static int key_pos [4] = '{3*4+2, 2*4+3, 2*4+2, 2*4+1};   // w a s d

    #(TCLK/4) reset_n = 0;        // falling edge starts the asynchronous reset
    #(5 * TBIT);
    reset_n = 1;
    #(40 * TBIT);
    check(words == 0, "idle line while no key is pressed");
    check(n_wrap > 0, "scan wraps round with no key");

    // W, A, S, D.
    for (int k = 0; k < 4; k++) begin
      press_for(16'(1) << key_pos[k], 66, 25, tp, tr, fi);
      n = rx_data.size() - fi;
      check(n >= 4 && n <= 7, "about six words per held key");
      for (int i = fi; i < rx_data.size(); i++) begin
        check(rx_data[i] == CH[k], "received the key's character");
        check(rx_time[i] > tp && rx_time[i] < tr + 20 * TBIT, "word belongs to this press");
        if (rx_data[i] == CH[k]) n_char[k]++;
        if (i > fi)
          check(rx_time[i] - rx_time[i-1] == 11 * TBIT, "words 11 bit periods apart");
      end
      if (n > 0) begin
        check(rx_time[fi] - tp <= 20 * TBIT, "first word within 20 bit periods of the press");
        check(rx_time[rx_data.size()-1] + 12 * TBIT >= tr, "sending goes on until release");
      end
    end

    // Unassigned key "1" (top row, left column): standby, nothing sent.
    n = rx_data.size();
    press_for(16'(1) << (3*4+3), 44, 20, tp, tr, fi);
    check(rx_data.size() == n, "unassigned key sends nothing");
    if (rx_data.size() == n) n_standby_key++;
    // Two keys on one column ('w' and 's'): two rows low, standby.
    press_for((16'(1) << (3*4+2)) | (16'(1) << (2*4+2)), 44, 20, tp, tr, fi);
    check(rx_data.size() == n, "two keys on one column send nothing");
    if (rx_data.size() == n) n_standby_key++;

    // Reset while 'd' is held: the line goes idle and scanning restarts.
    pressed = 16'(1) << (2*4+1);
    #(40 * TBIT);
    reset_n = 0;
    n_reset++;
    #(3 * TBIT);
    check(tx == 1'b1, "line idle in reset");
    check(kpc == 4'b0111, "scan back on the left column in reset");
    pressed = '0;
    reset_n = 1;
    n = rx_data.size();
    #(40 * TBIT);
    check(rx_data.size() == n, "nothing sent after reset with no key");

    check(frame_errors == 0, "no framing errors");
    check(n_wrap > 0,        "mechanism: scan wrap-around");
    check(n_suspend > 0,     "mechanism: scan suspend");
    check(n_standby_key > 0, "mechanism: standby with a key down");
    check(n_reset > 0,       "mechanism: reset");
    for (int k = 0; k < 4; k++) check(n_char[k] > 0, "mechanism: character sent");
    $display("mechanisms: wraps=%0d suspends=%0d w=%0d a=%0d s=%0d d=%0d standby_with_key=%0d resets=%0d",
             n_wrap, n_suspend, n_char[0], n_char[1], n_char[2], n_char[3], n_standby_key, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
