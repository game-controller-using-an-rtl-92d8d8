// tb_uart_tx -- checks the free-running UART transmitter.
//
// The four W, A, S, D frames and the standby word are applied.  For each
// frame the line is compared bit by bit with the frame (bit 0 first, one
// bit per bit clock, high in the load slot), a receiver model must decode
// the ASCII byte, and successive start bits must be exactly 11 bit clocks
// apart (19200 baud, 1745 words per second).  With the standby word the
// line must stay high for whole frames.
`timescale 1ns/1ns
module tb_uart_tx;
  logic       bclk = 0, rst_n = 0;
  logic [9:0] frame = '1;
  logic       tx, load;
  logic       got;
  logic [7:0] data;
  int         words, frame_errors;
  time        start_time;
  int checks = 0, failures = 0;

  localparam time TBIT = 52084;     // 19200 Hz bit clock

  uart_tx dut (.bclk, .rst_n, .frame, .tx, .load);
  uart_monitor mon (.bclk, .tx, .got, .data, .words, .frame_errors, .start_time);

  always #(TBIT/2) bclk = ~bclk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #(TBIT * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] chars [4] = '{8'h77, 8'h61, 8'h73, 8'h64};
    logic [9:0] f;
    int last_start, n_load;
    repeat (3) @(posedge bclk);
    #1 check(tx == 1'b1, "line high in reset");
    rst_n = 1;

    // Standby: the line stays high through several whole frames.
    repeat (33) begin
      @(posedge bclk); #1;
      check(tx == 1'b1, "standby word keeps the line idle");
    end

    foreach (chars[k]) begin
      f = {1'b1, chars[k], 1'b0};
      frame = f;
      // Wait for the load cycle, then follow the frame bit by bit.
      for (int rep = 0; rep < 3; rep++) begin
        while (!load) begin @(posedge bclk); #1; end
        @(posedge bclk); #1;                      // buffer loaded
        check(tx == 1'b1, "line high in the slot after the load");
        for (int b = 0; b < 10; b++) begin
          @(posedge bclk); #1;
          check(tx == f[b], "serial bit matches the frame");
        end
        check(load, "next load while the stop bit is on the line");
      end
    end
    frame = '1;

    // Received bytes and frame period, from the receiver model.
    repeat (60) @(posedge bclk);
    check(words == 12, "twelve words received");
    check(frame_errors == 0, "no framing errors");

    // Load period: exactly every 11 bit clocks.
    n_load = 0; last_start = -1;
    for (int cyc = 0; cyc < 110; cyc++) begin
      @(posedge bclk); #1;
      if (load) begin
        if (last_start >= 0) check(cyc - last_start == 11, "one word every 11 bit clocks");
        last_start = cyc;
        n_load++;
      end
    end
    check(n_load == 10, "ten loads in 110 bit clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Every received byte is one of the sent characters, in order, each three
  // times; start bits of one character are 11 bit periods apart.
  int  rx_idx = 0;
  time prev_start = 0;
  always @(posedge got) begin
    automatic logic [7:0] want [4] = '{8'h77, 8'h61, 8'h73, 8'h64};
    check(data == want[rx_idx / 3], "received byte");
    if (rx_idx % 3 != 0)
      check(start_time - prev_start == 11 * TBIT, "start bits 11 bit periods apart");
    prev_start = start_time;
    rx_idx++;
  end
endmodule
