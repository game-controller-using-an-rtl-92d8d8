// uart_monitor -- behavioural UART receiver for the testbenches.
//
// The line is sampled on the falling edge of the bit clock, in the middle
// of each bit, since the transmitter changes it just after the rising edge.
// A low sample while idle is a start bit; the next eight samples are the
// data, LSB first, and the ninth must be high (stop bit).  Each received
// word pulses 'got' for one half bit period with the byte in 'data';
// framing errors are counted.  'start_time' is the time of the start bit's
// sample.
module uart_monitor (
  input  logic       bclk,
  input  logic       tx,
  output logic       got,
  output logic [7:0] data,
  output int         words,
  output int         frame_errors,
  output time        start_time
);

  int         bitn = -1;     // -1 idle, 0..7 data, 8 stop
  logic [7:0] sh   = '0;

  initial begin
    got = 0; data = '0; words = 0; frame_errors = 0; start_time = 0;
  end

  always @(negedge bclk) begin
    got <= 1'b0;
    if (bitn < 0) begin
      if (!tx) begin
        bitn       <= 0;
        start_time <= $time;
      end
    end else if (bitn < 8) begin
      sh   <= {tx, sh[7:1]};
      bitn <= bitn + 1;
    end else begin
      if (tx) begin
        data  <= sh;
        got   <= 1'b1;
        words <= words + 1;
      end else begin
        frame_errors <= frame_errors + 1;
      end
      bitn <= -1;
    end
  end

endmodule
