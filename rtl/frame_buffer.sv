// frame_buffer -- the temporary buffer between the keypad decoder and the
// UART transmitter, crossing from the 1 MHz scan clock to the bit clock.
//
// The decoded word is registered in the scan domain (src).  In the bit-clock
// domain each bit passes a two-flop synchroniser (s1, s2); the output q only
// takes the synchronised word when two successive samples of it agree, so a
// word caught while it was changing is never handed to the transmitter.  The
// source word changes at most once per key press or release, thousands of
// bit periods apart, so the filter costs only latency: q follows a change
// of src on the fourth bit-clock edge after it.  Everything resets to the
// all-ones standby word.
//
// The original design names a "temporary buffer" read by the UART but does
// not say how it is built; this crossing is this design's choice.
//
// Interface: clk, rst_n, d[W-1:0] (scan domain); bclk, brst_n, q[W-1:0]
// (bit-clock domain).
module frame_buffer #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         bclk,
  input  logic         brst_n,
  output logic [W-1:0] q
);

  logic [W-1:0] src;               // scan-domain register
  logic [W-1:0] s1, s2, s3;        // synchroniser and previous sample

  always_ff @(posedge clk) begin
    if (!rst_n) src <= '1;
    else        src <= d;
  end

  always_ff @(posedge bclk) begin
    if (!brst_n) begin
      s1 <= '1;
      s2 <= '1;
      s3 <= '1;
      q  <= '1;
    end else begin
      s1 <= src;
      s2 <= s1;
      s3 <= s2;
      if (s2 == s3) q <= s2;
    end
  end

endmodule
