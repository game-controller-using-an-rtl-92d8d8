// uart_tx -- free-running UART transmitter clocked by the bit clock.
//
// A counter runs 0..W.  The clock edge that ends the count-W cycle loads
// the output buffer from the frame input and drives the line high for one
// bit period; the edges that end cycles 0..W-1 then drive bit [count] of the
// buffer onto tx, bit 0 first.  So every W+1 bit periods one word goes out:
// with W = 10 and a 19200 Hz bit clock that is one high bit, then start bit,
// eight data bits and stop bit, 1745 words per second.  There is no
// handshake: the transmitter sends whatever the buffer holds, over and over.
// The standby word (all ones) has no start bit, so while no key is pressed
// the line simply stays high.
//
// The count-and-load scheme, the W+1 bit period, LSB-first order and
// continuous sending follow the original design; driving the line high in
// the load slot and the reset are this design's choices.
//
// Interface: bclk, rst_n (synchronous, active low), frame[W-1:0]; tx
// (registered, changes just after a bclk rising edge), load (high in the
// cycle whose closing edge loads the buffer).
module uart_tx #(
  parameter int unsigned W = 10
) (
  input  logic         bclk,
  input  logic         rst_n,
  input  logic [W-1:0] frame,
  output logic         tx,
  output logic         load
);

  localparam int unsigned CW = $clog2(W + 1);
  localparam logic [CW-1:0] LAST = CW'(W);

  logic [CW-1:0] count;
  logic [W-1:0]  obuf;           // output buffer

  assign load = (count == LAST);

  always_ff @(posedge bclk) begin
    if (!rst_n) begin
      count <= LAST;
      obuf  <= '1;
      tx    <= 1'b1;
    end else if (load) begin
      count <= '0;
      obuf  <= frame;
      tx    <= 1'b1;
    end else begin
      tx    <= obuf[count];
      count <= count + 1'b1;
    end
  end

  a_count_range : assert property (@(posedge bclk) disable iff (!rst_n)
                                   count <= LAST);

endmodule
