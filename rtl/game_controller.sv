// game_controller -- keypad-to-serial game controller.
//
// A 4x4 switch-matrix keypad is scanned one column at a time at the 1 MHz
// system clock (kp_scanner); when a key closes, the scan stops on its column
// and the decoder (kp_decode) turns the (row, column) pair into a ready
// framed UART word for the character assigned to that key -- by default
// 'w', 'a', 's', 'd' for a game's movement keys -- or into the all-ones
// standby word.  The word passes through a temporary buffer (frame_buffer)
// into the bit-clock domain, where a free-running transmitter (uart_tx)
// sends it at 19200 baud, one word every 11 bit periods, for as long as
// the key is held.  A host program on the other end of the serial link
// turns each received character into a key press.
//
// The two clocks come from a PLL outside this module: clk = 1 MHz
// (50 MHz / 50) and bclk = 19200 Hz (50 MHz / 2604).  reset_n is the
// asynchronous active-low push button; it is synchronised into each domain.
// ct[0] lights while a key is down; ct[3:1] are tied low, as on the
// original board, where ct drives indicator enables.
//
// The block structure, clock rates, key table, frame format and pin-level
// interface follow the original design; the reset synchronisers and the
// clock-domain crossing inside the buffer are this design's own.
module game_controller
  import gc_pkg::*;
#(
  parameter keymap_t KEYMAP = KEYMAP_WASD
) (
  input  logic            clk,       // 1 MHz scan clock
  input  logic            bclk,      // 19200 Hz bit clock
  input  logic            reset_n,   // push button, active low
  input  logic [KP_N-1:0] kpr,       // keypad rows, active low, pulled up
  output logic [KP_N-1:0] kpc,       // keypad column select, active low
  output logic [3:0]      ct,        // key-hit indicator on ct[0]
  output logic            tx         // serial output
);

  logic   rst_n, brst_n;
  logic   kphit;
  frame_t frame, frame_b;

  reset_sync u_rst_clk  (.clk(clk),  .rst_n_in(reset_n), .rst_n_out(rst_n));
  reset_sync u_rst_bclk (.clk(bclk), .rst_n_in(reset_n), .rst_n_out(brst_n));

  kp_scanner #(.N(KP_N)) u_scan (
    .clk, .rst_n, .kpr, .kpc, .hold()
  );

  kp_decode #(.KEYMAP(KEYMAP)) u_dec (
    .kpc, .kpr, .kphit, .frame
  );

  frame_buffer #(.W(FRAME_W)) u_buf (
    .clk, .rst_n, .d(frame), .bclk, .brst_n, .q(frame_b)
  );

  uart_tx #(.W(FRAME_W)) u_tx (
    .bclk, .rst_n(brst_n), .frame(frame_b), .tx, .load()
  );

  assign ct = {3'b000, kphit};

endmodule
