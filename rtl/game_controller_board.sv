// game_controller_board -- the keypad game controller as built on the
// DE0-Nano board: the PLL plus the controller core.
//
// The 50 MHz board oscillator (CLOCK_50, pin R8) drives the PLL, which makes
// the 1 MHz scan clock and the 19200 Hz UART bit clock for
// game_controller.  The keypad connects to kpr/kpc (rows with weak
// pull-ups on the pads), the serial output leaves on TX (pin J14), reset_n
// is the push button on pin J15 and ct drives the indicator enables.  As
// in the original design the PLL is never reset and its lock output is not
// used: the push button resets the core directly (through one reset
// synchroniser per clock domain inside the core).
//
// The port names, pins, PLL ratios and reset wiring follow the original
// design.
//
// In this RTL 'pll' is a behavioural model of the vendor PLL (see
// pll.sv); for a real build it is replaced by the generated PLL of the
// same name and ports.
module game_controller_board
  import gc_pkg::*;
(
  input  logic            CLOCK_50,  // 50 MHz board oscillator
  input  logic            reset_n,   // push button, active low
  input  logic [KP_N-1:0] kpr,       // keypad rows, active low, pulled up
  output logic [KP_N-1:0] kpc,       // keypad column select, active low
  output logic [3:0]      ct,        // key-hit indicator on ct[0]
  output logic            TX         // serial output
);

  logic clk, bclk;

  pll u_pll (
    .areset(1'b0), .inclk0(CLOCK_50), .c0(clk), .c1(bclk), .locked()
  );

  game_controller u_core (
    .clk, .bclk, .reset_n, .kpr, .kpc, .ct, .tx(TX)
  );

endmodule
