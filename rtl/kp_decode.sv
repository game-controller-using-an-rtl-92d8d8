// kp_decode -- keypad lookup table and UART framing.
//
// Combinational.  When exactly one row (kpr) and the scanned column (kpc)
// are low, the key at that crossing is looked up in KEYMAP, a table of 16
// ASCII codes indexed row*4 + col.  An assigned key (non-zero entry) gives
// the UART word {1, ascii, 0}: start bit 0 in bit 0, data LSB first, stop
// bit 1 in bit 9, ready to be shifted out bit 0 first.  An unassigned key,
// more than one row low, or no key gives the all-ones standby word, which
// the transmitter turns into an idle line.  kphit is high while any row is
// low.
//
// The key positions of 'w', 'a', 's', 'd' and the standby rule follow the
// original design; holding the table in a parameter, so that other keys can
// be given characters, is this design's choice.
//
// Interface: kpc[3:0], kpr[3:0] active low; kphit; frame[9:0].  frame[9]
// is the stop bit and so is always 1, in every word including standby.
module kp_decode
  import gc_pkg::*;
#(
  parameter keymap_t KEYMAP = KEYMAP_WASD
) (
  input  logic [KP_N-1:0] kpc,
  input  logic [KP_N-1:0] kpr,
  output logic            kphit,
  output frame_t          frame
);

  logic [$clog2(KP_N)-1:0] row, col;
  ascii_t                  code;

  always_comb begin
    row   = cold_index(kpr);
    col   = cold_index(kpc);
    code  = KEYMAP[{row, col}];
    kphit = (kpr != '1);
    frame = FRAME_IDLE;
    if (one_cold(kpr) && one_cold(kpc) && code != 8'h00)
      frame = make_frame(code);
  end

endmodule
