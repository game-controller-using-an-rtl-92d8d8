// gc_pkg -- types, constants and helper functions shared by the keypad game
// controller.
//
// The controller scans a 4x4 switch matrix, looks the pressed key up in a
// table of ASCII characters and sends the character as a ready-framed UART
// word.  A frame is 10 bits, sent bit 0 first: start bit (0), eight data bits
// LSB first, stop bit (1).  The all-ones frame carries no start bit and so
// leaves the serial line idle; it is the "standby" value sent when no
// assigned key is pressed.
//
// Key positions are numbered row*4 + col, where row is the index of the kpr
// bit pulled low (3 = top row) and col the index of the kpc bit driven low
// (3 = left column).  The default table puts the W, A, S, D game keys on the
// keys printed 2, 4, 5 and 6 (up, left, down, right arrows); the other twelve
// keys are unassigned (entry 0).
package gc_pkg;

  localparam int unsigned KP_N    = 4;          // keypad rows = columns
  localparam int unsigned FRAME_W = 10;         // start + 8 data + stop

  typedef logic [7:0]            ascii_t;
  typedef logic [FRAME_W-1:0]    frame_t;
  typedef logic [KP_N*KP_N-1:0][7:0] keymap_t;  // index row*KP_N + col

  localparam frame_t FRAME_IDLE = '1;           // standby: line stays high

  localparam int unsigned KEY_W = 3*KP_N + 2;   // row 3, col 2: key "2"
  localparam int unsigned KEY_A = 2*KP_N + 3;   // row 2, col 3: key "4"
  localparam int unsigned KEY_S = 2*KP_N + 2;   // row 2, col 2: key "5"
  localparam int unsigned KEY_D = 2*KP_N + 1;   // row 2, col 1: key "6"

  function automatic keymap_t wasd_keymap();
    keymap_t m = '0;
    m[KEY_W] = 8'h77;  // 'w'
    m[KEY_A] = 8'h61;  // 'a'
    m[KEY_S] = 8'h73;  // 's'
    m[KEY_D] = 8'h64;  // 'd'
    return m;
  endfunction

  localparam keymap_t KEYMAP_WASD = wasd_keymap();

  // UART word for one character: {stop, data, start}, bit 0 sent first.
  function automatic frame_t make_frame(ascii_t c);
    return {1'b1, c, 1'b0};
  endfunction

  // True when exactly one bit of an active-low vector is 0.
  function automatic logic one_cold(logic [KP_N-1:0] v);
    logic [KP_N-1:0] a;
    a = ~v;
    return (a != '0) && ((a & (a - 1'b1)) == '0);
  endfunction

  // Index of the 0 bit of a one-cold vector.
  function automatic logic [$clog2(KP_N)-1:0] cold_index(logic [KP_N-1:0] v);
    logic [$clog2(KP_N)-1:0] idx;
    idx = '0;
    for (int i = 0; i < KP_N; i++)
      if (!v[i]) idx = i[$clog2(KP_N)-1:0];
    return idx;
  endfunction

endpackage
