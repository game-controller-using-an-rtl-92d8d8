// keypad_model -- behavioural model of a 4x4 switch-matrix keypad with
// pull-up resistors on the row lines (testbench only).
//
// pressed[row*4 + col] closes the switch at that crossing (row 3 = top,
// col 3 = left).  A row reads low when any closed switch on it meets a
// column that is driven low; otherwise the pull-up keeps it high.
module keypad_model (
  input  logic [3:0]  kpc,
  input  logic [15:0] pressed,
  output logic [3:0]  kpr
);

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      kpr[r] = 1'b1;
      for (int c = 0; c < 4; c++)
        if (pressed[r*4 + c] && !kpc[c]) kpr[r] = 1'b0;
    end
  end

endmodule
