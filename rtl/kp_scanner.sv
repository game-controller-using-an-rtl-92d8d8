// kp_scanner -- column scanner for an N x N switch-matrix keypad.
//
// One column line is driven low at a time (kpc is one-cold) while the rows,
// pulled up outside the chip, are read on kpr.  A closed switch on the driven
// column pulls its row low.  Each clock the low column moves one place to
// the right (kpc 0111 -> 1011 -> 1101 -> 1110 -> 0111 for N = 4), so at 1 MHz
// the whole keypad is looked at every 4 us.  While any row reads low the scan
// is suspended: kpc stays on the column that holds the pressed key, so that
// kpc and kpr together name the key for the decoder.  When the key is
// released the scan goes on from that column.
//
// The scan order, the reset value (left column selected) and the
// suspend-while-a-row-is-low rule follow the original design.  The rows are
// sampled directly at the clock edge, without a synchroniser, also as in the
// original: a key press is a slow mechanical event, and the decision only
// chooses between keeping and moving the column.
//
// Interface: clk, rst_n (synchronous, active low), kpr[N-1:0] rows (active
// low), kpc[N-1:0] columns (registered, one-cold), hold (combinational: a
// row is low now, so the next edge keeps kpc).
module kp_scanner #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] kpr,
  output logic [N-1:0] kpc,
  output logic         hold
);

  localparam logic [N-1:0] FIRST_COL = {1'b0, {(N-1){1'b1}}};

  assign hold = (kpr != '1);

  always_ff @(posedge clk) begin
    if (!rst_n)    kpc <= FIRST_COL;
    else if (!hold) kpc <= {kpc[0], kpc[N-1:1]};   // rotate the 0 to the right
  end

  // Exactly one column is driven at any time.
  a_one_cold : assert property (@(posedge clk) disable iff (!rst_n)
                                $countones(~kpc) == 1);

endmodule
