// pll -- BEHAVIOURAL MODEL of the board PLL (kind: behavioural model).
//
// On the FPGA this is the vendor's analog PLL, configured to make two clocks
// from the 50 MHz board oscillator: c0 = inclk0 * 1 / 50 (1 MHz, the keypad
// scan clock) and c1 = inclk0 * 1 / 2604 (19201.2 Hz, the UART bit clock),
// both 50 % duty cycle and zero phase shift.  The ports are those of the
// real part.  This model stands in for it in simulation: two counters on
// inclk0 divide it down, and 'locked' rises after LOCK_CYCLES input cycles.
// Both outputs change in the same clock process, so a rising edge they
// share happens in the same simulation step, as the phase-aligned outputs of
// the real PLL would.  It starts from its power-up state (unlocked, outputs
// low), as the real part does, and areset returns it there.  It should be replaced by the vendor PLL for a real
// build; clocks made by fabric counters are not a substitute on silicon.
//
// The divide ratios are the original design's; the lock time is not given
// there and is this model's choice.
//
// Interface: areset (asynchronous, active high), inclk0; c0, c1, locked.
module pll #(
  parameter int unsigned CLK0_DIVIDE_BY = 50,
  parameter int unsigned CLK1_DIVIDE_BY = 2604,
  parameter int unsigned LOCK_CYCLES    = 1000
) (
  input  logic areset,
  input  logic inclk0,
  output logic c0,
  output logic c1,
  output logic locked
);

  localparam int unsigned W0 = $clog2(CLK0_DIVIDE_BY);
  localparam int unsigned W1 = $clog2(CLK1_DIVIDE_BY);
  localparam int unsigned WL = $clog2(LOCK_CYCLES + 1);

  logic [W0-1:0] n0;
  logic [W1-1:0] n1;
  logic [WL-1:0] nl;

  // Power-up state: the real PLL starts unlocked with its outputs low.
  initial begin
    n0 = '0;  n1 = '0;  nl = '0;
    c0 = 1'b0; c1 = 1'b0; locked = 1'b0;
  end

  always @(posedge inclk0 or posedge areset) begin
    if (areset) begin
      n0 <= '0;  n1 <= '0;  nl <= '0;
      c0 <= 1'b0; c1 <= 1'b0; locked <= 1'b0;
    end else begin
      n0 <= (n0 == W0'(CLK0_DIVIDE_BY - 1)) ? '0 : n0 + 1'b1;
      n1 <= (n1 == W1'(CLK1_DIVIDE_BY - 1)) ? '0 : n1 + 1'b1;
      c0 <= (n0 < W0'(CLK0_DIVIDE_BY / 2));   // high for the first half
      c1 <= (n1 < W1'(CLK1_DIVIDE_BY / 2));
      if (nl != WL'(LOCK_CYCLES)) nl <= nl + 1'b1;
      locked <= (nl == WL'(LOCK_CYCLES));
    end
  end

endmodule
