// reset_sync -- reset synchroniser for one clock domain.
//
// The active-low reset button is asynchronous to both clocks of the
// controller.  This two-flop chain asserts rst_n_out at once when rst_n_in
// falls and releases it on the second clock edge after rst_n_in rises, so
// every flop of the domain leaves reset in the same cycle.  Adding it is
// this design's choice.
//
// Interface: clk, rst_n_in (asynchronous), rst_n_out (synchronous to clk).
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) {rst_n_out, meta} <= 2'b00;
    else           {rst_n_out, meta} <= {meta, 1'b1};
  end

endmodule
