// sc_state_ff: the flip-flop of one statechart state together with its
// excitation gate.
//
// The flip-flop holds 1 while its state is active or, in a region with the
// history attribute, while it is the state that region last had active. Its
// next value is
//     delta = activate | (s & ~inactivate)
// i.e. the activating component sets it, the fed-back output sustains it
// until the inactivating factor clears it; activate wins when both are 1.
// This is the gate-plus-D-flip-flop cell the statechart synthesis rules are
// built on. The synchronous reset value INIT (1 for states active, or
// remembered, at reset) is a choice of this design.
//
// Timing: delta is combinational; s changes on the rising clock edge.
module sc_state_ff #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic activate,
  input  logic inactivate,
  output logic delta,
  output logic s
);

  assign delta = activate | (s & ~inactivate);

  always_ff @(posedge clk) begin
    if (rst) s <= INIT;
    else     s <= delta;
  end

endmodule
