// sc_registry: the flip-flop registry of a statechart controller.
//
// One sc_state_ff cell per state and one plain D flip-flop per place where an
// event is generated (a transition broadcast, an entry or an exit action).
// Event flip-flops hold an event for exactly one clock period, so an event
// produced in one tick is seen by the controller in the next.
//
// Interface: per state an activate and an inactivate term, per event source
// its excitation ev_d. Outputs are the flip-flop values st and ev and the
// state excitation values st_delta (the states' next values), which entry and
// exit actions need. Reset is synchronous and loads STATE_INIT, events clear.
// Defaults are the sizes of the reactor controller (20 states, 3 event
// sources); the reset vector is this design's choice.
module sc_registry #(
  parameter int unsigned        NS         = 20,
  parameter int unsigned        NE         = 3,
  parameter logic [NS-1:0]      STATE_INIT = reactor_pkg::STATE_INIT
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [NS-1:0] activate,
  input  logic [NS-1:0] inactivate,
  input  logic [NE-1:0] ev_d,
  output logic [NS-1:0] st_delta,
  output logic [NS-1:0] st,
  output logic [NE-1:0] ev
);

  for (genvar i = 0; i < NS; i++) begin : g_state
    sc_state_ff #(.INIT(STATE_INIT[i])) u_cell (
      .clk       (clk),
      .rst       (rst),
      .activate  (activate[i]),
      .inactivate(inactivate[i]),
      .delta     (st_delta[i]),
      .s         (st[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) ev <= '0;
    else     ev <= ev_d;
  end

endmodule
