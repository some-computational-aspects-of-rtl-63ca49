// reactor_rom: read-only memory of the reactor controller as an equivalent
// Moore finite state machine.
//
// The global states of the machine are the reachable contents of the
// logic-based controller's flip-flop registry (20 state and 3 event
// flip-flops). They are numbered breadth-first from the reset contents
// (code 0), inputs tried in increasing binary order; the original diagram
// has 143 of them, the improved one 41. The word at address {x, c} is
//     { code(next(state(c), x)), outputs(next(state(c), x)) }
// i.e. the next-state code and the outputs of that next state. The memory
// is 2**(M_IN+N_ST) words of N_ST+Y_OUT bits: with 10 inputs, 15 outputs
// and 8 code bits (original diagram) 6,029,312 bits, with 6 code bits
// (improved diagram) 1,376,256 bits.
//
// The contents are given as a function of the address rather than as a
// stored list of 2**(M_IN+N_ST) words: the code-to-state table (N_GLOBAL
// entries of 23 bits, constants from reactor_states_pkg) is the only stored
// data; the next state comes from the statechart rules in reactor_pkg and
// the next code from a search of that table. Unused codes decode to the
// reset contents.
// Read is asynchronous: data follows addr combinationally.
module reactor_rom
  import reactor_pkg::*;
#(
  parameter bit          SYNC_T6    = 1'b0,
  parameter int unsigned M_IN       = NX,   // input variables
  parameter int unsigned N_ST       = 8,    // state-code variables
  parameter int unsigned Y_OUT      = NY    // output variables
) (
  input  logic [M_IN+N_ST-1:0]  addr,
  output logic [N_ST+Y_OUT-1:0] data
);

  localparam int unsigned DEPTH = 2 ** (M_IN + N_ST);
  localparam int unsigned WIDTH = N_ST + Y_OUT;
  localparam int unsigned NCODE = 2 ** N_ST;
  localparam int unsigned N_GLOBAL = SYNC_T6 ? reactor_states_pkg::N_IMPR
                                             : reactor_states_pkg::N_ORIG;

  reactor_ff_t state_of [NCODE];

  for (genvar k = 0; k < NCODE; k++) begin : g_tab
    if (k >= N_GLOBAL) begin : g_unused
      assign state_of[k] = FF_INIT;
    end else if (SYNC_T6) begin : g_impr
      assign state_of[k] = reactor_ff_t'(reactor_states_pkg::STATES_IMPR[24*k +: 23]);
    end else begin : g_orig
      assign state_of[k] = reactor_ff_t'(reactor_states_pkg::STATES_ORIG[24*k +: 23]);
    end
  end

  reactor_ff_t     cur, nxt;
  logic [N_ST-1:0] ncode;

  always_comb begin
    cur   = state_of[addr[N_ST-1:0]];
    nxt   = reactor_next(cur, reactor_in_t'(addr[M_IN+N_ST-1:N_ST]), SYNC_T6);
    ncode = '0;
    for (int i = ((N_GLOBAL < NCODE) ? N_GLOBAL : NCODE) - 1; i >= 0; i--)
      if (state_of[i] == nxt) ncode = N_ST'(i);
    data  = {ncode, Y_OUT'(reactor_y(nxt))};
  end

endmodule
