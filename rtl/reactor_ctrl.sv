// reactor_ctrl: logic-based statechart controller of the chemical reactor.
//
// Structure: signal functions (reactor_signals) -> excitation functions
// (reactor_excitation) -> flip-flop registry (sc_registry), with the
// registry's outputs fed back to both. 20 state flip-flops and 3 event
// flip-flops; every output is registered state or event information, so the
// controller reacts to inputs sampled at a rising edge with outputs that
// change right after that edge.
//
// Behaviour: Start --REP*!AU/TM1--> Initiating (empty main container and
// scales in parallel, each region ends in a final state) --AUT*!AU-->
// Filling (three concurrent regions with history: main container with foam
// handling, scale 1, scale 2) --t6/TM1--> Process (Reaction: Pouring, then
// Emptying after FT1 with TM2; ProcessTermination after FT2) --AUT*NMIN-->
// Filling again. AU during Filling parks in Restart and REP*!AU resumes the
// remembered filling configuration; AU during Process returns to Start.
// SYNC_T6 selects the original (0) or the improved (1) form of t6.
// rst is synchronous, active high, and puts the controller in Start.
// Immediate assertions check, every cycle, that each region holds exactly
// one state and that no state is set and cleared at the same edge.
module reactor_ctrl
  import reactor_pkg::*;
#(
  parameter bit SYNC_T6 = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  reactor_in_t  x,
  output reactor_out_t y,
  output reactor_ff_t  q,      // registry contents (global state)
  output logic [NT:1]  fire    // transitions firing at the coming edge
);

  reactor_sig_t  sig;
  logic [NS-1:0] act, inact, st_delta;
  logic [NE-1:0] ev_d;

  reactor_signals u_sig (
    .x  (x),
    .q  (q),
    .sig(sig),
    .y  (y)
  );

  reactor_excitation #(.SYNC_T6(SYNC_T6)) u_exc (
    .q         (q),
    .sig       (sig),
    .activate  (act),
    .inactivate(inact),
    .ev_d      (ev_d),
    .fire      (fire)
  );

  sc_registry #(.NS(NS), .NE(NE), .STATE_INIT(STATE_INIT)) u_reg (
    .clk       (clk),
    .rst       (rst),
    .activate  (act),
    .inactivate(inact),
    .ev_d      (ev_d),
    .st_delta  (st_delta),
    .st        (q.st),
    .ev        (q.ev)
  );

  // Configuration rules: exactly one top-level state is active, every
  // history region holds exactly one flip-flop, and every other region of
  // an active composite state has exactly one active state.
  logic [NS-1:0] a;
  assign a = reactor_active(q.st);

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert ($countones({q.st[S_START], q.st[S_INITIATING], q.st[S_FILLING],
                          q.st[S_RESTART], q.st[S_PROCESS]}) == 1)
        else $error("reactor_ctrl: top level not in exactly one state");
      assert ($countones({q.st[S_MCFILL], q.st[S_EXCESS], q.st[S_STOPM]}) == 1 &&
              (q.st[S_SC1FILL] ^ q.st[S_STOP1]) && (q.st[S_SC2FILL] ^ q.st[S_STOP2]))
        else $error("reactor_ctrl: history region of Filling not in exactly one state");
      assert (!a[S_INITIATING] || ((q.st[S_MCEMPT] ^ q.st[S_FIN_A]) &&
                                   (q.st[S_INGEMPTYING] ^ q.st[S_FIN_B])))
        else $error("reactor_ctrl: Initiating region not in exactly one state");
      assert (!a[S_PROCESS] || ((q.st[S_REACTION] ^ q.st[S_PTERM]) &&
                                (!a[S_REACTION] || (q.st[S_POURING] ^ q.st[S_EMPTYING]))))
        else $error("reactor_ctrl: Process region not in exactly one state");
      assert ((act & inact) == '0)
        else $error("reactor_ctrl: a state is activated and inactivated at once");
    end
  end

endmodule
