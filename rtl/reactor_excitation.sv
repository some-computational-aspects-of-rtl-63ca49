// reactor_excitation: excitation functions of the reactor controller.
//
// Combinational. Evaluates the enabling condition of every transition t1..t19
// (source state active, final states reached where the source holds them,
// guard true, and no pre-empting transition of an enclosing state or of
// higher priority), then the activating and inactivating terms of each of the
// 20 state flip-flops and the excitation of the 3 transition-event
// flip-flops. SYNC_T6 = 0 builds the original diagram (t6: NMAX*B1*B2),
// SYNC_T6 = 1 the improved one (t6: x*y*z*!AU). The rules themselves are in
// reactor_pkg, shared with the ROM generator of the memory-based version.
// The fire vector is brought out for observation.
module reactor_excitation
  import reactor_pkg::*;
#(
  parameter bit SYNC_T6 = 1'b0
) (
  input  reactor_ff_t   q,
  input  reactor_sig_t  sig,
  output logic [NS-1:0] activate,
  output logic [NS-1:0] inactivate,
  output logic [NE-1:0] ev_d,
  output logic [NT:1]   fire
);

  always_comb begin
    fire       = reactor_fire(q, sig, SYNC_T6);
    activate   = reactor_activate(fire);
    inactivate = reactor_inactivate(fire);
    ev_d       = reactor_event_d(fire);
  end

endmodule
