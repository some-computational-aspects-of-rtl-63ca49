// reactor_signals: signal functions of the reactor controller.
//
// Combinational. From the external inputs and the flip-flop registry it forms
// the event set the excitation functions react to, and the controller outputs:
//  * do-actions are the activity of their state (the AND of the state's
//    flip-flop and those of all its ancestors), e.g. V1 and P while MCFill is
//    active, V6 while Emptying or ProcessTermination is active;
//  * TM1 is the OR of the two flip-flops that hold it (broadcast by t1 and
//    by t6), TM2 the flip-flop of t19;
//  * the local events x, y, z of the improved diagram are the do-actions of
//    StopM, Stop1 and Stop2.
// Outputs therefore change one clock edge after the transition that causes
// them, as the synchronous semantics requires.
module reactor_signals
  import reactor_pkg::*;
(
  input  reactor_in_t  x,
  input  reactor_ff_t  q,
  output reactor_sig_t sig,
  output reactor_out_t y
);

  always_comb begin
    sig = reactor_sig(q, x);
    y   = reactor_y(q);
  end

endmodule
