// reactor_pkg: types, constants and the statechart semantics of the chemical
// reactor controller.
//
// The controller is a hierarchical, concurrent statechart with 20 states
// (18 named states numbered 1..18 plus the two final states of the
// Initiating regions), 19 transitions t1..t19, 10 binary inputs and
// 15 binary outputs. It is implemented the "one flip-flop per state, one
// flip-flop per event source" way: a state flip-flop at 1 means the state is
// active, or, inside a region with the history attribute, that it was the most
// recently active one. A state is active when its own flip-flop and those of
// all its ancestors are 1 (activecond, eq. 1 style product over the path).
//
// Each state flip-flop follows  next = activate | s & ~inactivate , and the
// functions below give the activate and inactivate terms derived from the
// diagram. The same functions are used by the logic-based controller and by
// the generator of the ROM of the memory-based controller, so both carry
// exactly one definition of the behaviour.
//
// Choices of this design that the diagram leaves open:
//  * a transition leaving a composite state pre-empts every transition inside
//    it in the same clock tick (the history regions then remember the
//    configuration held at that tick);
//  * t7 (NLIM) wins over t8 (NMAX) in MCFill; t5 (AU) wins over t6;
//    t17 (AU) wins over t16; t18 pre-empts t19;
//  * the history of the Filling regions is used only when Filling is
//    re-entered from Restart (t15); entering through t2 or t16 starts the
//    regions at MCFill, SC1Fill and SC2Fill. The flip-flops still keep the
//    remembered configuration while Filling is inactive. At reset the
//    history regions hold their initial states;
//  * do-action outputs are the combinational activity of their state, which
//    has the same timing as a flip-flop excited like the state.
// Variant SYNC_T6 = 1 is the improved diagram: t6 needs the local do-events
// x, y, z of StopM, Stop1 and Stop2 and no AU.
package reactor_pkg;

  localparam int unsigned NS = 20;  // state flip-flops
  localparam int unsigned NE = 3;   // event flip-flops (transition events)
  localparam int unsigned NX = 10;  // inputs
  localparam int unsigned NY = 15;  // outputs
  localparam int unsigned NT = 19;  // transitions

  // State flip-flop index = number in the diagram minus 1; the two final
  // states of Initiating follow.
  typedef enum int unsigned {
    S_START        = 0,   // Start_1
    S_INITIATING   = 1,   // Initiating_2
    S_FILLING      = 2,   // Filling_3
    S_RESTART      = 3,   // Restart_4
    S_PROCESS      = 4,   // Process_5
    S_MCEMPT       = 5,   // MCEmpt_6
    S_INGEMPTYING  = 6,   // IngEmptying_7
    S_MCFILL       = 7,   // MCFill_8
    S_EXCESS       = 8,   // Excess of Foam_9
    S_STOPM        = 9,   // StopM_10
    S_SC1FILL      = 10,  // SC1Fill_11
    S_STOP1        = 11,  // Stop1_12
    S_SC2FILL      = 12,  // SC2Fill_13
    S_STOP2        = 13,  // Stop2_14
    S_REACTION     = 14,  // Reaction_15
    S_PTERM        = 15,  // ProcessTermination_16
    S_POURING      = 16,  // Pouring_17
    S_EMPTYING     = 17,  // Emptying_18
    S_FIN_A        = 18,  // final state of the MCEmpt region
    S_FIN_B        = 19   // final state of the IngEmptying region
  } state_e;

  // Event flip-flops: one per place where an event is generated.
  typedef enum int unsigned {
    E_T1_TM1  = 0,  // TM1 broadcast by t1
    E_T6_TM1  = 1,  // TM1 broadcast by t6
    E_T19_TM2 = 2   // TM2 broadcast by t19
  } event_e;

  localparam int unsigned ROOT = 31;

  // Parent of each state in the hierarchy tree (ROOT for top-level states).
  // Every parent has a lower index than its children.
  localparam int unsigned PARENT [NS] = '{
    ROOT, ROOT, ROOT, ROOT, ROOT,                 // Start..Process
    S_INITIATING, S_INITIATING,                   // MCEmpt, IngEmptying
    S_FILLING, S_FILLING, S_FILLING,              // MainContainer region
    S_FILLING, S_FILLING,                         // Scale1 region
    S_FILLING, S_FILLING,                         // Scale2 region
    S_PROCESS, S_PROCESS,                         // Reaction, ProcessTermination
    S_REACTION, S_REACTION,                       // Pouring, Emptying
    S_INITIATING, S_INITIATING                    // final states
  };

  // Reset configuration: Start active, history regions at their initial states.
  localparam logic [NS-1:0] STATE_INIT =
      (NS'(1) << S_START) | (NS'(1) << S_MCFILL) |
      (NS'(1) << S_SC1FILL) | (NS'(1) << S_SC2FILL);

  typedef struct packed {
    logic AU;    // break-down (control desk)
    logic REP;   // initiate process request (control desk)
    logic AUT;   // cycle start-up (control desk)
    logic B1;    // scale 1 weight reached
    logic B2;    // scale 2 weight reached
    logic NLIM;  // foam limit level
    logic NMAX;  // main container full level
    logic NMIN;  // main container empty level
    logic FT1;   // external clock 1 elapsed
    logic FT2;   // external clock 2 elapsed
  } reactor_in_t;

  typedef struct packed {
    logic V1, V2, V3, V4, V5, V6;  // valves
    logic P;                       // pump
    logic EV;                      // main container discard valve
    logic C1, AC1, C2, AC2;        // belt conveyors
    logic M;                       // mixer engine
    logic TM1, TM2;                // external clock start
  } reactor_out_t;

  // Full register contents: the global state of the controller.
  typedef struct packed {
    logic [NE-1:0] ev;
    logic [NS-1:0] st;
  } reactor_ff_t;

  // Event set seen by the excitation functions.
  typedef struct packed {
    reactor_in_t x;     // external input events
    logic        lx;    // local do-event x (StopM), improved diagram
    logic        ly;    // local do-event y (Stop1)
    logic        lz;    // local do-event z (Stop2)
    logic        TM1;
    logic        TM2;
  } reactor_sig_t;

  localparam reactor_ff_t FF_INIT = '{ev: '0, st: STATE_INIT};

  // activecond of every state: product of the flip-flops on the path to root.
  function automatic logic [NS-1:0] reactor_active(input logic [NS-1:0] st);
    logic [NS-1:0] a;
    for (int i = 0; i < NS; i++) begin
      if (PARENT[i] == ROOT) a[i] = st[i];
      else                   a[i] = st[i] & a[PARENT[i]];
    end
    return a;
  endfunction

  // Signal functions: event set and outputs from inputs and flip-flops.
  function automatic reactor_sig_t reactor_sig(input reactor_ff_t q, input reactor_in_t x);
    logic [NS-1:0] a;
    reactor_sig_t s;
    a     = reactor_active(q.st);
    s.x   = x;
    s.lx  = a[S_STOPM];
    s.ly  = a[S_STOP1];
    s.lz  = a[S_STOP2];
    s.TM1 = q.ev[E_T1_TM1] | q.ev[E_T6_TM1];
    s.TM2 = q.ev[E_T19_TM2];
    return s;
  endfunction

  function automatic reactor_out_t reactor_y(input reactor_ff_t q);
    logic [NS-1:0] a;
    reactor_out_t y;
    a     = reactor_active(q.st);
    y.V1  = a[S_MCFILL];
    y.P   = a[S_MCFILL];
    y.V2  = a[S_SC1FILL];
    y.V4  = a[S_SC2FILL];
    y.EV  = a[S_MCEMPT];
    y.AC1 = a[S_INGEMPTYING];
    y.AC2 = a[S_INGEMPTYING];
    y.C1  = a[S_POURING];
    y.C2  = a[S_POURING];
    y.V3  = a[S_POURING];
    y.V5  = a[S_POURING];
    y.V6  = a[S_EMPTYING] | a[S_PTERM];
    y.M   = a[S_REACTION];
    y.TM1 = q.ev[E_T1_TM1] | q.ev[E_T6_TM1];
    y.TM2 = q.ev[E_T19_TM2];
    return y;
  endfunction

  // Enabling conditions with priorities: bit i is transition t(i).
  function automatic logic [NT:1] reactor_fire(input reactor_ff_t q, input reactor_sig_t s,
                                               input logic sync_t6);
    logic [NS-1:0] a;
    logic [NT:1]   f;
    logic          pre_f, pre_p;
    reactor_in_t   x;
    a = reactor_active(q.st);
    x = s.x;
    f = '0;
    f[1]  = a[S_START] & x.REP & ~x.AU;
    // t2 leaves Initiating only when both regions reached their final state
    f[2]  = a[S_INITIATING] & q.st[S_FIN_A] & q.st[S_FIN_B] & x.AUT & ~x.AU;
    f[3]  = a[S_MCEMPT] & x.NMIN;
    f[4]  = a[S_INGEMPTYING] & x.FT1;
    f[5]  = a[S_FILLING] & x.AU;
    f[6]  = sync_t6 ? (a[S_FILLING] & s.lx & s.ly & s.lz & ~x.AU)
                    : (a[S_FILLING] & x.NMAX & x.B1 & x.B2 & ~f[5]);
    pre_f = f[5] | f[6];
    f[7]  = a[S_MCFILL]  & x.NLIM & ~pre_f;
    f[8]  = a[S_MCFILL]  & x.NMAX & ~x.NLIM & ~pre_f;
    f[9]  = a[S_EXCESS]  & ~x.NLIM & ~pre_f;
    f[10] = a[S_STOPM]   & ~x.NMAX & ~pre_f;
    f[11] = a[S_SC1FILL] & x.B1 & ~pre_f;
    f[12] = a[S_STOP1]   & ~x.B1 & ~pre_f;
    f[13] = a[S_SC2FILL] & x.B2 & ~pre_f;
    f[14] = a[S_STOP2]   & ~x.B2 & ~pre_f;
    f[15] = a[S_RESTART] & x.REP & ~x.AU;
    f[17] = a[S_PROCESS] & x.AU;
    f[16] = a[S_PROCESS] & x.AUT & x.NMIN & ~f[17];
    pre_p = f[16] | f[17];
    f[18] = a[S_REACTION] & x.FT2 & ~pre_p;
    f[19] = a[S_POURING]  & x.FT1 & ~pre_p & ~f[18];
    return f;
  endfunction

  // Activating components of the state excitation functions.
  function automatic logic [NS-1:0] reactor_activate(input logic [NT:1] f);
    logic [NS-1:0] act;
    act = '0;
    act[S_START]       = f[17];
    act[S_INITIATING]  = f[1];
    act[S_MCEMPT]      = f[1];          // default entry of both regions
    act[S_INGEMPTYING] = f[1];
    act[S_FIN_A]       = f[3];
    act[S_FIN_B]       = f[4];
    act[S_FILLING]     = f[2] | f[15] | f[16];
    // t2 and t16 enter Filling at its initial states, t15 through history
    act[S_MCFILL]      = f[9] | f[10] | f[2] | f[16];
    act[S_EXCESS]      = f[7];
    act[S_STOPM]       = f[8];
    act[S_SC1FILL]     = f[12] | f[2] | f[16];
    act[S_STOP1]       = f[11];
    act[S_SC2FILL]     = f[14] | f[2] | f[16];
    act[S_STOP2]       = f[13];
    act[S_RESTART]     = f[5];
    act[S_PROCESS]     = f[6];
    act[S_REACTION]    = f[6];
    act[S_POURING]     = f[6];
    act[S_PTERM]       = f[18];
    act[S_EMPTYING]    = f[19];
    return act;
  endfunction

  // Inactivating factors. States in a region without history also lose
  // their flip-flop when an ancestor is left; history regions keep it.
  function automatic logic [NS-1:0] reactor_inactivate(input logic [NT:1] f);
    logic [NS-1:0] ina;
    logic          exit_p, dflt_f;
    exit_p = f[16] | f[17];
    dflt_f = f[2] | f[16];   // default entry of Filling clears what history kept
    ina = '0;
    ina[S_START]       = f[1];
    ina[S_INITIATING]  = f[2];
    ina[S_MCEMPT]      = f[3] | f[2];
    ina[S_INGEMPTYING] = f[4] | f[2];
    ina[S_FIN_A]       = f[2];
    ina[S_FIN_B]       = f[2];
    ina[S_FILLING]     = f[5] | f[6];
    ina[S_MCFILL]      = f[7] | f[8];
    ina[S_EXCESS]      = f[9] | dflt_f;
    ina[S_STOPM]       = f[10] | dflt_f;
    ina[S_SC1FILL]     = f[11];
    ina[S_STOP1]       = f[12] | dflt_f;
    ina[S_SC2FILL]     = f[13];
    ina[S_STOP2]       = f[14] | dflt_f;
    ina[S_RESTART]     = f[15];
    ina[S_PROCESS]     = exit_p;
    ina[S_REACTION]    = f[18] | exit_p;
    ina[S_PTERM]       = exit_p;
    ina[S_POURING]     = f[19] | f[18] | exit_p;
    ina[S_EMPTYING]    = f[18] | exit_p;
    return ina;
  endfunction

  // Transition-event flip-flop excitation (eq. 3 form): the firing condition.
  function automatic logic [NE-1:0] reactor_event_d(input logic [NT:1] f);
    logic [NE-1:0] d;
    d[E_T1_TM1]  = f[1];
    d[E_T6_TM1]  = f[6];
    d[E_T19_TM2] = f[19];
    return d;
  endfunction

  // One clock tick of the whole controller: used to fill the ROM.
  function automatic reactor_ff_t reactor_next(input reactor_ff_t q, input reactor_in_t x,
                                               input logic sync_t6);
    logic [NT:1] f;
    reactor_ff_t n;
    f    = reactor_fire(q, reactor_sig(q, x), sync_t6);
    n.st = reactor_activate(f) | (q.st & ~reactor_inactivate(f));
    n.ev = reactor_event_d(f);
    return n;
  endfunction

endpackage
