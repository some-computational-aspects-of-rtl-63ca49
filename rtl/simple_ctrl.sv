// simple_ctrl: the three-state statechart START -> ACTION -> STOP.
//
//   START --t1: i / {t1}--> ACTION --t2: t1 / {t2}--> STOP
//   ACTION: entry / entr, do / d, exit / ext
//
// It shows the synchronous semantics in its smallest form: each state and
// each event source has a flip-flop (sc_registry), and an event produced at
// one clock edge is present to the controller during the following period.
// After i is sampled high in START, the next period shows ACTION, entr, d
// and t1; t1 then fires t2, so the period after that shows STOP, ext and t2;
// after that only STOP remains. The equivalent Moore machine therefore has
// four states: {START}, {ACTION, entr, d, t1}, {STOP, ext, t2}, {STOP}.
//
// The entry flip-flop is excited by "not active now and active next", the
// exit flip-flop by "active now and not active next", where "active next" is
// the product of the excitation values of the state and its ancestors. The
// do event is the activity of ACTION itself. rst is synchronous, active high,
// and activates START.
module simple_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic i,
  output logic st_start,
  output logic st_action,
  output logic st_stop,
  output logic t1,
  output logic t2,
  output logic entr,
  output logic d,
  output logic ext
);

  localparam int unsigned START = 0, ACTION = 1, STOP = 2;
  localparam int unsigned E_T1 = 0, E_T2 = 1, E_ENTR = 2, E_EXT = 3;

  logic [2:0] st, st_delta, act, inact;
  logic [3:0] ev, ev_d;
  logic       f1, f2;

  // excitation functions
  always_comb begin
    f1 = st[START]  & i;
    f2 = st[ACTION] & ev[E_T1];
    act           = '0;
    inact         = '0;
    inact[START]  = f1;
    act[ACTION]   = f1;
    inact[ACTION] = f2;
    act[STOP]     = f2;
    ev_d[E_T1]    = f1;
    ev_d[E_T2]    = f2;
    ev_d[E_ENTR]  = ~st[ACTION] &  st_delta[ACTION];
    ev_d[E_EXT]   =  st[ACTION] & ~st_delta[ACTION];
  end

  sc_registry #(.NS(3), .NE(4), .STATE_INIT(3'b001)) u_reg (
    .clk       (clk),
    .rst       (rst),
    .activate  (act),
    .inactivate(inact),
    .ev_d      (ev_d),
    .st_delta  (st_delta),
    .st        (st),
    .ev        (ev)
  );

  // signal functions
  assign st_start  = st[START];
  assign st_action = st[ACTION];
  assign st_stop   = st[STOP];
  assign t1        = ev[E_T1];
  assign t2        = ev[E_T2];
  assign entr      = ev[E_ENTR];
  assign ext       = ev[E_EXT];
  assign d         = st[ACTION];

endmodule
