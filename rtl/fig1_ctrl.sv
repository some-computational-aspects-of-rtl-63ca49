// fig1_ctrl: example statechart with concurrency, history, a final state and
// event feedback.
//
//   S1 (do / c) holds two concurrent regions:
//     region S11: S2 (exit / a) --t2: b--> S3,  S3 --t6: b--> S2;
//                 S3 holds, with history, S6 --t4: a*!b--> S7 (do / d)
//                 and S7 --t5: c*!b / {b}--> S6.
//     region S12: S4 --t1: a+c--> S5 (entry / b) --t3: a*c--> final state.
//   a is an input and is also produced by the exit action of S2; b and c are
//   local; d is the output.
//
// Eight state flip-flops (S1..S7 and the final state) and three event
// flip-flops (exit of S2, broadcast of t5, entry of S5) in an sc_registry.
// Event a is the OR of the input and the exit flip-flop, b the OR of its two
// flip-flops, c and d are the activity of S1 and S7. t6, which leaves S3,
// pre-empts t4 and t5 inside it (this design's choice); the history region
// of S3 keeps S6/S7 while S3 is inactive and resets to S6. rst is
// synchronous, active high, and activates S1, S2, S4 (and S6 as history).
// Outputs change right after the rising edge at which they are caused.
module fig1_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic       a_in,
  output logic       d,
  output logic [7:0] st,      // S1..S7 at bits 0..6, final state at bit 7
  output logic [6:1] fire     // t1..t6 firing at the coming edge
);

  localparam int unsigned S1 = 0, S2 = 1, S3 = 2, S4 = 3, S5 = 4, S6 = 5, S7 = 6, FIN = 7;
  localparam int unsigned E_A_EXIT2 = 0, E_B_T5 = 1, E_B_ENTRY5 = 2;

  logic [7:0] st_delta, act, inact, a_st;
  logic [2:0] ev, ev_d;
  logic       a, b, c;

  // activecond of every state
  always_comb begin
    a_st[S1]  = st[S1];
    a_st[S2]  = st[S2]  & a_st[S1];
    a_st[S3]  = st[S3]  & a_st[S1];
    a_st[S4]  = st[S4]  & a_st[S1];
    a_st[S5]  = st[S5]  & a_st[S1];
    a_st[FIN] = st[FIN] & a_st[S1];
    a_st[S6]  = st[S6]  & a_st[S3];
    a_st[S7]  = st[S7]  & a_st[S3];
  end

  // signal functions
  assign a = a_in | ev[E_A_EXIT2];
  assign b = ev[E_B_T5] | ev[E_B_ENTRY5];
  assign c = a_st[S1];
  assign d = a_st[S7];

  // excitation functions
  always_comb begin
    fire[1] = a_st[S4] & (a | c);
    fire[2] = a_st[S2] & b;
    fire[3] = a_st[S5] & a & c;
    fire[6] = a_st[S3] & b;
    fire[4] = a_st[S6] & a & ~b & ~fire[6];
    fire[5] = a_st[S7] & c & ~b & ~fire[6];
    act        = '0;
    inact      = '0;
    act[S2]    = fire[6];
    inact[S2]  = fire[2];
    act[S3]    = fire[2];
    inact[S3]  = fire[6];
    act[S6]    = fire[5];
    inact[S6]  = fire[4];
    act[S7]    = fire[4];
    inact[S7]  = fire[5];
    inact[S4]  = fire[1];
    act[S5]    = fire[1];
    inact[S5]  = fire[3];
    act[FIN]   = fire[3];
    ev_d[E_A_EXIT2]  =  a_st[S2] & ~(st_delta[S1] & st_delta[S2]);
    ev_d[E_B_T5]     =  fire[5];
    ev_d[E_B_ENTRY5] = ~a_st[S5] &  (st_delta[S1] & st_delta[S5]);
  end

  sc_registry #(.NS(8), .NE(3), .STATE_INIT(8'b0010_1011)) u_reg (
    .clk       (clk),
    .rst       (rst),
    .activate  (act),
    .inactivate(inact),
    .ev_d      (ev_d),
    .st_delta  (st_delta),
    .st        (st),
    .ev        (ev)
  );

endmodule
