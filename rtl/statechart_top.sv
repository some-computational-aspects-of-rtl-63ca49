// statechart_top: the statechart controllers side by side.
//
//  * u_orig     - reactor controller, original diagram, logic-based
//                 (one flip-flop per state and per event source);
//  * u_impr     - reactor controller, improved diagram (t6 synchronised on
//                 StopM, Stop1, Stop2 through local events x, y, z),
//                 logic-based;
//  * u_rom_orig - original diagram as a ROM-based Moore machine
//                 (10 inputs + 8 state-code bits address 2**18 words of
//                 8 + 15 bits);
//  * u_rom_impr - improved diagram as a ROM-based Moore machine
//                 (10 + 6 address bits, words of 6 + 15 bits);
//  * u_simple   - the START/ACTION/STOP example;
//  * u_ex2_rom  - the same example as its equivalent four-state machine in
//                 a register and a ROM (its events are equal to u_simple's
//                 in every cycle);
//  * u_fig1     - the S1..S7 example with history and event feedback.
// The four reactor controllers share the plant inputs x; for the same
// diagram the logic-based and ROM-based outputs are equal in every cycle.
// One clock and one synchronous, active-high reset serve everything.
module statechart_top
  import reactor_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  reactor_in_t  x,
  output reactor_out_t y_orig,
  output reactor_out_t y_impr,
  output reactor_out_t y_rom_orig,
  output reactor_out_t y_rom_impr,
  output reactor_ff_t  q_orig,
  output reactor_ff_t  q_impr,
  output logic [NT:1]  fire_orig,
  output logic [NT:1]  fire_impr,
  output logic [7:0]   code_rom_orig,
  output logic [5:0]   code_rom_impr,
  // START/ACTION/STOP example
  input  logic         ex2_i,
  output logic [2:0]   ex2_state,   // {STOP, ACTION, START}
  output logic [4:0]   ex2_events,  // {ext, d, entr, t2, t1}
  output logic [4:0]   ex2_rom_events,
  output logic [1:0]   ex2_rom_code,
  // S1..S7 example
  input  logic         ex1_a,
  output logic         ex1_d,
  output logic [7:0]   ex1_state,
  output logic [6:1]   ex1_fire
);

  reactor_ctrl #(.SYNC_T6(1'b0)) u_orig (
    .clk (clk), .rst (rst), .x (x), .y (y_orig), .q (q_orig), .fire(fire_orig)
  );

  reactor_ctrl #(.SYNC_T6(1'b1)) u_impr (
    .clk (clk), .rst (rst), .x (x), .y (y_impr), .q (q_impr), .fire(fire_impr)
  );

  reactor_rom_fsm #(.SYNC_T6(1'b0), .N_ST(8)) u_rom_orig (
    .clk (clk), .rst (rst), .x (x), .y (y_rom_orig), .code(code_rom_orig)
  );

  reactor_rom_fsm #(.SYNC_T6(1'b1), .N_ST(6)) u_rom_impr (
    .clk (clk), .rst (rst), .x (x), .y (y_rom_impr), .code(code_rom_impr)
  );

  simple_ctrl u_simple (
    .clk      (clk),
    .rst      (rst),
    .i        (ex2_i),
    .st_start (ex2_state[0]),
    .st_action(ex2_state[1]),
    .st_stop  (ex2_state[2]),
    .t1       (ex2_events[0]),
    .t2       (ex2_events[1]),
    .entr     (ex2_events[2]),
    .d        (ex2_events[3]),
    .ext      (ex2_events[4])
  );

  fsm_rom u_ex2_rom (
    .clk (clk), .rst (rst), .x (ex2_i), .y (ex2_rom_events), .code(ex2_rom_code)
  );

  fig1_ctrl u_fig1 (
    .clk (clk),
    .rst (rst),
    .a_in(ex1_a),
    .d   (ex1_d),
    .st  (ex1_state),
    .fire(ex1_fire)
  );

endmodule
