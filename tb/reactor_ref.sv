// reactor_ref: behavioural reference model of the reactor controller, for
// testbenches only.
//
// Written independently of the flip-flop encoding: each sequential region is
// an enumerated variable and one clock tick is a nested if/case over the
// configuration. Same rules as the controller: an enclosing transition
// pre-empts inner ones, AU wins over t6 and t16, NLIM over NMAX, FT2 over
// FT1 in Reaction; the Filling regions keep their history, all other regions
// restart at their initial state. Filling resumes its remembered
// configuration only when entered from Restart (t15); t2 and t16 start it
// at MCFill, SC1Fill, SC2Fill. taken[i] reports which transitions fired
// at the last edge; y are the outputs of the present configuration.
module reactor_ref
  import reactor_pkg::*;
#(
  parameter bit SYNC_T6 = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  reactor_in_t  x,
  output reactor_out_t y,
  output logic [19:1]  taken
);

  typedef enum logic [2:0] {T_START, T_INIT, T_FILL, T_RESTART, T_PROC} top_e;
  typedef enum logic [1:0] {MC_FILL, MC_EXCESS, MC_STOP} mc_e;

  top_e top;
  logic ia_fin, ib_fin;       // Initiating regions reached their final state
  mc_e  mc;
  logic s1_stop, s2_stop;     // Scale regions in Stop1 / Stop2
  logic pr_term;              // Process in ProcessTermination
  logic re_empty;             // Reaction in Emptying
  logic tm1, tm2;

  always_ff @(posedge clk) begin
    if (rst) begin
      top <= T_START; ia_fin <= 1'b0; ib_fin <= 1'b0;
      mc <= MC_FILL; s1_stop <= 1'b0; s2_stop <= 1'b0;
      pr_term <= 1'b0; re_empty <= 1'b0; tm1 <= 1'b0; tm2 <= 1'b0;
      taken <= '0;
    end else begin
      tm1 <= 1'b0; tm2 <= 1'b0; taken <= '0;
      case (top)
        T_START:
          if (x.REP && !x.AU) begin
            top <= T_INIT; ia_fin <= 1'b0; ib_fin <= 1'b0; tm1 <= 1'b1; taken[1] <= 1'b1;
          end
        T_INIT:
          if (ia_fin && ib_fin && x.AUT && !x.AU) begin
            top <= T_FILL; taken[2] <= 1'b1;
            mc <= MC_FILL; s1_stop <= 1'b0; s2_stop <= 1'b0;
          end else begin
            if (!ia_fin && x.NMIN) begin ia_fin <= 1'b1; taken[3] <= 1'b1; end
            if (!ib_fin && x.FT1)  begin ib_fin <= 1'b1; taken[4] <= 1'b1; end
          end
        T_FILL:
          if (x.AU) begin
            top <= T_RESTART; taken[5] <= 1'b1;
          end else if (SYNC_T6 ? (mc == MC_STOP && s1_stop && s2_stop)
                               : (x.NMAX && x.B1 && x.B2)) begin
            top <= T_PROC; pr_term <= 1'b0; re_empty <= 1'b0; tm1 <= 1'b1; taken[6] <= 1'b1;
          end else begin
            case (mc)
              MC_FILL:   if (x.NLIM) begin mc <= MC_EXCESS; taken[7] <= 1'b1; end
                         else if (x.NMAX) begin mc <= MC_STOP; taken[8] <= 1'b1; end
              MC_EXCESS: if (!x.NLIM) begin mc <= MC_FILL; taken[9] <= 1'b1; end
              default:   if (!x.NMAX) begin mc <= MC_FILL; taken[10] <= 1'b1; end
            endcase
            if (!s1_stop && x.B1)  begin s1_stop <= 1'b1; taken[11] <= 1'b1; end
            if (s1_stop && !x.B1)  begin s1_stop <= 1'b0; taken[12] <= 1'b1; end
            if (!s2_stop && x.B2)  begin s2_stop <= 1'b1; taken[13] <= 1'b1; end
            if (s2_stop && !x.B2)  begin s2_stop <= 1'b0; taken[14] <= 1'b1; end
          end
        T_RESTART:
          if (x.REP && !x.AU) begin top <= T_FILL; taken[15] <= 1'b1; end
        default: // T_PROC
          if (x.AU) begin
            top <= T_START; taken[17] <= 1'b1;
          end else if (x.AUT && x.NMIN) begin
            top <= T_FILL; taken[16] <= 1'b1;
            mc <= MC_FILL; s1_stop <= 1'b0; s2_stop <= 1'b0;
          end else if (!pr_term) begin
            if (x.FT2) begin pr_term <= 1'b1; taken[18] <= 1'b1; end
            else if (!re_empty && x.FT1) begin
              re_empty <= 1'b1; tm2 <= 1'b1; taken[19] <= 1'b1;
            end
          end
      endcase
    end
  end

  always_comb begin
    logic pour, empt;
    y    = '0;
    pour = (top == T_PROC) && !pr_term && !re_empty;
    empt = (top == T_PROC) && !pr_term && re_empty;
    y.V1  = (top == T_FILL) && (mc == MC_FILL);
    y.P   = y.V1;
    y.V2  = (top == T_FILL) && !s1_stop;
    y.V4  = (top == T_FILL) && !s2_stop;
    y.EV  = (top == T_INIT) && !ia_fin;
    y.AC1 = (top == T_INIT) && !ib_fin;
    y.AC2 = y.AC1;
    y.C1  = pour; y.C2 = pour; y.V3 = pour; y.V5 = pour;
    y.V6  = empt || ((top == T_PROC) && pr_term);
    y.M   = (top == T_PROC) && !pr_term;
    y.TM1 = tm1;
    y.TM2 = tm2;
  end

endmodule
