// tb_statechart_top: end-to-end test of the whole design at its default
// sizes. Plant-like random inputs drive the four reactor controllers; every
// cycle the logic-based and the ROM-based outputs of each diagram are
// compared with the behavioural reference model of that diagram. The
// START/ACTION/STOP example is checked against its four-state Moore machine
// and the S1..S7 example against its quiet-input run and for transition
// coverage. Occurrences of each mechanism are counted and each must be seen
// at least once: every reactor transition in both diagrams, a history
// resume with a non-initial remembered configuration, t2 held back by the
// final states, an enclosing transition pre-empting an inner one, the full
// START->ACTION->STOP sequence, and every transition of the S1..S7 example.
module tb_statechart_top;
  import reactor_pkg::*;
  localparam int unsigned CYCLES = 300000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  reactor_in_t  x;
  reactor_out_t y_orig, y_impr, y_rom_orig, y_rom_impr, yr0, yr1;
  reactor_ff_t  q_orig, q_impr;
  logic [NT:1]  fire_orig, fire_impr, tk0, tk1;
  logic [7:0]   code_rom_orig;
  logic [5:0]   code_rom_impr;
  logic         ex2_i, ex1_a, ex1_d;
  logic [2:0]   ex2_state;
  logic [4:0]   ex2_events, ex2_rom_events;
  logic [1:0]   ex2_rom_code;
  logic [7:0]   ex1_state;
  logic [6:1]   ex1_fire;

  statechart_top dut (
    .clk(clk), .rst(rst), .x(x),
    .y_orig(y_orig), .y_impr(y_impr), .y_rom_orig(y_rom_orig), .y_rom_impr(y_rom_impr),
    .q_orig(q_orig), .q_impr(q_impr), .fire_orig(fire_orig), .fire_impr(fire_impr),
    .code_rom_orig(code_rom_orig), .code_rom_impr(code_rom_impr),
    .ex2_i(ex2_i), .ex2_state(ex2_state), .ex2_events(ex2_events),
    .ex2_rom_events(ex2_rom_events), .ex2_rom_code(ex2_rom_code),
    .ex1_a(ex1_a), .ex1_d(ex1_d), .ex1_state(ex1_state), .ex1_fire(ex1_fire)
  );

  reactor_stim u_stim (.clk(clk), .rst(rst), .x(x));
  reactor_ref #(.SYNC_T6(1'b0)) r0 (.clk(clk), .rst(rst), .x(x), .y(yr0), .taken(tk0));
  reactor_ref #(.SYNC_T6(1'b1)) r1 (.clk(clk), .rst(rst), .x(x), .y(yr1), .taken(tk1));

  // mechanism counters
  int unsigned n_t [2][NT+1];
  int unsigned n_hist, n_gate, n_pre, n_ex2_seq, n_ex1 [7];

  function automatic logic pre_empt(input reactor_ff_t q, input logic [NT:1] f, input reactor_in_t xi);
    return (f[5] || f[6]) &&
           ((q.st[S_MCFILL] && (xi.NLIM || xi.NMAX)) || (q.st[S_SC1FILL] && xi.B1) ||
            (q.st[S_STOP1] && !xi.B1) || (q.st[S_STOPM] && !xi.NMAX) ||
            (q.st[S_SC2FILL] && xi.B2) || (q.st[S_STOP2] && !xi.B2));
  endfunction

  always @(posedge clk) if (!rst) begin
    for (int t = 1; t <= NT; t++) begin
      if (fire_orig[t]) n_t[0][t]++;
      if (fire_impr[t]) n_t[1][t]++;
    end
    if ((fire_orig[15] && !(q_orig.st[S_MCFILL] && q_orig.st[S_SC1FILL] && q_orig.st[S_SC2FILL])) ||
        (fire_impr[15] && !(q_impr.st[S_MCFILL] && q_impr.st[S_SC1FILL] && q_impr.st[S_SC2FILL])))
      n_hist++;
    if (q_orig.st[S_INITIATING] && x.AUT && !x.AU && !(q_orig.st[S_FIN_A] && q_orig.st[S_FIN_B]))
      n_gate++;
    if (pre_empt(q_orig, fire_orig, x) || pre_empt(q_impr, fire_impr, x)) n_pre++;
    for (int t = 1; t <= 6; t++) if (ex1_fire[t]) n_ex1[t]++;
  end

  // START/ACTION/STOP example: 0 START, 1 ACTION, 2 STOP with ext/t2, 3 STOP
  logic [1:0] m2;
  function automatic logic [7:0] g2(input logic [1:0] m);
    case (m)
      2'd0:    return 8'b001_00000;
      2'd1:    return 8'b010_01101;
      2'd2:    return 8'b100_10010;
      default: return 8'b100_00000;
    endcase
  endfunction

  initial begin
    n_hist = 0; n_gate = 0; n_pre = 0; n_ex2_seq = 0;
    for (int t = 0; t <= NT; t++) begin n_t[0][t] = 0; n_t[1][t] = 0; end
    for (int t = 0; t < 7; t++) n_ex1[t] = 0;
    ex2_i = 1'b0; ex1_a = 1'b0; m2 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < CYCLES; n++) begin
      // S1..S7 example with a low: d must be high in the fourth period only
      if (n < 8) begin
        checks++;
        if (ex1_d !== (n == 3)) failures++;
      end else ex1_a = ($urandom_range(3) == 0);
      checks += 5;
      if (y_orig !== yr0)     begin failures++; if (failures < 10) $display("orig  %0t %h %h", $time, y_orig, yr0); end
      if (y_rom_orig !== yr0) begin failures++; if (failures < 10) $display("romo  %0t %h %h", $time, y_rom_orig, yr0); end
      if (y_impr !== yr1)     begin failures++; if (failures < 10) $display("impr  %0t %h %h", $time, y_impr, yr1); end
      if (y_rom_impr !== yr1) begin failures++; if (failures < 10) $display("romi  %0t %h %h", $time, y_rom_impr, yr1); end
      if ({ex2_state, ex2_events} !== g2(m2)) begin failures++; if (failures < 10) $display("ex2 %0t %b %b", $time, {ex2_state, ex2_events}, g2(m2)); end
      checks++;
      if ({3'b000, ex2_rom_events} !== (g2(m2) & 8'h1f) || ex2_rom_code !== m2) begin failures++; if (failures < 10) $display("ex2rom %0t %b %b", $time, ex2_rom_code, ex2_rom_events); end
      if (m2 == 2'd2) n_ex2_seq++;
      // next input of the START/ACTION/STOP example; the shared reset is not
      // pulsed, so the example is brought back to START by its own model
      // only once (it ends in STOP for good)
      ex2_i = ($urandom_range(7) == 0);
      @(negedge clk);
      case (m2)
        2'd0: m2 = ex2_i ? 2'd1 : 2'd0;
        2'd1: m2 = 2'd2;
        default: m2 = 2'd3;
      endcase
    end
    for (int v = 0; v < 2; v++)
      for (int t = 1; t <= NT; t++) begin
        checks++;
        if (n_t[v][t] == 0) begin failures++; $display("diagram %0d: t%0d never fired", v, t); end
      end
    $display("history resumes %0d, t2 held by final states %0d, pre-emptions %0d, START-ACTION-STOP runs %0d",
             n_hist, n_gate, n_pre, n_ex2_seq);
    $display("S1..S7 example transitions t1..t6: %0d %0d %0d %0d %0d %0d",
             n_ex1[1], n_ex1[2], n_ex1[3], n_ex1[4], n_ex1[5], n_ex1[6]);
    checks += 4;
    if (n_hist == 0) failures++;
    if (n_gate == 0) failures++;
    if (n_pre == 0) failures++;
    if (n_ex2_seq == 0) failures++;
    for (int t = 1; t <= 6; t++) begin
      checks++;
      if (n_ex1[t] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
