// tb_reactor_ctrl: checks the logic-based reactor controller, original and
// improved diagram, against the behavioural reference model under plant-like
// random inputs. Compared every cycle: all 15 outputs, and the transitions
// the controller fires against those the model took at the same edge.
// Mechanisms that must occur at least once per variant: every transition
// t1..t19, a resume through history with a non-initial remembered
// configuration, t2 held back by unfinished Initiating regions, and an
// enclosing transition pre-empting an enabled inner one.
module tb_reactor_ctrl;
  import reactor_pkg::*;

  localparam int unsigned CYCLES = 200000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  reactor_in_t  x;
  reactor_out_t y [2], yr [2];
  reactor_ff_t  q [2];
  logic [NT:1]  fire [2], taken [2];
  logic [NT:1]  fire_d [2];
  int unsigned  n_fire [2][NT+1];
  int unsigned  n_hist [2], n_gate [2], n_pre [2];

  reactor_stim u_stim (.clk(clk), .rst(rst), .x(x));

  for (genvar v = 0; v < 2; v++) begin : g_var
    reactor_ctrl #(.SYNC_T6(v[0])) u_dut (
      .clk(clk), .rst(rst), .x(x), .y(y[v]), .q(q[v]), .fire(fire[v])
    );
    reactor_ref #(.SYNC_T6(v[0])) u_ref (
      .clk(clk), .rst(rst), .x(x), .y(yr[v]), .taken(taken[v])
    );
  end

  // coverage, sampled just before each rising edge
  always @(posedge clk) if (!rst) begin
    for (int v = 0; v < 2; v++) begin
      fire_d[v] <= fire[v];
      for (int t = 1; t <= NT; t++) if (fire[v][t]) n_fire[v][t]++;
      if (fire[v][15] && !(q[v].st[S_MCFILL] && q[v].st[S_SC1FILL] && q[v].st[S_SC2FILL]))
        n_hist[v]++;
      if (q[v].st[S_INITIATING] && x.AUT && !x.AU && !(q[v].st[S_FIN_A] && q[v].st[S_FIN_B]))
        n_gate[v]++;
      if ((fire[v][5] || fire[v][6]) &&
          ((q[v].st[S_MCFILL] && (x.NLIM || x.NMAX)) || (q[v].st[S_SC1FILL] && x.B1) ||
           (q[v].st[S_STOP1] && !x.B1) || (q[v].st[S_STOPM] && !x.NMAX)))
        n_pre[v]++;
    end
  end

  initial begin
    fire_d[0] = '0; fire_d[1] = '0;
    for (int v = 0; v < 2; v++) begin
      n_hist[v] = 0; n_gate[v] = 0; n_pre[v] = 0;
      for (int t = 0; t <= NT; t++) n_fire[v][t] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (CYCLES) begin
      @(negedge clk);
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (y[v] !== yr[v]) begin
          failures++;
          if (failures < 10) $display("variant %0d t=%0t outputs %h expected %h", v, $time, y[v], yr[v]);
        end
        checks++;
        if (fire_d[v] !== taken[v]) begin
          failures++;
          if (failures < 10) $display("variant %0d t=%0t fired %b expected %b", v, $time, fire_d[v], taken[v]);
        end
      end
    end
    for (int v = 0; v < 2; v++) begin
      for (int t = 1; t <= NT; t++) begin
        checks++;
        if (n_fire[v][t] == 0) begin failures++; $display("variant %0d: t%0d never fired", v, t); end
      end
      $display("variant %0d: history resumes %0d, t2 held by final states %0d, pre-emptions %0d",
               v, n_hist[v], n_gate[v], n_pre[v]);
      checks += 3;
      if (n_hist[v] == 0) failures++;
      if (n_gate[v] == 0) failures++;
      if (n_pre[v] == 0)  failures++;
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
