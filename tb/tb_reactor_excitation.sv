// tb_reactor_excitation: closes the loop around the excitation functions
// with a testbench register (next = activate | q & ~inactivate, events =
// ev_d) and hand-written signal functions, then compares the transitions it
// enables with those of the behavioural reference model under random plant
// inputs, for both forms of t6. Also checks that no state is both activated
// and inactivated in the same cycle.
module tb_reactor_excitation;
  import reactor_pkg::*;
  localparam int unsigned CYCLES = 50000;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  reactor_in_t x;
  reactor_stim u_stim (.clk(clk), .rst(rst), .x(x));

  for (genvar v = 0; v < 2; v++) begin : g_var
    reactor_ff_t   q;
    reactor_sig_t  sig;
    logic [NS-1:0] act, ina;
    logic [NE-1:0] ev_d;
    logic [NT:1]   fire, fire_d, taken;
    reactor_out_t  yr;
    logic          nfail;

    reactor_excitation #(.SYNC_T6(v[0])) dut (
      .q(q), .sig(sig), .activate(act), .inactivate(ina), .ev_d(ev_d), .fire(fire)
    );
    reactor_ref #(.SYNC_T6(v[0])) u_ref (.clk(clk), .rst(rst), .x(x), .y(yr), .taken(taken));

    always_comb begin
      sig.x   = x;
      sig.lx  = q.st[2] & q.st[9];
      sig.ly  = q.st[2] & q.st[11];
      sig.lz  = q.st[2] & q.st[13];
      sig.TM1 = q.ev[0] | q.ev[1];
      sig.TM2 = q.ev[2];
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        q.st   <= 20'b0000_0001_0100_1000_0001;
        q.ev   <= '0;
        fire_d <= '0;
      end else begin
        q.st   <= act | (q.st & ~ina);
        q.ev   <= ev_d;
        fire_d <= fire;
      end
    end
    assign nfail = (fire_d !== taken) || ((act & ina) != '0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (CYCLES) begin
      @(negedge clk);
      checks += 2;
      if (g_var[0].nfail) failures++;
      if (g_var[1].nfail) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
