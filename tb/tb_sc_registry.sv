// tb_sc_registry: a registry of 5 state cells and 3 event flip-flops with
// reset vector 10110, driven with random terms; checks states, events and
// excitation outputs against a model every cycle, including that an event
// lasts exactly one clock.
module tb_sc_registry;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  localparam logic [4:0] INIT = 5'b10110;
  logic [4:0] act, ina, st, st_delta, st_exp;
  logic [2:0] ev_d, ev, ev_exp;

  sc_registry #(.NS(5), .NE(3), .STATE_INIT(INIT)) dut (
    .clk(clk), .rst(rst), .activate(act), .inactivate(ina), .ev_d(ev_d),
    .st_delta(st_delta), .st(st), .ev(ev)
  );

  initial begin
    act = '0; ina = '0; ev_d = '0;
    @(posedge clk); @(negedge clk);
    st_exp = INIT; ev_exp = '0;
    for (int n = 0; n < 3000; n++) begin
      act = 5'($urandom) & 5'($urandom); ina = 5'($urandom); ev_d = 3'($urandom);
      rst = ($urandom_range(63) == 0);
      #1;
      checks += 3;
      if (st !== st_exp) failures++;
      if (ev !== ev_exp) failures++;
      if (st_delta !== (act | (st_exp & ~ina))) failures++;
      st_exp = rst ? INIT : (act | (st_exp & ~ina));
      ev_exp = rst ? 3'b000 : ev_d;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
