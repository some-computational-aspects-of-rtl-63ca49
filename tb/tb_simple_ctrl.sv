// tb_simple_ctrl: checks the START/ACTION/STOP example against its
// equivalent Moore machine of four states: {START} --i--> {ACTION, entr, d,
// t1} --> {STOP, ext, t2} --> {STOP}. First one directed pass, cycle by
// cycle (this also checks the one-tick latency of every event), then random
// i and reset pulses against the same four-state machine.
module tb_simple_ctrl;
  logic clk = 1'b0, rst = 1'b1, i = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic st_start, st_action, st_stop, t1, t2, entr, d, ext;
  simple_ctrl dut (.clk(clk), .rst(rst), .i(i), .st_start(st_start), .st_action(st_action),
                   .st_stop(st_stop), .t1(t1), .t2(t2), .entr(entr), .d(d), .ext(ext));

  // {START, ACTION, STOP, t1, t2, entr, d, ext} of the four Moore states
  localparam logic [7:0] G_START = 8'b100_00000;
  localparam logic [7:0] G_ACT   = 8'b010_10110;
  localparam logic [7:0] G_STOPX = 8'b001_01001;
  localparam logic [7:0] G_STOP  = 8'b001_00000;

  function automatic logic [7:0] obs();
    return {st_start, st_action, st_stop, t1, t2, entr, d, ext};
  endfunction

  task automatic expect_g(input logic [7:0] g);
    checks++;
    if (obs() !== g) begin
      failures++;
      $display("t=%0t got %b expected %b", $time, obs(), g);
    end
  endtask

  logic [1:0] m;  // model: 0 START, 1 ACTION, 2 STOP+ext, 3 STOP

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    expect_g(G_START);
    @(negedge clk) expect_g(G_START);          // no i: stays
    i = 1'b1;
    @(negedge clk) expect_g(G_ACT);             // one edge after i
    i = 1'b0;
    @(negedge clk) expect_g(G_STOPX);           // t1 seen one tick later fires t2
    @(negedge clk) expect_g(G_STOP);
    @(negedge clk) expect_g(G_STOP);
    // random phase
    rst = 1'b1;
    @(negedge clk);
    m = 0;
    for (int n = 0; n < 3000; n++) begin
      rst = ($urandom_range(19) == 0);
      i   = 1'($urandom);
      @(negedge clk);
      if (rst) m = 0;
      else case (m)
        0: m = i ? 2'd1 : 2'd0;
        1: m = 2;
        default: m = 3;
      endcase
      case (m)
        0: expect_g(G_START);
        1: expect_g(G_ACT);
        2: expect_g(G_STOPX);
        default: expect_g(G_STOP);
      endcase
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
