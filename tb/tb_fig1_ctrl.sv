// tb_fig1_ctrl: checks the S1..S7 example. First the run with input a held
// low, cycle by cycle: S4->S5 on c (t1), S2->S3 on the entry event b of S5
// (t2), S6->S7 on the exit event a of S2 with S5 reaching the final state
// (t4, t3), d for one tick, S7->S6 broadcasting b (t5), S3->S2 on that b
// (t6), then rest in S2 with S6 remembered. Then random a and reset pulses
// against a behavioural model with one variable per region; every
// transition has to fire at least once.
module tb_fig1_ctrl;
  logic clk = 1'b0, rst = 1'b1, a_in = 1'b0;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic       d;
  logic [7:0] st;
  logic [6:1] fire, seen;

  fig1_ctrl dut (.clk(clk), .rst(rst), .a_in(a_in), .d(d), .st(st), .fire(fire));

  // model
  logic in_s3, s7, s5, fin;     // region S11: S2/S3, history S6/S7; region S12: S4/S5/final
  logic ev_a, ev_b1, ev_b2;
  logic [6:1] mfire;

  always_comb begin
    logic a, b;
    a = a_in | ev_a;
    b = ev_b1 | ev_b2;
    mfire    = '0;
    mfire[1] = !s5 && !fin && (a || 1'b1);
    mfire[2] = !in_s3 && b;
    mfire[3] = s5 && a;
    mfire[6] = in_s3 && b;
    mfire[4] = in_s3 && !s7 && a && !b;
    mfire[5] = in_s3 && s7 && !b;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_s3 <= 0; s7 <= 0; s5 <= 0; fin <= 0; ev_a <= 0; ev_b1 <= 0; ev_b2 <= 0;
    end else begin
      ev_a  <= mfire[2];
      ev_b1 <= mfire[5];
      ev_b2 <= mfire[1];
      if (mfire[2]) in_s3 <= 1;
      if (mfire[6]) in_s3 <= 0;
      if (mfire[4]) s7 <= 1;
      if (mfire[5]) s7 <= 0;
      if (mfire[1]) s5 <= 1;
      if (mfire[3]) begin s5 <= 0; fin <= 1; end
    end
  end

  function automatic logic [7:0] mst();
    // S1..S7 at bits 0..6, final at 7; history flip-flops S6/S7 stay set
    return {fin, s7, !s7, s5, !s5 && !fin, in_s3, !in_s3, 1'b1};
  endfunction

  task automatic cmp();
    checks += 3;
    if (st !== mst()) begin failures++; if (failures < 10) $display("t=%0t st %b exp %b", $time, st, mst()); end
    if (fire !== mfire) begin failures++; if (failures < 10) $display("t=%0t fire %b exp %b", $time, fire, mfire); end
    if (d !== (in_s3 && s7)) failures++;
  endtask

  // directed expectations with a = 0: {fire, d}
  localparam logic [6:0] DIR [7] = '{
    7'b000001_0,  // reset: S1,S2,S4,(S6): t1 on c
    7'b000010_0,  // S5 entered, b present: t2
    7'b001100_0,  // S3(S6) entered, a from exit of S2: t4 and t3
    7'b010000_1,  // S7 active, d: t5
    7'b100000_0,  // b from t5: t6
    7'b000000_0,  // S2 again: quiet
    7'b000000_0
  };

  initial begin
    seen = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 7; k++) begin
      checks++;
      if ({fire, d} !== DIR[k]) begin
        failures++;
        $display("step %0d: fire,d = %b expected %b", k, {fire, d}, DIR[k]);
      end
      cmp();
      seen |= fire;
      @(negedge clk);
    end
    for (int n = 0; n < 5000; n++) begin
      rst  = ($urandom_range(29) == 0);
      a_in = ($urandom_range(3) == 0);
      #1;
      if (!rst) begin cmp(); seen |= fire; end
      @(negedge clk);
    end
    checks++;
    if (seen != '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
