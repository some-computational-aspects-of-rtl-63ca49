// tb_sc_state_ff: drives two state cells (reset value 0 and 1) with random
// activate/inactivate and reset, and compares the excitation value and the
// flip-flop output with a set/hold/clear model: activate sets, inactivate
// alone clears, neither holds.
module tb_sc_state_ff;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic [1:0] act, ina, delta, s, s_exp;

  sc_state_ff #(.INIT(1'b0)) u0 (.clk(clk), .rst(rst), .activate(act[0]), .inactivate(ina[0]),
                                 .delta(delta[0]), .s(s[0]));
  sc_state_ff #(.INIT(1'b1)) u1 (.clk(clk), .rst(rst), .activate(act[1]), .inactivate(ina[1]),
                                 .delta(delta[1]), .s(s[1]));

  initial begin
    act = '0; ina = '0;
    @(posedge clk); @(negedge clk);
    s_exp = 2'b10;
    for (int n = 0; n < 2000; n++) begin
      act = 2'($urandom); ina = 2'($urandom);
      rst = ($urandom_range(49) == 0);
      #1;
      for (int k = 0; k < 2; k++) begin
        logic d_exp;
        d_exp = act[k] ? 1'b1 : (ina[k] ? 1'b0 : s_exp[k]);
        checks += 2;
        if (s[k] !== s_exp[k]) failures++;
        if (delta[k] !== d_exp) failures++;
      end
      for (int k = 0; k < 2; k++)
        s_exp[k] = rst ? k[0] : (act[k] | (s_exp[k] & ~ina[k]));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
