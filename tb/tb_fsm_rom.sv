// tb_fsm_rom: the register-and-ROM machine with the START/ACTION/STOP
// table, driven with random i and reset pulses, against a four-state model
// written in the testbench; checks outputs and state code every cycle,
// including the exact three-step response to i.
module tb_fsm_rom;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  logic [0:0] i;
  logic [4:0] y;
  logic [1:0] code, m;

  fsm_rom dut (.clk(clk), .rst(rst), .x(i), .y(y), .code(code));

  function automatic logic [4:0] y_of(input logic [1:0] s);  // {ext, d, entr, t2, t1}
    case (s)
      2'd1:    return 5'b01101;
      2'd2:    return 5'b10010;
      default: return 5'b00000;
    endcase
  endfunction

  int unsigned runs = 0;

  initial begin
    i = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    m = 0;
    for (int n = 0; n < 4000; n++) begin
      checks += 2;
      if (y !== y_of(m)) begin failures++; if (failures < 10) $display("t=%0t y %b exp %b", $time, y, y_of(m)); end
      if (code !== m) failures++;
      if (m == 2) runs++;
      rst = ($urandom_range(15) == 0);
      i   = ($urandom_range(3) == 0);
      @(negedge clk);
      if (rst) m = 0;
      else case (m)
        2'd0: m = i ? 2'd1 : 2'd0;
        2'd1: m = 2'd2;
        default: m = 2'd3;
      endcase
    end
    checks++;
    if (runs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
