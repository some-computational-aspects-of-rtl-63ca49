// tb_reactor_rom_fsm: the ROM-based controller of both diagrams at their
// full ROM sizes against the reference model, every cycle, under random
// plant inputs. Also requires every transition t1..t19 to have been taken
// in the run, and that the outputs right after reset are those of Start.
module tb_reactor_rom_fsm;
  import reactor_pkg::*;
  localparam int unsigned CYCLES = 100000;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  reactor_in_t x;
  reactor_stim u_stim (.clk(clk), .rst(rst), .x(x));

  reactor_out_t y0, y1, yr0, yr1;
  logic [7:0] c0; logic [5:0] c1;
  logic [NT:1] tk0, tk1, seen0, seen1;

  reactor_rom_fsm #(.SYNC_T6(1'b0), .N_ST(8)) dut0 (.clk(clk), .rst(rst), .x(x), .y(y0), .code(c0));
  reactor_rom_fsm #(.SYNC_T6(1'b1), .N_ST(6)) dut1 (.clk(clk), .rst(rst), .x(x), .y(y1), .code(c1));
  reactor_ref #(.SYNC_T6(1'b0)) r0 (.clk(clk), .rst(rst), .x(x), .y(yr0), .taken(tk0));
  reactor_ref #(.SYNC_T6(1'b1)) r1 (.clk(clk), .rst(rst), .x(x), .y(yr1), .taken(tk1));

  initial begin
    seen0 = '0; seen1 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks += 2;
    if (y0 !== reactor_out_t'(0) || c0 !== 8'd0) failures++;
    if (y1 !== reactor_out_t'(0) || c1 !== 6'd0) failures++;
    rst <= 1'b0;
    repeat (CYCLES) begin
      @(negedge clk);
      checks += 2;
      if (y0 !== yr0) begin failures++; if (failures < 10) $display("orig t=%0t %h exp %h", $time, y0, yr0); end
      if (y1 !== yr1) begin failures++; if (failures < 10) $display("impr t=%0t %h exp %h", $time, y1, yr1); end
      seen0 |= tk0; seen1 |= tk1;
    end
    checks += 2;
    if (seen0 != '1) failures++;
    if (seen1 != '1) failures++;
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
