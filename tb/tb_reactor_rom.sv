// tb_reactor_rom: uses the ROM of each diagram as a state machine built in
// the testbench (a register feeds {inputs, code} back to the address) and
// compares the outputs stored in the ROM with the reference model under
// random plant inputs. Also checks the memory geometry of eq. M =
// 2**(m+n) * (n+y): 6,029,312 bits for the original diagram with 8 code
// bits and 1,376,256 bits for the improved one with 6, that the number of
// global states found fits the code width, and that the reset address maps
// to code 0.
module tb_reactor_rom;
  import reactor_pkg::*;
  localparam int unsigned CYCLES = 50000;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int unsigned checks = 0, failures = 0;

  reactor_in_t x;
  reactor_stim u_stim (.clk(clk), .rst(rst), .x(x));

  logic [17:0] a0; logic [22:0] d0;
  logic [15:0] a1; logic [20:0] d1;
  reactor_out_t yr0, yr1;
  logic [NT:1] tk0, tk1;

  reactor_rom #(.SYNC_T6(1'b0), .N_ST(8)) dut0 (.addr(a0), .data(d0));
  reactor_rom #(.SYNC_T6(1'b1), .N_ST(6)) dut1 (.addr(a1), .data(d1));
  reactor_ref #(.SYNC_T6(1'b0)) r0 (.clk(clk), .rst(rst), .x(x), .y(yr0), .taken(tk0));
  reactor_ref #(.SYNC_T6(1'b1)) r1 (.clk(clk), .rst(rst), .x(x), .y(yr1), .taken(tk1));

  always_ff @(posedge clk) begin
    if (rst) begin a0 <= '0; a1 <= '0; end
    else begin a0 <= {x, d0[22:15]}; a1 <= {x, d1[20:15]}; end
  end

  initial begin
    #1;
    checks += 4;
    if (dut0.DEPTH * dut0.WIDTH != 6029312) failures++;
    if (dut1.DEPTH * dut1.WIDTH != 1376256) failures++;
    if (dut0.N_GLOBAL > 256 || dut0.NCODE != 256) failures++;
    if (dut1.N_GLOBAL > 64 || dut1.NCODE != 64) failures++;
    $display("global states: original %0d, improved %0d", dut0.N_GLOBAL, dut1.N_GLOBAL);
    repeat (3) @(posedge clk);
    checks += 2;
    if (d0[22:15] != 0) failures++;
    if (d1[20:15] != 0) failures++;
    rst <= 1'b0;
    repeat (CYCLES) begin
      @(negedge clk);
      checks += 2;
      if (d0[14:0] !== yr0) failures++;
      if (d1[14:0] !== yr1) failures++;
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
