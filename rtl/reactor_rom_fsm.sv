// reactor_rom_fsm: memory-based implementation of the reactor controller.
//
// A register captures the M_IN inputs and the N_ST-bit present-state code on
// every rising edge; together they address the ROM, whose word gives the
// next-state code (fed back to the register) and the Y_OUT outputs.
// Because the ROM sits after the register, the outputs after an edge are
// those of the global state entered at that edge: cycle for cycle the same
// outputs as the logic-based controller.
//
// rst (synchronous, active high) loads input bits 0 and state code 0. The
// ROM maps that address to code 0 again (the reset configuration is stable
// under all-zero inputs), so the outputs right after reset are those of the
// reset state. This reset scheme is a choice of this design.
module reactor_rom_fsm
  import reactor_pkg::*;
#(
  parameter bit          SYNC_T6 = 1'b0,
  parameter int unsigned M_IN    = NX,
  parameter int unsigned N_ST    = 8,
  parameter int unsigned Y_OUT   = NY
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [M_IN-1:0]  x,
  output logic [Y_OUT-1:0] y,
  output logic [N_ST-1:0]  code   // global-state code (ROM output)
);

  logic [M_IN-1:0]       x_r;
  logic [N_ST-1:0]       c_r;
  logic [N_ST+Y_OUT-1:0] word;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_r <= '0;
      c_r <= '0;
    end else begin
      x_r <= x;
      c_r <= code;
    end
  end

  reactor_rom #(.SYNC_T6(SYNC_T6), .M_IN(M_IN), .N_ST(N_ST), .Y_OUT(Y_OUT)) u_rom (
    .addr({x_r, c_r}),
    .data(word)
  );

  assign code = word[N_ST+Y_OUT-1:Y_OUT];
  assign y    = word[Y_OUT-1:0];

endmodule
