// fsm_rom: Moore finite state machine built from a register and a ROM.
//
// The register captures the M_IN inputs and the N_ST-bit present-state code
// at every rising edge; together ({inputs, code}) they address a ROM of
// 2**(M_IN+N_ST) words of N_ST+Y_OUT bits. A word holds the next-state code
// (fed back to the register) and the outputs of that next state, so the
// outputs after an edge belong to the state entered at that edge. The ROM
// contents are the parameter ROM, word a at bits [a*(N_ST+Y_OUT) +: N_ST+Y_OUT].
//
// The defaults hold the four-state machine equivalent to the START ->
// ACTION -> STOP example (input i; outputs {ext, d, entr, t2, t1}; codes
// 0 START, 1 ACTION with entr, d, t1, 2 STOP with ext, t2, 3 STOP). Its
// words, at address {i, code}: code 0 goes to 1 with outputs 01101 if i,
// else stays at 0 with 00000; code 1 goes to 2 with 10010; codes 2 and 3
// go to 3 with 00000 (7-bit words 00 52 60 60 2d 52 60 60 for a = 0..7).
// rst (synchronous, active high) clears the register; the ROM must map
// address 0 to code 0 for the reset state to be stable (this design's
// reset scheme).
module fsm_rom #(
  parameter int unsigned M_IN     = 1,
  parameter int unsigned N_ST     = 2,
  parameter int unsigned Y_OUT    = 5,
  parameter logic [(2**(M_IN+N_ST))*(N_ST+Y_OUT)-1:0] ROM = {
    7'h60, 7'h60, 7'h52, 7'h2d, 7'h60, 7'h60, 7'h52, 7'h00
  }
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [M_IN-1:0]  x,
  output logic [Y_OUT-1:0] y,
  output logic [N_ST-1:0]  code
);

  localparam int unsigned WIDTH = N_ST + Y_OUT;

  logic [M_IN-1:0]       x_r;
  logic [N_ST-1:0]       c_r;
  logic [WIDTH-1:0]      word;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_r <= '0;
      c_r <= '0;
    end else begin
      x_r <= x;
      c_r <= code;
    end
  end

  assign word = ROM[WIDTH*{x_r, c_r} +: WIDTH];
  assign code = word[N_ST+Y_OUT-1:Y_OUT];
  assign y    = word[Y_OUT-1:0];

endmodule
