// reactor_stim: random but plant-like input stimulus for the reactor
// controller, for testbenches only. Every input keeps its level and flips
// with a small probability each clock (on the falling edge, away from the
// sampling edge): sensor and timer levels 1/8 per cycle, the desk buttons
// REP and AUT 1/6 on / 1/2 off, the break-down AU 1/AU_RATE on / 1/3 off.
module reactor_stim
  import reactor_pkg::*;
#(
  parameter int unsigned AU_RATE = 40
) (
  input  logic        clk,
  input  logic        rst,
  output reactor_in_t x
);

  function automatic logic flip(input logic v, input int unsigned p_on, input int unsigned p_off);
    if (!v) return ($urandom_range(p_on - 1) == 0);
    else    return ($urandom_range(p_off - 1) != 0);
  endfunction

  always_ff @(negedge clk) begin
    if (rst) x <= '0;
    else begin
      x.AU   <= flip(x.AU, AU_RATE, 3);
      x.REP  <= flip(x.REP, 6, 2);
      x.AUT  <= flip(x.AUT, 6, 2);
      x.B1   <= flip(x.B1, 8, 8);
      x.B2   <= flip(x.B2, 8, 8);
      x.NLIM <= flip(x.NLIM, 16, 4);
      x.NMAX <= flip(x.NMAX, 8, 8);
      x.NMIN <= flip(x.NMIN, 8, 8);
      x.FT1  <= flip(x.FT1, 8, 8);
      x.FT2  <= flip(x.FT2, 12, 8);
    end
  end

endmodule
