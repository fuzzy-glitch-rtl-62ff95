// Glitch mixer and output select.
//
// The two ring oscillator outputs are combined by an XOR gate. Since the
// XOR output toggles on every edge of either oscillator, and the two run at
// different, drifting frequencies, the result is a train of short, irregular
// pulses: the fuzzy glitch. A multiplexer puts either this signal
// (glitch_sel_i = 1) or the unmodified main clock (glitch_sel_i = 0) on the
// clock output. Both gates are as the document describes them.
//
// Interface: ro1_i, ro2_i, main_clk_i, glitch_sel_i in; clk_o out.
// Timing: purely combinational; glitch_sel_i switches without regard to the
// phase of the main clock.
module glitch_mixer (
  input  logic ro1_i,
  input  logic ro2_i,
  input  logic main_clk_i,
  input  logic glitch_sel_i,
  output logic clk_o
);

  logic fuzzy;

  assign fuzzy = ro1_i ^ ro2_i;
  assign clk_o = glitch_sel_i ? fuzzy : main_clk_i;

endmodule
