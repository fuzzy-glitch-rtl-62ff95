// Optional divide-by-two at the ring oscillator output.
//
// A toggle flip-flop is clocked by the ring node and a multiplexer chooses
// between the ring node itself (div2_i = 0) and the flip-flop output
// (div2_i = 1), which runs at half the ring frequency. The document prefers
// this register to doubling the chain length, since it costs almost no
// logic. The asynchronous active-low reset is this design's addition, so the
// divided output starts from a known level.
//
// Interface: ring_i (ring node), div2_i (select), ro_o (RO output).
// Timing: ro_o follows ring_i combinationally when div2_i = 0; with
// div2_i = 1 it toggles on every rising edge of ring_i.
module ro_toggle_div (
  input  logic rst_ni,
  input  logic ring_i,
  input  logic div2_i,
  output logic ro_o
);

  logic half_q;

  always_ff @(posedge ring_i or negedge rst_ni) begin
    if (!rst_ni) half_q <= 1'b0;
    else         half_q <= ~half_q;
  end

  assign ro_o = div2_i ? half_q : ring_i;

endmodule
