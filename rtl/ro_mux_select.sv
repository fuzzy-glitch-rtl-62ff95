// MUX Selection Control of the adjustable ring oscillator.
//
// Turns the configured chain length into a one-hot select vector: bit k is
// set when the signal must turn back at stage k, which gives a ring of
// 3 + 2*k inverters (the enable NAND counts as one). The one-hot coding is
// the document's; the handling of invalid lengths is this design's choice:
// an even length is rounded down to the odd length below it, and a length
// below 3 selects the shortest ring.
//
// Interface: length_i (8 bits, odd 3..255) in, sel_o (N_STAGES bits) out.
// Timing: purely combinational. In the ring the select is changed while the
// oscillator runs; the ring may produce one irregular period at the change.
module ro_mux_select #(
  parameter int unsigned N_STAGES = (fg_pkg::MaxRoLen - 1) / 2
) (
  input  logic [fg_pkg::RoLenW-1:0] length_i,
  output logic [N_STAGES-1:0]       sel_o
);

  localparam int unsigned IdxW = (N_STAGES > 1) ? $clog2(N_STAGES) : 1;

  logic [fg_pkg::RoLenW-1:0] excess;  // length - 3
  logic [IdxW-1:0]           stage;   // (length - 3) / 2, clamped

  always_comb begin
    excess = length_i - fg_pkg::RoLenW'(fg_pkg::MinRoLen);
    // Halving rounds an even length down to the odd one below it.
    if (length_i < fg_pkg::RoLenW'(fg_pkg::MinRoLen))       stage = '0;
    else if (int'(excess[fg_pkg::RoLenW-1:1]) > int'(N_STAGES) - 1) stage = IdxW'(N_STAGES - 1);
    else                                                    stage = IdxW'(excess[fg_pkg::RoLenW-1:1]);
    sel_o = '0;
    sel_o[stage] = 1'b1;
  end

endmodule
