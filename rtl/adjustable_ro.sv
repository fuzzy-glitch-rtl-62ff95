// Adjustable ring oscillator.
//
// An enable NAND followed by a chain of N_STAGES ro_stage sub-modules. The
// signal runs forward through the stages up to the one whose select bit is
// set, turns back there and returns through the return inverters to the
// NAND's second input. With the turning point at stage k the ring holds
// 3 + 2*k inversions (the NAND counts as one), so any odd length from 3 to
// MAX_LEN can be set while the ring runs. ro_mux_select produces the one-hot
// select from length_i. The end of the last stage is closed on itself, so
// even an all-zero select would still form an odd ring of MAX_LEN.
//
// With enable_i = 0 the NAND output is stuck at 1 and the ring stops; with
// enable_i = 1 the NAND acts as the third inverter and the ring oscillates.
// Reset also holds the ring stopped (this design's choice), so that it
// starts from a settled state with a single edge travelling round.
//
// The length may be changed while the ring runs, as the document intends.
// The stages brought into or out of the ring then hold a settled pattern
// that can leave more than one edge travelling round, i.e. the ring runs on
// an odd multiple of its fundamental frequency. For a clean fundamental,
// change the length with the ring disabled, then enable it.
// ro_toggle_div optionally halves the output frequency.
//
// The structure (NAND enable, inverter pairs with demultiplexers and
// multiplexers, one-hot select, optional toggle flip-flop) follows the
// document. The ring is an intended combinational loop: lint tools report it
// as such, and synthesis needs the inverters kept (keep / dont_touch
// attributes) and the loop accepted. In simulation the period comes from the
// delays of the cell models: 2 * (NAND_DELAY_PS + (length - 1) * INV_DELAY_PS)
// plus jitter, about 24 ns at length 5 and 6.5 ns more for every two
// inverters, as the document measured. The multiplexers have no delay.
//
// Interface: rst_ni (stops the ring, clears the divider), enable_i, length_i (odd 3..255),
// div2_i, ro_o. No clock: the ring is free running.
`timescale 1ns / 1ps
module adjustable_ro #(
  parameter int unsigned MAX_LEN      = fg_pkg::MaxRoLen,
  parameter int unsigned INV_DELAY_PS  = 1625,
  parameter int unsigned NAND_DELAY_PS = 5500,
  parameter int unsigned JITTER_PS     = 40
) (
  input  logic                      rst_ni,
  input  logic                      enable_i,
  input  logic [fg_pkg::RoLenW-1:0] length_i,
  input  logic                      div2_i,
  output logic                      ro_o
);

  localparam int unsigned NStages = (MAX_LEN - 1) / 2;

  logic [NStages-1:0] sel;
  logic [NStages:0]   fwd;  // fwd[k]: into stage k
  logic [NStages:0]   ret;  // ret[k]: out of stage k, ret[0] feeds the NAND

  ro_mux_select #(.N_STAGES(NStages)) u_sel (
    .length_i(length_i),
    .sel_o   (sel)
  );

  // Enable NAND: the ring's first inversion.
  ro_nand_cell #(.DELAY_PS(NAND_DELAY_PS), .JITTER_PS(JITTER_PS)) u_nand (
    .en_i(enable_i & rst_ni),
    .a_i (ret[0]),
    .y_o (fwd[0])
  );

  for (genvar k = 0; k < NStages; k++) begin : g_stage
    ro_stage #(.INV_DELAY_PS(INV_DELAY_PS), .JITTER_PS(JITTER_PS)) u_stage (
      .sel_i(sel[k]),
      .fwd_i(fwd[k]),
      .fwd_o(fwd[k+1]),
      .ret_i(ret[k+1]),
      .ret_o(ret[k])
    );
  end

  // Close the far end of the chain.
  assign ret[NStages] = fwd[NStages];

  ro_toggle_div u_div (
    .rst_ni(rst_ni),
    .ring_i(ret[0]),
    .div2_i(div2_i),
    .ro_o  (ro_o)
  );

endmodule
