// Behavioural model (not synthesizable as written): the enable NAND of a
// ring oscillator, with propagation delay and random jitter.
//
// The NAND is the ring's first inversion while en_i is 1; with en_i at 0
// its output is stuck at 1 and the ring stops. DELAY_PS stands for the NAND
// together with the routing that closes the ring, which on an FPGA is longer
// than the hop between neighbouring inverters. Its default of 5500 ps is
// fitted, together with the 1625 ps inverter delay, to the measured periods
// the document reports for rings of 5 to 31 inverters (about 24 ns at 5,
// about 110 ns at 31). As in ro_inv_cell, each input change reaches the
// output after DELAY_PS plus 0..JITTER_PS, and the output is first driven
// from the current inputs so that the ring starts from a defined state.
//
// Interface: en_i, a_i inputs, y_o = ~(en_i & a_i) delayed. A synthesis
// flow replaces this cell with a NAND gate (a LUT) that the tools must keep.
`timescale 1ns / 1ps
module ro_nand_cell #(
  parameter int unsigned DELAY_PS  = 5500,
  parameter int unsigned JITTER_PS = 40
) (
  input  logic en_i,
  input  logic a_i,
  output logic y_o
);

  int unsigned jit_ps;

  always begin
    jit_ps = (JITTER_PS == 0) ? 0 : $urandom_range(JITTER_PS, 0);
    y_o <= #((DELAY_PS + jit_ps) * 1ps) ~(en_i & a_i);
    @(en_i or a_i);
  end

endmodule
