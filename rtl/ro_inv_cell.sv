// Behavioural model (not synthesizable as written): one inverter of a ring
// oscillator, with propagation delay and random jitter.
//
// On an FPGA each ring inverter is a LUT configured as an inverter; its delay
// (LUT plus routing) sets the oscillation period and its thermal noise makes
// the period jitter. Both are physical and cannot be expressed as logic, so
// this cell models them: every change of a_i reaches y_o, inverted, after
// DELAY_PS plus a uniformly random 0..JITTER_PS picoseconds. The process
// first drives y_o from the current input, so the ring settles to a defined
// state at time zero even though the simulator starts with random values.
//
// DELAY_PS defaults to 1625 ps, which reproduces the document's average of
// 6.5 ns more period for every two inverters added. The jitter size is this
// model's own choice; the document gives none.
//
// Interface: a_i input, y_o = ~a_i delayed. A synthesis flow replaces this
// cell with an inverter that the tools must keep (not merged or optimised).
`timescale 1ns / 1ps
module ro_inv_cell #(
  parameter int unsigned DELAY_PS  = 1625,
  parameter int unsigned JITTER_PS = 40
) (
  input  logic a_i,
  output logic y_o
);

  int unsigned jit_ps;

  always begin
    jit_ps = (JITTER_PS == 0) ? 0 : $urandom_range(JITTER_PS, 0);
    y_o <= #((DELAY_PS + jit_ps) * 1ps) ~a_i;
    @(a_i);
  end

endmodule
