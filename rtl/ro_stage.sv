// One sub-module of the adjustable ring oscillator: a forward inverter, a
// demultiplexer, a multiplexer and a return inverter.
//
// The ring runs forward along a chain of stages and comes back along a
// parallel return chain. Each stage either passes the signal on to the next
// stage (sel_i = 0) or turns it back into the return chain (sel_i = 1).
// Every stage the signal passes adds two inverters, which keeps the total
// number of inversions in the ring odd.
//
//   fwd_i -> inverter -> demux --0--> fwd_o
//                          |1
//                          v
//   ret_o <- inverter <- mux <--0-- ret_i
//
// The demultiplexer drives its unused output low, so the stages beyond the
// turning point see a constant and stay quiet; this follows the document,
// which uses the demultiplexers to shut down unused inverters. Structure and
// select sense follow the document's figure of the adjustable ring.
//
// Timing: combinational apart from the two inverter cells, each of which
// adds the delay of ro_inv_cell.
`timescale 1ns / 1ps
module ro_stage #(
  parameter int unsigned INV_DELAY_PS = 1625,
  parameter int unsigned JITTER_PS    = 40
) (
  input  logic sel_i,
  input  logic fwd_i,
  output logic fwd_o,
  input  logic ret_i,
  output logic ret_o
);

  logic fwd_inv;    // after the forward inverter
  logic turn_back;  // demux output 1 into mux input 1
  logic ret_mux;    // mux output, into the return inverter

  ro_inv_cell #(.DELAY_PS(INV_DELAY_PS), .JITTER_PS(JITTER_PS)) u_inv_fwd (
    .a_i(fwd_i), .y_o(fwd_inv)
  );

  // Demultiplexer: the unselected output is held low.
  assign fwd_o     = sel_i ? 1'b0 : fwd_inv;
  assign turn_back = sel_i ? fwd_inv : 1'b0;

  // Multiplexer.
  assign ret_mux   = sel_i ? turn_back : ret_i;

  ro_inv_cell #(.DELAY_PS(INV_DELAY_PS), .JITTER_PS(JITTER_PS)) u_inv_ret (
    .a_i(ret_mux), .y_o(ret_o)
  );

endmodule
