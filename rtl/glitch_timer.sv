// Glitch duration timer (the glitch insertion control).
//
// A start pulse on trigger_i raises glitch_sel_o for duration_i clock
// cycles. At the intended 100 MHz system clock one cycle is one 10 ns step,
// so durations from 10 ns up to 655 us can be set; the document gives the
// 10 ns step and a range "up to several microseconds". A duration of 0 is
// treated as 1, and a trigger that arrives while a glitch is running is
// ignored; both are this design's choices.
//
// Interface: clk_i, rst_ni (async, active low), trigger_i (one-cycle pulse),
// duration_i (cycles, sampled at the trigger), glitch_sel_o (registered).
// Timing: glitch_sel_o rises one cycle after trigger_i and stays high for
// exactly max(duration_i, 1) cycles.
module glitch_timer #(
  parameter int unsigned DUR_W = fg_pkg::DurW
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             trigger_i,
  input  logic [DUR_W-1:0] duration_i,
  output logic             glitch_sel_o
);

  logic [DUR_W-1:0] remain_q;  // cycles still to go after this one

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      glitch_sel_o <= 1'b0;
      remain_q     <= '0;
    end else if (!glitch_sel_o) begin
      if (trigger_i) begin
        glitch_sel_o <= 1'b1;
        remain_q     <= (duration_i == '0) ? '0 : duration_i - 1'b1;
      end
    end else if (remain_q == '0) begin
      glitch_sel_o <= 1'b0;
    end else begin
      remain_q <= remain_q - 1'b1;
    end
  end

endmodule
