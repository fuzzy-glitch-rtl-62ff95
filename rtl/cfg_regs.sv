// Configuration registers and command decoder.
//
// Bytes from the UART arrive as two-byte commands: a command code
// (fg_pkg::cmd_e) followed by a value. The registers hold, for each ring
// oscillator, its chain length, its enable and its divide-by-two select, and
// the glitch duration in 10 ns steps. The trigger command pulses trigger_o
// for one cycle when its value byte arrives. Unknown codes are ignored (their
// value byte is still consumed).
//
// The document states which settings exist (two independent lengths 3..255,
// independent output registers, the glitch duration in 10 ns steps) and that
// they are written over UART; the command format and the reset values are
// this design's. The reset values are the document's reference operating
// point: chains of 3 and 5 inverters, no dividers, a 100 ns glitch, both
// oscillators running.
//
// Interface: valid_i/data_i from the receiver; ro1_o, ro2_o, duration_o
// registered settings; trigger_o one-cycle pulse.
// Timing: a setting changes, or trigger_o pulses, in the cycle after the
// value byte's valid_i.
module cfg_regs #(
  parameter int unsigned DUR_W = fg_pkg::DurW
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   valid_i,
  input  logic [7:0]             data_i,
  output fg_pkg::ro_cfg_t        ro1_o,
  output fg_pkg::ro_cfg_t        ro2_o,
  output logic [DUR_W-1:0]       duration_o,
  output logic                   trigger_o
);

  import fg_pkg::*;

  logic [7:0] cmd_q;
  logic       have_cmd_q;  // first byte received, waiting for the value

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cmd_q      <= '0;
      have_cmd_q <= 1'b0;
      ro1_o      <= Ro1Reset;
      ro2_o      <= Ro2Reset;
      duration_o <= DUR_W'(DurReset);
      trigger_o  <= 1'b0;
    end else begin
      trigger_o <= 1'b0;
      if (valid_i) begin
        if (!have_cmd_q) begin
          cmd_q      <= data_i;
          have_cmd_q <= 1'b1;
        end else begin
          have_cmd_q <= 1'b0;
          case (cmd_q)
            CmdRo1Len:  ro1_o.length <= data_i;
            CmdRo2Len:  ro2_o.length <= data_i;
            CmdRoCtrl: begin
              ro1_o.enable <= data_i[0];
              ro2_o.enable <= data_i[1];
              ro1_o.div2   <= data_i[2];
              ro2_o.div2   <= data_i[3];
            end
            CmdDurLo:   duration_o[7:0] <= data_i;
            CmdDurHi:   if (DUR_W > 8) duration_o[DUR_W-1:8] <= data_i[DUR_W-9:0];
            CmdTrigger: trigger_o <= 1'b1;
            default: ;
          endcase
        end
      end
    end
  end

endmodule
