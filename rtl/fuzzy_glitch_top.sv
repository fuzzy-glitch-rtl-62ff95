// Fuzzy clock glitch generator: top level.
//
// Two adjustable ring oscillators run freely at different frequencies. Their
// XOR is a fuzzy glitch signal, rich in high-frequency and random
// components, since both rings jitter and drift against each other. Normally
// the unmodified main clock (8 MHz for the reference target) is passed to
// clk_o; on a trigger, the glitch timer switches clk_o to the fuzzy signal
// for the programmed duration, then back to the main clock. Everything is set
// over a UART: the length (3..255, odd) of each ring, whether each ring's
// output is halved by its toggle flip-flop, each ring's enable, the glitch
// duration in 10 ns steps, and the trigger itself.
//
//   uart_rx -> cfg_regs -> adjustable_ro x2 -> glitch_mixer -> clk_o
//                      \-> glitch_timer ---------^ (glitch select)
//
// The block structure follows the document. The system clock rate (100 MHz,
// one cycle per 10 ns step), the UART format (8N1, 115200 baud), the command
// format and the trigger by UART command are this design's choices. The main
// clock comes in on main_clk_i; clk_o goes to the output pad, whose buffer
// and load are outside the logic. RO2's cell delays are slightly shorter than
// RO1's because, as measured in the document, two identical rings
// never run at exactly the same frequency; the delays only matter in
// simulation.
//
// Interface: clk_i, rst_ni (async, active low), uart_rx_i, main_clk_i,
// clk_o, glitch_active_o (the glitch select), ro1_o and ro2_o (ring outputs
// for measurement).
`timescale 1ns / 1ps
module fuzzy_glitch_top #(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned BAUD         = 115_200,
  parameter int unsigned MAX_LEN      = fg_pkg::MaxRoLen,
  parameter int unsigned DUR_W        = fg_pkg::DurW,
  parameter int unsigned RO1_DELAY_PS = 1625,
  parameter int unsigned RO2_DELAY_PS = 1600,
  parameter int unsigned RO1_NAND_PS  = 5500,
  parameter int unsigned RO2_NAND_PS  = 5400,
  parameter int unsigned JITTER_PS    = 40
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic uart_rx_i,
  input  logic main_clk_i,
  output logic clk_o,
  output logic glitch_active_o,
  output logic ro1_o,
  output logic ro2_o
);

  localparam int unsigned ClksPerBit = (CLK_HZ + BAUD / 2) / BAUD;

  logic            rx_valid;
  logic [7:0]      rx_data;
  fg_pkg::ro_cfg_t ro1_cfg, ro2_cfg;
  logic [DUR_W-1:0] duration;
  logic            trigger;

  uart_rx #(.CLKS_PER_BIT(ClksPerBit)) u_uart_rx (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .rx_i   (uart_rx_i),
    .valid_o(rx_valid),
    .data_o (rx_data)
  );

  cfg_regs #(.DUR_W(DUR_W)) u_cfg (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .valid_i   (rx_valid),
    .data_i    (rx_data),
    .ro1_o     (ro1_cfg),
    .ro2_o     (ro2_cfg),
    .duration_o(duration),
    .trigger_o (trigger)
  );

  adjustable_ro #(.MAX_LEN(MAX_LEN), .INV_DELAY_PS(RO1_DELAY_PS), .NAND_DELAY_PS(RO1_NAND_PS), .JITTER_PS(JITTER_PS)) u_ro1 (
    .rst_ni  (rst_ni),
    .enable_i(ro1_cfg.enable),
    .length_i(ro1_cfg.length),
    .div2_i  (ro1_cfg.div2),
    .ro_o    (ro1_o)
  );

  adjustable_ro #(.MAX_LEN(MAX_LEN), .INV_DELAY_PS(RO2_DELAY_PS), .NAND_DELAY_PS(RO2_NAND_PS), .JITTER_PS(JITTER_PS)) u_ro2 (
    .rst_ni  (rst_ni),
    .enable_i(ro2_cfg.enable),
    .length_i(ro2_cfg.length),
    .div2_i  (ro2_cfg.div2),
    .ro_o    (ro2_o)
  );

  glitch_timer #(.DUR_W(DUR_W)) u_timer (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .trigger_i   (trigger),
    .duration_i  (duration),
    .glitch_sel_o(glitch_active_o)
  );

  glitch_mixer u_mixer (
    .ro1_i       (ro1_o),
    .ro2_i       (ro2_o),
    .main_clk_i  (main_clk_i),
    .glitch_sel_i(glitch_active_o),
    .clk_o       (clk_o)
  );

endmodule
