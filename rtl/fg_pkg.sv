// Shared types and constants of the fuzzy clock glitch generator.
//
// The generator mixes two free-running, length-adjustable ring oscillators
// (ROs) with an XOR gate and, for a programmed time, puts the result on the
// clock output in place of the unmodified main clock. This package holds what
// several modules share: the limits of the RO chain length, the width of the
// glitch duration counter, the per-RO settings record and the command codes
// of the UART configuration protocol.
//
// The length range 3..255 in steps of two and the 10 ns duration step follow
// the design description; the command codes, the 16-bit duration and the
// reset values are choices of this implementation.
package fg_pkg;

  // Longest and shortest inverter chain (NAND counted as an inverter).
  localparam int unsigned MaxRoLen = 255;
  localparam int unsigned MinRoLen = 3;
  localparam int unsigned RoLenW   = 8;

  // Glitch duration, counted in system clock cycles of 10 ns.
  localparam int unsigned DurW     = 16;

  // Settings of one ring oscillator.
  typedef struct packed {
    logic              enable;  // NAND enable: 0 stops the ring
    logic              div2;    // 1: output through the toggle flip-flop
    logic [RoLenW-1:0] length;  // odd chain length 3..255
  } ro_cfg_t;

  // First byte of a two-byte configuration command.
  typedef enum logic [7:0] {
    CmdRo1Len  = 8'h01,  // value: RO 1 length
    CmdRo2Len  = 8'h02,  // value: RO 2 length
    CmdRoCtrl  = 8'h03,  // value: {4'b0, div2_2, div2_1, en2, en1}
    CmdDurLo   = 8'h04,  // value: duration bits 7:0
    CmdDurHi   = 8'h05,  // value: duration bits 15:8
    CmdTrigger = 8'h06   // value ignored: start one glitch
  } cmd_e;

  // Reset settings: the operating point of the reference experiment
  // (chains of 3 and 5 inverters, 100 ns glitch, no dividers).
  localparam ro_cfg_t Ro1Reset = '{enable: 1'b1, div2: 1'b0, length: 8'd3};
  localparam ro_cfg_t Ro2Reset = '{enable: 1'b1, div2: 1'b0, length: 8'd5};
  localparam logic [DurW-1:0] DurReset = DurW'(10);

endpackage
