# Fuzzy clock glitch generator

A clock glitch attack feeds a device a clock with a short, out-of-spec pulse so that some register
misses its timing and the processor computes or branches wrongly. The usual glitch generators build
one precisely timed pulse from the FPGA's clock managers, and then sweep pulse position, width and
shape in search of a setting that works. This design takes another route. For a programmed time it
replaces the target's clock with a **fuzzy glitch**: the XOR of two free-running ring oscillators
(ROs) of different frequency. The XOR toggles on every edge of either ring. So while it is on the
clock pin, the target sees a dense, irregular burst of short pulses. Because the rings jitter and
drift against each other, the burst is different every time. Only one setting is left to search, the
duration of the burst. Everything is built from plain logic (inverters, multiplexers, a counter, a
UART), with no clock manager or PLL.

The reference operating point is rings of 3 and 5 inverters, a 100 ns glitch, and an 8 MHz main
clock driving an ARM Cortex-M0 microcontroller directly. The source measured the rings near 82 and
42 MHz at that point. For its microcontroller target it reports the most successful durations as
180 to 310 ns.

```
 uart_rx_i ──► uart_rx ──► cfg_regs ──┬─► adjustable_ro (RO 1) ──┐
                                      ├─► adjustable_ro (RO 2) ──┤ XOR ┐
                                      └─► glitch_timer ──────────┼─────┼─► glitch_mixer ──► clk_o
 main_clk_i ─────────────────────────────────────────────────────┘     │      ▲
                                                                        └──────┘ glitch select
```

## The adjustable ring oscillator

A ring oscillator is an odd number of inverters closed into a loop. It has no stable state, so it
oscillates with a period of twice the delay round the loop. Its frequency can only be set by the
number of inverters, and this block lets that number change at run time, from 3 to 255 in steps of
two (`rtl/adjustable_ro.sv`).

```
 enable ─┐
         NAND ─► inv ─► demux0 ─0─► inv ─► demux1 ─0─► ... ─► demux126 ─0─┐
 ┌──────►  ▲             │1                 │1                  │1        │ (chain end
 │         │             ▼                  ▼                   ▼         │  closed on
 │         └──── inv ◄─ mux0 ◄─0── inv ◄─ mux1 ◄─0── ... ◄──── mux126 ◄──┘  itself)
 │                                                                  
 └─ ring node ──► toggle flip-flop ─┐
          └─────────────────────────┴─► mux (div2) ──► ro_o
```

- **Stages.** The ring is a forward chain and a return chain of 127 stages (`rtl/ro_stage.sv`). Each
  stage has one inverter on each chain, a demultiplexer on the forward chain and a multiplexer on
  the return chain. With its select at 0 a stage passes the signal on to the next stage. With its
  select at 1 it turns the signal back into the return chain. Stage 0 and the NAND make up the
  shortest ring of three inversions. Every further stage the signal passes adds two inverters, so the
  ring stays odd. Turning back at stage k gives a length of 3 + 2k.
- **Selection.** `rtl/ro_mux_select.sv` makes the one-hot select from the 8-bit length. Stage
  (length − 3)/2 gets the 1. An even length is rounded down to the odd one below it, and a length
  below 3 gives 3.
- **Quiet unused stages.** A demultiplexer drives its unused output low. The stages beyond the
  turning point therefore see a constant and do not toggle. The end of the last stage is closed on
  itself, so even an all-zero select would form an odd ring of 255.
- **Enable.** The ring's first inversion is a NAND with the enable. At 0 its output is stuck at 1 and
  the ring stops. At 1 it acts as an inverter and the ring runs. Reset holds the ring stopped as well.
- **Divider.** A toggle flip-flop, clocked by the ring node that feeds the NAND, halves the
  frequency. `div2` chooses it or the ring node (`rtl/ro_toggle_div.sv`). This costs one register,
  where halving the frequency through the chain would take twice as many inverters.

### What is a model and what is logic

The inverters and the NAND are the only parts whose timing matters, and their delay is physical. In
this RTL they are behavioural cells (`rtl/ro_inv_cell.sv`, `rtl/ro_nand_cell.sv`). Each change of an
input reaches the output after a fixed delay plus a random jitter of 0 to 40 ps. The stage
structure, the multiplexers, the select decoder, the divider and everything outside the rings are
ordinary synthesizable logic.

For an FPGA build, replace the two cells with a LUT inverter and a LUT NAND marked keep / dont_touch,
and allow the combinational loop (on Xilinx tools, a loop-allowed constraint on the ring nets).
Place each ring compactly. The real frequencies then depend on device, placement and routing, and
are measured rather than set.

Simulated period: `2 × (NAND_DELAY_PS + (length − 1) × INV_DELAY_PS)`, plus jitter. The defaults are
1625 ps per inverter and 5500 ps for the NAND with the routing that closes the ring. They give
6.5 ns more period per two inverters and about 24 ns at length 5, as measured on the source's
Spartan-3E. RO 2 uses 1600 / 5400 ps, so it runs slightly faster than RO 1, as its measurements
showed. Two rings that matched exactly would produce no useful glitch.

| length | RO 1 (sim) | RO 2 (sim) |
|-------:|-----------:|-----------:|
| 3 | 17.6 ns, 56.8 MHz | 17.3 ns, 57.7 MHz |
| 5 | 24.2 ns, 41.3 MHz | 23.8 ns, 42.0 MHz |
| 31 | 109.8 ns, 9.1 MHz | 108.0 ns, 9.3 MHz |
| 255 | ≈ 847 ns, 1.2 MHz | ≈ 833 ns |

The model does not reproduce the measured length-3 frequency (about 82 MHz for RO 1 and 96 MHz
for RO 2). The source puts that difference down to the irregular first group of inverters, and a
single linear delay model cannot show it.

### Changing the length while the ring runs

The length can be changed at any time; the structure exists so that it can be changed without
re-synthesis. When stages join or leave a running ring, though, they carry a settled pattern of
levels. That pattern can leave three or more edges travelling round the loop, and the ring then runs
at an odd multiple of its fundamental frequency. In simulation such a mode persists; in silicon it
may or may not die out. For a known frequency, disable the ring, set the length, and enable it
again. The testbenches do this.

## Glitch insertion

`rtl/glitch_timer.sv` counts the glitch duration in cycles of the 100 MHz system clock, one cycle per
10 ns step. A trigger raises the glitch select one cycle later and holds it for exactly
`max(duration, 1)` cycles. A trigger that arrives while a glitch is running is ignored. The 16-bit
count reaches 655.35 µs.

`rtl/glitch_mixer.sv` is the XOR of the two rings and a multiplexer. It passes the XOR while the
select is high and the main clock otherwise. The switch is not aligned to the main clock. The glitch
therefore starts wherever the main clock happens to be, which adds to the randomness but can also
cut a main-clock phase short.

The main clock enters on `main_clk_i`. `clk_o` goes to an output pad. The pad driver and the
capacitance of the wiring limit the bandwidth, so at the target the burst arrives as a distorted,
partly analog waveform that does not reach full swing. That part of the behaviour lies outside the
logic and is not modelled.

## Configuration interface

A UART (8N1, 115200 baud at 100 MHz, `rtl/uart_rx.sv`) receives two-byte commands: a code followed
by a value (`rtl/cfg_regs.sv`, codes in `rtl/fg_pkg.sv`).

| code | value | effect |
|-----:|-------|--------|
| 0x01 | length | RO 1 chain length (odd, 3..255) |
| 0x02 | length | RO 2 chain length |
| 0x03 | `{4'b0, div2_2, div2_1, en2, en1}` | enables and divider selects of both rings |
| 0x04 | byte | glitch duration, bits 7:0 (10 ns steps) |
| 0x05 | byte | glitch duration, bits 15:8 |
| 0x06 | any | fire one glitch |

Unknown codes are ignored; their value byte is still consumed. Reset values: lengths 3 and 5, both
rings enabled, no dividers, duration 10 (100 ns). The receiver only accepts a start bit on a
falling edge and drops frames with a low stop bit. The command bytes carry no framing. If a byte is
lost, the next command is read out of step, and the host should re-send its settings.

Example, a 250 ns glitch from rings of 7 and 9 inverters:
`03 00` (stop), `01 07`, `02 09`, `03 03` (start), `04 19`, `06 00` (fire).

## Top level

`rtl/fuzzy_glitch_top.sv` has the ports `clk_i` (100 MHz), `rst_ni` (asynchronous, active low),
`uart_rx_i`, `main_clk_i`, `clk_o`, `glitch_active_o` (the glitch select), and `ro1_o` / `ro2_o`
(the ring outputs, for measurement). Its parameters are `CLK_HZ`, `BAUD`, `MAX_LEN` (255), `DUR_W`
(16), the cell delays of each ring, and `JITTER_PS`.

## Simulation

All testbenches check themselves and end by printing `TB_RESULT checks=N failures=M`. Each has a
watchdog. The ring cells use timing controls, so `--timing` is required:

```
verilator --binary --timing --assert -y rtl -y tb rtl/fg_pkg.sv tb/tb_fuzzy_glitch_top.sv \
          --top-module tb_fuzzy_glitch_top
./obj_dir/Vtb_fuzzy_glitch_top
```

Lint warnings for the delay cells (unknown delay values) are expected; add `-Wno-fatal` if your
Verilator treats them as errors.

| testbench | what it shows |
|---|---|
| `tb_fuzzy_glitch_top` | the whole design at default parameters over the real 115200-baud UART. It covers the reset settings, glitches of 100 ns, 200 ns and 2.56 µs, a length change, the divider, disabling a ring, and `clk_o` sampled every nanosecond against its source. It counts each mechanism. About 2 ms of simulated time. |
| `tb_ro_length_sweep` | both rings over every odd length from 3 to 31. It prints a period table and checks the 6.5 ns average step and that RO 2 is faster. |
| `tb_duration_sweep` | the attack sweep: 40 durations from 20 to 800 ns, three shots each. The UART runs at 10 Mbaud to save time. Every window is exact, and repeated shots of one setting give different edge patterns. |
| `tb_adjustable_ro` | the full 255-inverter ring. Periods at lengths 3 to 255, even-length rounding, the divider, enable and reset. |
| `tb_ro_stage`, `tb_ro_mux_select`, `tb_ro_toggle_div`, `tb_ro_inv_cell`, `tb_ro_nand_cell` | the ring's parts: paths and delays, all 256 length codes, division, cell delay and jitter bounds. |
| `tb_glitch_timer`, `tb_glitch_mixer`, `tb_uart_rx`, `tb_cfg_regs` | window length to the cycle (including retrigger and zero), the full truth table, random bytes and a framing error, and 200 random commands against a reference model. |

## Where this design departs from, or adds to, its source

Taken from the source: the overall structure (two adjustable ROs, XOR, glitch-select multiplexer in
front of the output). Also from the source are the ring's construction: NAND enable, inverter
pairs with demultiplexers and multiplexers, one-hot selection, and an optional toggle flip-flop. So
are the 3..255 length range, the 10 ns duration step, configuration over UART, and the reference
settings used as reset values.

Choices of this design, where the source says nothing:

- the 100 MHz system clock;
- the UART format and baud rate, the command set, and firing the glitch by a UART command;
- the 16-bit duration;
- the treatment of a duration of 0, of retriggers, of even or too-short lengths;
- the reset behaviour, including rings held stopped during reset;
- the drive level of unused demultiplexer outputs;
- the size of the jitter;
- the delay of the NAND cell, fitted to the measured periods.

Not provided as logic: the main clock source (an input here), the output pad with its load, and the
target microcontroller with its firmware.
