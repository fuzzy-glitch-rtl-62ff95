// Workload: the glitch duration sweep of the attack experiment. With the
// rings at lengths 3 and 5 and an 8 MHz main clock, the glitch duration is
// set to 20, 40, ... 800 ns (40 settings) and each setting is fired
// REPEATS times. The experiment repeated each setting 800 times; this test
// fires each one three times and runs the UART at 10 Mbaud instead of
// 115200 baud to keep the simulation short. For every shot the window must
// last exactly the programmed time, clk_o must carry the XOR of the rings
// inside it and the main clock outside it, and the shots of one setting
// must not all produce the same edge pattern, since the rings drift
// against each other.
`timescale 1ns / 1ps
module tb_duration_sweep;
  import fg_pkg::*;

  localparam int unsigned Baud      = 10_000_000;
  localparam int unsigned BitCycles = 100_000_000 / Baud;
  localparam int          Repeats   = 3;

  int checks = 0, failures = 0;
  logic clk = 1'b0, main_clk = 1'b0, rst_n, rx;
  logic clk_o, glitch, ro1, ro2;
  int sample_errors = 0;
  realtime t_rise, t_fall;
  // Signature of the edge pattern inside one window.
  longint unsigned sig;
  int edges;

  fuzzy_glitch_top #(.BAUD(Baud)) dut (
    .clk_i(clk), .rst_ni(rst_n), .uart_rx_i(rx), .main_clk_i(main_clk),
    .clk_o(clk_o), .glitch_active_o(glitch), .ro1_o(ro1), .ro2_o(ro2)
  );

  always #5    clk      = ~clk;
  always #62.5 main_clk = ~main_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    #1000;
    forever begin
      #1;
      if (clk_o != (glitch ? (ro1 ^ ro2) : main_clk)) sample_errors++;
    end
  end

  always @(posedge glitch) begin t_rise = $realtime; sig = 0; edges = 0; end
  always @(negedge glitch) t_fall = $realtime;
  always @(clk_o) if (glitch) begin
    edges++;
    sig = sig * 1000003 + longint'(($realtime - t_rise) * 1000.0);
  end

  task automatic uart_byte(input logic [7:0] b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = frame[i];
      repeat (BitCycles) @(posedge clk);
    end
  endtask

  task automatic command(input cmd_e c, input logic [7:0] v);
    uart_byte(c);
    uart_byte(v);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    longint unsigned sigs[Repeats];
    int total = 0, distinct_settings = 0;
    rst_n = 1'b0; rx = 1'b1;
    #200 rst_n = 1'b1;
    #1000;
    for (int s = 1; s <= 40; s++) begin
      int steps;
      bit differ;
      steps = 2 * s;  // 20 ns per setting = 2 steps of 10 ns
      differ = 1'b0;
      command(CmdDurLo, 8'(steps));
      for (int r = 0; r < Repeats; r++) begin
        // Let the rings drift for a random while between shots.
        #($urandom_range(3000, 500) * 1ns);
        command(CmdTrigger, 8'h00);
        wait (glitch == 1'b0);
        #50;
        total++;
        sigs[r] = sig;
        check(t_fall - t_rise > steps * 10.0 - 0.5 && t_fall - t_rise < steps * 10.0 + 0.5,
              $sformatf("window of %0d ns", steps * 10));
        check(edges > 0, "edges inside the window");
        if (r > 0 && sigs[r] != sigs[0]) differ = 1;
      end
      if (differ) distinct_settings++;
    end
    $display("%0d shots over 40 durations, %0d settings with differing glitches", total, distinct_settings);
    check(total == 40 * Repeats, "all shots fired");
    check(distinct_settings == 40, "repeated glitches differ at every setting");
    check(sample_errors == 0, $sformatf("clk_o matched its source (%0d mismatches)", sample_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
