// End-to-end testbench for fuzzy_glitch_top at its default parameters
// (100 MHz system clock, 115200 baud, 255-inverter rings).
//
// A UART model sends the configuration commands; an 8 MHz main clock is
// applied. The testbench checks, against its own expectations:
//  - the ring periods after reset (lengths 3 and 5), after a length change
//    and with the divide-by-two selected, from the cell delays;
//  - that a disabled ring stops;
//  - that clk_o equals the main clock outside glitches and the XOR of the
//    two rings during them (sampled every nanosecond);
//  - that each glitch lasts exactly the programmed number of 10 ns steps
//    (reset value, low byte and high byte of the duration) and holds many
//    more edges than the main clock would have had;
//  - that every mechanism (glitch insertion, length change, divider, enable,
//    duration change) was exercised at least once.
`timescale 1ns / 1ps
module tb_fuzzy_glitch_top;
  import fg_pkg::*;

  localparam int unsigned BitCycles = 868;  // 100 MHz / 115200, rounded
  localparam real D1 = 1.625, N1 = 5.5;     // RO 1 cell delays (ns)
  localparam real D2 = 1.600, N2 = 5.4;     // RO 2 cell delays (ns)
  localparam real J  = 0.040;               // jitter bound per cell (ns)

  int checks = 0, failures = 0;
  logic clk = 1'b0, main_clk = 1'b0, rst_n, rx;
  logic clk_o, glitch, ro1, ro2;

  int n_glitch = 0, n_len = 0, n_div = 0, n_disable = 0, n_dur = 0;
  int sample_errors = 0, glitch_edges = 0;
  realtime t_rise, t_fall;

  fuzzy_glitch_top dut (
    .clk_i(clk), .rst_ni(rst_n), .uart_rx_i(rx), .main_clk_i(main_clk),
    .clk_o(clk_o), .glitch_active_o(glitch), .ro1_o(ro1), .ro2_o(ro2)
  );

  always #5    clk      = ~clk;       // 100 MHz
  always #62.5 main_clk = ~main_clk;  // 8 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  // Output sampler: main clock outside glitches, XOR of the rings inside.
  initial begin
    #1000;
    forever begin
      #1;
      if (clk_o != (glitch ? (ro1 ^ ro2) : main_clk)) sample_errors++;
    end
  end

  // Glitch window and the edges on clk_o inside it.
  always @(posedge glitch) t_rise = $realtime;
  always @(negedge glitch) t_fall = $realtime;
  always @(clk_o) if (glitch) glitch_edges++;

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
    repeat (20) @(posedge clk);
  endtask

  task automatic measure(input bit which, input real lo, input real hi, input string what);
    realtime t0, t1, per;
    if (which == 0) begin
      repeat (3) @(posedge ro1);
      t0 = $realtime; repeat (16) @(posedge ro1); t1 = $realtime;
    end else begin
      repeat (3) @(posedge ro2);
      t0 = $realtime; repeat (16) @(posedge ro2); t1 = $realtime;
    end
    per = (t1 - t0) / 16.0;
    $display("%s: period %0.3f ns (%0.1f MHz), expected %0.3f..%0.3f", what, per, 1000.0 / per, lo, hi);
    check(per >= lo - 0.001 && per <= hi + 0.001, what);
  endtask

  function automatic real per_lo(input int len, input real d, input real n, input int div);
    return 2.0 * (n + (len - 1) * d) * div;
  endfunction
  function automatic real per_hi(input int len, input real d, input real n, input int div);
    return 2.0 * (n + J + (len - 1) * (d + J)) * div;
  endfunction

  task automatic glitch_shot(input int steps);
    int edges0;
    glitch_edges = 0;
    command(CmdTrigger, 8'h00);
    wait (glitch == 1'b0);
    #100;
    n_glitch++;
    $display("glitch of %0d steps: %0.1f ns, %0d edges on clk_o", steps, t_fall - t_rise, glitch_edges);
    check(t_fall - t_rise > steps * 10.0 - 0.5 && t_fall - t_rise < steps * 10.0 + 0.5,
          $sformatf("glitch lasts %0d x 10 ns", steps));
    // The main clock has at most 2 * steps * 10 / 125 + 2 edges in the window.
    edges0 = 2 * steps * 10 / 125 + 2;
    check(glitch_edges > 2 * edges0, "glitch holds many more edges than the main clock");
  endtask

  initial begin
    rst_n = 1'b0; rx = 1'b1;
    #200;
    rst_n = 1'b1;
    #2000;

    // Reset settings: lengths 3 and 5, both running, 100 ns glitch.
    measure(0, per_lo(3, D1, N1, 1), per_hi(3, D1, N1, 1), "RO 1 length 3");
    measure(1, per_lo(5, D2, N2, 1), per_hi(5, D2, N2, 1), "RO 2 length 5");
    check(!glitch && clk_o == main_clk, "main clock passed through");
    glitch_shot(10);

    // New duration, low byte: 200 ns.
    command(CmdDurLo, 8'd20);
    n_dur++;
    glitch_shot(20);

    // Length change on RO 1 with the rings stopped, then restarted.
    command(CmdRoCtrl, 8'h00);
    n_disable++;
    #500;
    begin
      int r1 = 0, r2 = 0;
      fork
        begin repeat (100) @(posedge ro1); r1 = 1; end
        begin repeat (100) @(posedge ro2); r2 = 1; end
        #1us;
      join_any
      disable fork;
      check(r1 == 0 && r2 == 0, "disabled rings stop");
    end
    command(CmdRo1Len, 8'd31);
    command(CmdRoCtrl, 8'h03);
    n_len++;
    measure(0, per_lo(31, D1, N1, 1), per_hi(31, D1, N1, 1), "RO 1 length 31");
    measure(1, per_lo(5, D2, N2, 1), per_hi(5, D2, N2, 1), "RO 2 length 5, unchanged");

    // Divider on RO 2.
    command(CmdRoCtrl, 8'h0b);
    n_div++;
    measure(1, per_lo(5, D2, N2, 2), per_hi(5, D2, N2, 2), "RO 2 length 5 halved");
    glitch_shot(20);

    // RO 2 off: the glitch is RO 1 alone.
    command(CmdRoCtrl, 8'h01);
    command(CmdRo1Len, 8'd3);
    command(CmdRoCtrl, 8'h00);
    command(CmdRoCtrl, 8'h01);
    n_len++;
    n_disable++;
    measure(0, per_lo(3, D1, N1, 1), per_hi(3, D1, N1, 1), "RO 1 length 3 again");
    glitch_shot(20);

    // Long glitch through the high byte: 0x0100 steps = 2.56 us.
    command(CmdRoCtrl, 8'h03);
    command(CmdDurHi, 8'h01);
    command(CmdDurLo, 8'h00);
    n_dur++;
    glitch_shot(256);

    check(sample_errors == 0, $sformatf("clk_o matched its source at every sample (%0d mismatches)", sample_errors));
    $display("mechanisms: glitches %0d, length changes %0d, divider %0d, disables %0d, duration changes %0d",
             n_glitch, n_len, n_div, n_disable, n_dur);
    check(n_glitch > 0, "glitch inserted");
    check(n_len > 0, "length changed");
    check(n_div > 0, "divider used");
    check(n_disable > 0, "ring disabled");
    check(n_dur > 0, "duration changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
