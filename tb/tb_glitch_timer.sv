// Testbench for glitch_timer: the select must rise one cycle after the
// trigger and stay high for exactly the programmed number of 10 ns cycles
// (0 counts as 1); triggers during a glitch are ignored.
`timescale 1ns / 1ps
module tb_glitch_timer;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n, trig, sel;
  logic [15:0] dur;
  int high_cycles, delay_cycles;

  glitch_timer #(.DUR_W(16)) dut (
    .clk_i(clk), .rst_ni(rst_n), .trigger_i(trig), .duration_i(dur), .glitch_sel_o(sel)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  task automatic shot(input int d, input bit retrigger);
    realtime t_rise, t_fall;
    dur = 16'(d);
    @(negedge clk) trig = 1'b1;
    @(negedge clk) trig = 1'b0;
    check(sel == 1'b1, "select high one cycle after trigger");
    t_rise = $realtime - 5ns;
    if (retrigger) begin
      dur = 16'd1000;
      @(negedge clk) trig = 1'b1;
      @(negedge clk) trig = 1'b0;
    end
    high_cycles = 0;
    while (sel) begin @(negedge clk); end
    t_fall = $realtime - 5ns;
    high_cycles = int'((t_fall - t_rise) / 10ns);
    check(high_cycles == (d == 0 ? 1 : d), $sformatf("duration %0d gives %0d cycles", d, high_cycles));
    repeat (3) @(negedge clk);
    check(sel == 1'b0, "select stays low afterwards");
  endtask

  initial begin
    rst_n = 1'b0; trig = 1'b0; dur = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(sel == 1'b0, "select low after reset");
    shot(1, 0);
    shot(2, 0);
    shot(10, 0);
    shot(0, 0);
    shot(20, 1);
    shot(80, 0);
    shot(1234, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
