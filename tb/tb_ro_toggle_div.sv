// Testbench for ro_toggle_div: the undivided output follows the ring node,
// the divided one has one rising edge for every two of the ring node.
`timescale 1ns / 1ps
module tb_ro_toggle_div;
  int checks = 0, failures = 0;
  logic rst_n, ring, div2, ro;
  int ring_rises, ro_rises;

  ro_toggle_div dut (.rst_ni(rst_n), .ring_i(ring), .div2_i(div2), .ro_o(ro));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  always @(posedge ring) ring_rises++;
  always @(posedge ro)   ro_rises++;

  initial begin
    ring = 1'b0; div2 = 1'b0; rst_n = 1'b0;
    ring_rises = 0; ro_rises = 0;
    #3 rst_n = 1'b1;
    // Undivided: output equals the ring node.
    for (int i = 0; i < 20; i++) begin
      #5 ring = ~ring;
      #0.1 check(ro == ring, "undivided output follows ring");
    end
    // Divided.
    div2 = 1'b1;
    rst_n = 1'b0; #1 rst_n = 1'b1;
    #0.1 check(ro == 1'b0, "reset clears the divider");
    ring_rises = 0; ro_rises = 0;
    for (int i = 0; i < 40; i++) #5 ring = ~ring;
    #1;
    check(ring_rises == 20, "20 ring periods applied");
    check(ro_rises == 10, "divided output has half the rising edges");
    $display("ring rises %0d, divided rises %0d", ring_rises, ro_rises);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
