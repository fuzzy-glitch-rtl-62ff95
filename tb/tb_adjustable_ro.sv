// Testbench for adjustable_ro at its full 255-inverter size: the measured
// period must match 2 * (NAND delay + (length - 1) * inverter delay),
// within the jitter bound, for a
// set of lengths, even lengths round down, the divider must double the
// period, and a low enable must stop the ring.
`timescale 1ns / 1ps
module tb_adjustable_ro;
  localparam int unsigned D_PS = 1625;
  localparam int unsigned N_PS = 5500;
  localparam int unsigned J_PS = 40;

  int checks = 0, failures = 0;
  logic rst_n, en, div2, ro;
  logic [7:0] len;
  int rises;

  adjustable_ro #(.MAX_LEN(255), .INV_DELAY_PS(D_PS), .NAND_DELAY_PS(N_PS), .JITTER_PS(J_PS)) dut (
    .rst_ni(rst_n), .enable_i(en), .length_i(len), .div2_i(div2), .ro_o(ro)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400us;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  always @(posedge ro) rises++;

  // Average period over n periods, after letting the ring settle.
  task automatic measure(input int l, input bit d, input int n);
    realtime t0, t1, per, lo, hi;
    int eff;
    eff = (l % 2 == 1) ? l : l - 1;
    // Stop the ring while its length changes, so that it restarts with a
    // single edge travelling round.
    en = 1'b0;
    #2us;
    len = 8'(l); div2 = d;
    #2us;
    en = 1'b1;
    repeat (3) @(posedge ro);
    t0 = $realtime;
    repeat (n) @(posedge ro);
    t1 = $realtime;
    per = (t1 - t0) / n;
    lo = 2.0 * (N_PS + (eff - 1) * D_PS) * 1ps * (d ? 2 : 1);
    hi = 2.0 * (N_PS + J_PS + (eff - 1) * (D_PS + J_PS)) * 1ps * (d ? 2 : 1);
    $display("length %0d div2 %0d: period %0.3f ns (%0.1f MHz), expected %0.3f..%0.3f",
             l, d, per, 1000.0 / per, lo, hi);
    check(per >= lo - 0.001 && per <= hi + 0.001, $sformatf("period for length %0d", l));
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b1; div2 = 1'b0; len = 8'd3; rises = 0;
    #20;
    rises = 0;
    #200;
    check(rises == 0, "no oscillation during reset");
    rst_n = 1'b1;
    measure(3, 0, 20);
    measure(5, 0, 20);
    measure(7, 0, 20);
    measure(31, 0, 10);
    measure(6, 0, 10);
    measure(101, 0, 5);
    measure(255, 0, 5);
    measure(3, 1, 20);
    measure(5, 1, 20);
    // Disable: the ring must stop.
    en = 1'b0;
    #100;
    rises = 0;
    #500;
    check(rises == 0, "ring stops when disabled");
    en = 1'b1;
    #500;
    check(rises > 0, "ring restarts when enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
