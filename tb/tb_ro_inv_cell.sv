// Testbench for ro_inv_cell: every input change must reach the output,
// inverted, after the nominal delay plus at most the jitter bound.
`timescale 1ns / 1ps
module tb_ro_inv_cell;
  localparam int unsigned D_PS = 1625;
  localparam int unsigned J_PS = 40;

  int checks = 0, failures = 0;
  logic a, y;
  realtime t0, t1;
  realtime dmin = 1.0e9, dmax = 0.0;

  ro_inv_cell #(.DELAY_PS(D_PS), .JITTER_PS(J_PS)) dut (.a_i(a), .y_o(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    a = 1'b0;
    #10;
    check(y == 1'b1, "settled output after start");
    for (int i = 0; i < 50; i++) begin
      a = ~a;
      t0 = $realtime;
      @(y);
      t1 = $realtime;
      check(y == ~a, "output is the inverse of the input");
      check((t1 - t0) >= D_PS * 1ps && (t1 - t0) <= (D_PS + J_PS) * 1ps, "delay within bounds");
      if (t1 - t0 < dmin) dmin = t1 - t0;
      if (t1 - t0 > dmax) dmax = t1 - t0;
      #3;
    end
    check(dmax > dmin, "delay shows jitter");
    $display("delay range %0.3f .. %0.3f ns", dmin, dmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
