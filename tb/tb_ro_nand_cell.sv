// Testbench for ro_nand_cell: the output must be the NAND of the inputs,
// delayed by the nominal delay plus at most the jitter bound, and stuck at 1
// while the enable is low.
`timescale 1ns / 1ps
module tb_ro_nand_cell;
  localparam int unsigned D_PS = 5500;
  localparam int unsigned J_PS = 40;

  int checks = 0, failures = 0;
  logic en, a, y;
  realtime t0;

  ro_nand_cell #(.DELAY_PS(D_PS), .JITTER_PS(J_PS)) dut (.en_i(en), .a_i(a), .y_o(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    en = 1'b0; a = 1'b0;
    #20;
    // Enable low: output stays 1 whatever a does.
    for (int i = 0; i < 10; i++) begin
      a = ~a;
      #10 check(y == 1'b1, "output stuck at 1 while disabled");
    end
    en = 1'b1;
    for (int i = 0; i < 20; i++) begin
      a = ~a;
      t0 = $realtime;
      #((D_PS - 10) * 1ps);
      check(y == ~(en & ~a), "output unchanged before the delay");
      #((J_PS + 20) * 1ps);
      check(y == ~(en & a), "output is the NAND after the delay");
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
