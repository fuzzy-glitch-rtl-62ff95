// Testbench for ro_stage: with select 0 both inverters act on their own
// path; with select 1 the forward input comes back, inverted twice, on the
// return output, and the forward output is held low.
`timescale 1ns / 1ps
module tb_ro_stage;
  localparam int unsigned D_PS = 1000;

  int checks = 0, failures = 0;
  logic sel, fi, fo, ri, ro;

  ro_stage #(.INV_DELAY_PS(D_PS), .JITTER_PS(0)) dut (
    .sel_i(sel), .fwd_i(fi), .fwd_o(fo), .ret_i(ri), .ret_o(ro)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {sel, fi, ri} = 3'($urandom);
      #5;
      if (!sel) begin
        check(fo == ~fi, "pass: forward output is inverted input");
        check(ro == ~ri, "pass: return output is inverted return input");
      end else begin
        check(fo == 1'b0, "turn: unused forward output held low");
        check(ro == fi,   "turn: two inversions back to the return output");
      end
    end
    // Delay through the turn-back path is two cells.
    sel = 1'b1; fi = 1'b0; #5;
    fi = 1'b1;
    #1.9;  check(ro == 1'b0, "turn: not through before two cell delays");
    #0.2;  check(ro == 1'b1, "turn: through after two cell delays");
    // Delay of the forward pass is one cell.
    sel = 1'b0; fi = 1'b0; #5;
    fi = 1'b1;
    #0.9;  check(fo == 1'b1, "pass: not through before one cell delay");
    #0.2;  check(fo == 1'b0, "pass: through after one cell delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
