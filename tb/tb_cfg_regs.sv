// Testbench for cfg_regs: reset values, every command, an unknown command,
// and the one-cycle trigger pulse, against a reference model kept here.
`timescale 1ns / 1ps
module tb_cfg_regs;
  import fg_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n, valid, trig;
  logic [7:0] data;
  ro_cfg_t r1, r2;
  logic [15:0] dur;
  int trig_count;

  // Reference state.
  logic [7:0] m_len1, m_len2, m_ctrl;
  logic [15:0] m_dur;

  cfg_regs #(.DUR_W(16)) dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .data_i(data),
    .ro1_o(r1), .ro2_o(r2), .duration_o(dur), .trigger_o(trig)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (trig) trig_count++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  task automatic put(input logic [7:0] b);
    @(negedge clk) begin valid = 1'b1; data = b; end
    @(negedge clk) valid = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic compare();
    check(r1.length == m_len1 && r2.length == m_len2, "lengths");
    check(r1.enable == m_ctrl[0] && r2.enable == m_ctrl[1], "enables");
    check(r1.div2 == m_ctrl[2] && r2.div2 == m_ctrl[3], "divider selects");
    check(dur == m_dur, "duration");
  endtask

  initial begin
    rst_n = 1'b0; valid = 1'b0; data = '0; trig_count = 0;
    m_len1 = 8'd3; m_len2 = 8'd5; m_ctrl = 8'h03; m_dur = 16'd10;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    compare();
    for (int i = 0; i < 200; i++) begin
      logic [7:0] c, v;
      int n_before;
      c = 8'($urandom_range(7, 0));
      v = 8'($urandom);
      n_before = trig_count;
      put(c);
      put(v);
      case (c)
        8'h01: m_len1 = v;
        8'h02: m_len2 = v;
        8'h03: m_ctrl = {4'b0, v[3:0]};
        8'h04: m_dur[7:0] = v;
        8'h05: m_dur[15:8] = v;
        default: ;
      endcase
      compare();
      check(trig_count == n_before + (c == 8'h06 ? 1 : 0), "trigger pulses once for the trigger command only");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
