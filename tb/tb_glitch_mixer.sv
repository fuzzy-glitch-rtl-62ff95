// Testbench for glitch_mixer: all 16 input combinations.
module tb_glitch_mixer;
  int checks = 0, failures = 0;
  logic r1, r2, mc, gs, co, want;

  glitch_mixer dut (.ro1_i(r1), .ro2_i(r2), .main_clk_i(mc), .glitch_sel_i(gs), .clk_o(co));

  initial begin
    #1000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {gs, mc, r2, r1} = 4'(v);
      #1;
      if (gs) want = (r1 != r2);
      else    want = mc;
      checks++;
      if (co !== want) begin
        failures++;
        $display("FAIL: sel=%b main=%b ro1=%b ro2=%b out=%b", gs, mc, r2, r1, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
