// Testbench for ro_mux_select: all 256 length codes against the expected
// one-hot select (turn back at stage (length - 3) / 2, even lengths rounded
// down, lengths below 3 giving the shortest ring).
module tb_ro_mux_select;
  localparam int unsigned N = 127;

  int checks = 0, failures = 0;
  logic [7:0]   len;
  logic [N-1:0] sel;
  int           want;

  ro_mux_select #(.N_STAGES(N)) dut (.length_i(len), .sel_o(sel));

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    for (int l = 0; l < 256; l++) begin
      len = 8'(l);
      #1;
      if (l < 3) want = 0;
      else       want = ((l % 2 == 1 ? l : l - 1) - 3) / 2;
      checks++;
      if (sel != (N'(1) << want)) begin
        failures++;
        $display("FAIL: length %0d gives %h, expected stage %0d", l, sel, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
