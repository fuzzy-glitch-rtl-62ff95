// Workload: the ring oscillator characterisation of the document. Both
// rings, with the cell delays the top level uses for RO 1 and RO 2, are
// swept over every odd length from 3 to 31 with the other ring stopped.
// For each length the measured period must lie within the jitter bounds of
// 2 * (NAND delay + (length - 1) * inverter delay), RO 2 must be slightly
// faster than RO 1, and over the sweep the period must grow by close to
// the document's average of 6.5 ns per two added inverters.
`timescale 1ns / 1ps
module tb_ro_length_sweep;
  localparam int unsigned D1 = 1625, N1 = 5500;
  localparam int unsigned D2 = 1600, N2 = 5400;
  localparam int unsigned J  = 40;

  int checks = 0, failures = 0;
  logic rst_n, en1, en2;
  logic [7:0] len1, len2;
  logic ro1, ro2;
  real per1[16], per2[16];

  adjustable_ro #(.INV_DELAY_PS(D1), .NAND_DELAY_PS(N1), .JITTER_PS(J)) u_ro1 (
    .rst_ni(rst_n), .enable_i(en1), .length_i(len1), .div2_i(1'b0), .ro_o(ro1)
  );
  adjustable_ro #(.INV_DELAY_PS(D2), .NAND_DELAY_PS(N2), .JITTER_PS(J)) u_ro2 (
    .rst_ni(rst_n), .enable_i(en2), .length_i(len2), .div2_i(1'b0), .ro_o(ro2)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200us;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    realtime t0, t1;
    real lo, hi, slope1, slope2;
    rst_n = 1'b0; en1 = 1'b0; en2 = 1'b0; len1 = 8'd3; len2 = 8'd3;
    #20 rst_n = 1'b1;
    $display(" length | RO 1 period   freq | RO 2 period   freq");
    for (int i = 0; i < 15; i++) begin
      int l;
      l = 3 + 2 * i;
      // RO 1 alone.
      en1 = 1'b0; en2 = 1'b0; #1us;
      len1 = 8'(l); len2 = 8'(l); #1us;
      en1 = 1'b1;
      repeat (3) @(posedge ro1);
      t0 = $realtime; repeat (10) @(posedge ro1); t1 = $realtime;
      per1[i] = (t1 - t0) / 10.0;
      // RO 2 alone.
      en1 = 1'b0; #1us;
      en2 = 1'b1;
      repeat (3) @(posedge ro2);
      t0 = $realtime; repeat (10) @(posedge ro2); t1 = $realtime;
      per2[i] = (t1 - t0) / 10.0;
      $display("   %3d  | %8.2f ns %6.1f MHz | %8.2f ns %6.1f MHz",
               l, per1[i], 1000.0 / per1[i], per2[i], 1000.0 / per2[i]);
      lo = 2.0 * (N1 + (l - 1) * D1) / 1000.0;
      hi = 2.0 * (N1 + J + (l - 1) * (D1 + J)) / 1000.0;
      check(per1[i] >= lo - 0.001 && per1[i] <= hi + 0.001, $sformatf("RO 1 period at length %0d", l));
      lo = 2.0 * (N2 + (l - 1) * D2) / 1000.0;
      hi = 2.0 * (N2 + J + (l - 1) * (D2 + J)) / 1000.0;
      check(per2[i] >= lo - 0.001 && per2[i] <= hi + 0.001, $sformatf("RO 2 period at length %0d", l));
      check(per2[i] < per1[i], $sformatf("RO 2 faster than RO 1 at length %0d", l));
    end
    slope1 = (per1[14] - per1[0]) / 14.0;
    slope2 = (per2[14] - per2[0]) / 14.0;
    $display("average period step per two inverters: RO 1 %0.2f ns, RO 2 %0.2f ns", slope1, slope2);
    check(slope1 > 6.2 && slope1 < 6.8, "RO 1 period step near 6.5 ns");
    check(slope2 > 6.2 && slope2 < 6.8, "RO 2 period step near 6.5 ns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
