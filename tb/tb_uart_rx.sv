// Testbench for uart_rx: random bytes sent as 8N1 frames at a short bit
// time must come out unchanged, once each; a frame with a low stop bit
// must be dropped.
`timescale 1ns / 1ps
module tb_uart_rx;
  localparam int unsigned CPB = 16;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n, rx, valid;
  logic [7:0] data;
  logic [7:0] sent[$];
  int received;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (
    .clk_i(clk), .rst_ni(rst_n), .rx_i(rx), .valid_o(valid), .data_o(data)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] frame = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = frame[i];
      repeat (CPB) @(posedge clk);
    end
    rx = 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  logic [7:0] want;

  always @(posedge clk) begin
    if (rst_n && valid) begin
      received++;
      if (sent.size() == 0) check(1'b0, "unexpected byte");
      else begin
        want = sent.pop_front();
        check(data == want, $sformatf("byte %h received as %h", want, data));
      end
    end
  end

  initial begin
    rx = 1'b1; rst_n = 1'b0; received = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      sent.push_back(b);
      send(b, 1'b1);
    end
    send(8'h5a, 1'b0);  // framing error: dropped
    sent.push_back(8'hc3);
    send(8'hc3, 1'b1);
    repeat (4 * CPB) @(posedge clk);
    check(received == 41, $sformatf("41 bytes expected, %0d received", received));
    check(sent.size() == 0, "all bytes received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
