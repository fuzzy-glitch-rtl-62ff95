// UART receiver for the configuration interface.
//
// Receives 8N1 frames (start bit, eight data bits LSB first, one stop bit)
// at CLKS_PER_BIT clock cycles per bit; 868 gives 115200 baud from 100 MHz.
// The document only says the generator is configured over UART; the frame
// format and rate are this design's choices. The line is synchronised with
// two flip-flops, a start bit is a falling edge of the line confirmed at the
// middle of the bit, and each data bit is sampled in the middle of its bit
// time. A frame whose stop bit is low is dropped, and the receiver waits for
// the next falling edge, so a line held low is not read as a stream of
// bytes.
//
// Interface: rx_i (idle high); valid_o pulses for one cycle with data_o.
// Timing: valid_o rises about 9.5 bit times after the start bit's edge.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       rx_i,
  output logic       valid_o,
  output logic [7:0] data_o
);

  typedef enum logic [1:0] {Idle, Start, Data, Stop} state_e;

  localparam int unsigned CntW = $clog2(CLKS_PER_BIT + 1);

  state_e          state_q;
  logic [CntW-1:0] cnt_q;
  logic [2:0]      bit_q;
  logic [7:0]      shift_q;
  logic [2:0]      sync_q;
  logic            rx;
  logic            rx_fall;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) sync_q <= 3'b111;
    else         sync_q <= {sync_q[1:0], rx_i};
  end
  assign rx      = sync_q[1];
  assign rx_fall = sync_q[2] & ~sync_q[1];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= Idle;
      cnt_q   <= '0;
      bit_q   <= '0;
      shift_q <= '0;
      valid_o <= 1'b0;
      data_o  <= '0;
    end else begin
      valid_o <= 1'b0;
      unique case (state_q)
        Idle: if (rx_fall) begin
          state_q <= Start;
          cnt_q   <= CntW'(CLKS_PER_BIT / 2);
        end
        Start: begin
          if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else if (rx)     state_q <= Idle;  // false start
          else begin
            state_q <= Data;
            cnt_q   <= CntW'(CLKS_PER_BIT - 1);
            bit_q   <= '0;
          end
        end
        Data: begin
          if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else begin
            shift_q <= {rx, shift_q[7:1]};
            cnt_q   <= CntW'(CLKS_PER_BIT - 1);
            if (bit_q == 3'd7) state_q <= Stop;
            bit_q   <= bit_q + 1'b1;
          end
        end
        Stop: begin
          if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else begin
            state_q <= Idle;
            if (rx) begin
              valid_o <= 1'b1;
              data_o  <= shift_q;
            end
          end
        end
        default: state_q <= Idle;
      endcase
    end
  end

endmodule
