// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop bit.
//
// When 'start' is high while the transmitter is idle, 'data' is captured and
// sent as a start bit (low), eight data bits LSB first and a stop bit (high),
// each CLKS_PER_BIT clocks long. 'busy' is high from the clock after 'start'
// until the stop bit has been sent; 'start' is ignored while busy. The line
// idles high.
//
// The frame format is this design's choice; the source design names a UART
// but does not give its settings.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    bits_left;   // 10 bits per frame
  logic [9:0]    frame;       // {stop, data, start}, sent from bit 0

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      bits_left <= '0;
      frame     <= '1;
      busy      <= 1'b0;
      tx        <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
        busy      <= 1'b1;
        tx        <= 1'b0;
      end
    end else begin
      tx <= frame[0];
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt       <= '0;
        frame     <= {1'b1, frame[9:1]};
        bits_left <= bits_left - 1'b1;
        if (bits_left == 4'd1) begin
          busy <= 1'b0;
          tx   <= 1'b1;
        end else begin
          tx <= frame[1];
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
