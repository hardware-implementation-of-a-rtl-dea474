// uart_in: serial front end of the test setup (UART-IN).
//
// Receives one particle pair from the host as 32 bytes: the four binary64
// words rx_a, rx_b, ry_a, ry_b in that order, each least-significant byte
// first. Bytes from a uart_rx are shifted into a 248-bit register; when the
// 32nd byte arrives the four words are presented on the outputs and 'en'
// pulses for one clock, which starts the pair down the force pipeline. The
// outputs hold their value until the next pair is complete.
//
// Timing: at BAUD = 115200 and 8N1 framing a pair takes 320 bit periods,
// about 2.8 ms. There is no resynchronisation other than reset: after a reset
// the next byte is taken as the first byte of a pair.
//
// The block and its outputs (rx_a, rx_b, ry_a, ry_b, EN) follow the source
// design's test setup; the serial settings and the byte and word order are
// this design's choices.
module uart_in #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx,
  output logic        en,
  output logic [63:0] rx_a,
  output logic [63:0] rx_b,
  output logic [63:0] ry_a,
  output logic [63:0] ry_b
);

  localparam int unsigned NBYTES = 32;

  logic         byte_valid;
  logic [7:0]   byte_data;
  logic [247:0] shreg;   // first 31 bytes of a pair
  logic [4:0]   byte_cnt;

  uart_rx #(.CLKS_PER_BIT(CLK_HZ / BAUD)) u_rx (
    .clk, .rst_n, .rx, .valid(byte_valid), .data(byte_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg    <= '0;
      byte_cnt <= '0;
      en       <= 1'b0;
      {ry_b, ry_a, rx_b, rx_a} <= '0;
    end else begin
      en <= 1'b0;
      if (byte_valid) begin
        shreg    <= {byte_data, shreg[247:8]};
        byte_cnt <= byte_cnt + 1'b1;
        if (byte_cnt == 5'(NBYTES - 1)) begin
          {ry_b, ry_a, rx_b, rx_a} <= {byte_data, shreg};
          en <= 1'b1;
        end
      end
    end
  end

endmodule
