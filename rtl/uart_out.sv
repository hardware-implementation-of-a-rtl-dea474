// uart_out: serial back end of the test setup (UART-OUT).
//
// When 'en' pulses, fx and fy are captured and sent to the host as 16 bytes:
// fx then fy, each least-significant byte first, through a uart_tx. 'busy' is
// high while a result is being sent. A result arriving while busy is not
// taken; in the complete design that cannot happen, because a new particle
// pair needs 32 bytes on the receive side and a result only 16 on the transmit
// side, and an assertion reports it if it ever does.
//
// Timing: at BAUD = 115200 and 8N1 framing a result takes 160 bit periods,
// about 1.4 ms.
//
// The block and its inputs (fx, fy, EN) follow the source design's test
// setup; the serial settings and the byte order are this design's choices.
module uart_out #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [63:0] fx,
  input  logic [63:0] fy,
  output logic        tx,
  output logic        busy
);

  localparam int unsigned NBYTES = 16;

  logic [127:0] shreg;
  logic [4:0]   bytes_left;
  logic         tx_start, tx_busy;

  uart_tx #(.CLKS_PER_BIT(CLK_HZ / BAUD)) u_tx (
    .clk, .rst_n, .start(tx_start), .data(shreg[7:0]), .tx, .busy(tx_busy)
  );

  // hand the next byte to the transmitter as soon as it is idle
  assign tx_start = (bytes_left != '0) && !tx_busy;
  assign busy     = (bytes_left != '0) || tx_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg      <= '0;
      bytes_left <= '0;
    end else if (tx_start) begin
      shreg      <= {8'h00, shreg[127:8]};
      bytes_left <= bytes_left - 1'b1;
    end else if (en && !busy) begin
      shreg      <= {fy, fx};
      bytes_left <= 5'(NBYTES);
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) en |-> !busy)
    else $error("uart_out: result arrived while the previous one was still being sent");

endmodule
