// nbody_top: FPGA top level of the force-engine test setup.
//
// A host computer sends particle pairs over a serial line; each pair is
// assembled by UART-IN (uart_in), pushed through the ten-stage binary64 force
// pipeline (force_pipeline), and the resulting force components fx, fy are
// returned over the serial line by UART-OUT (uart_out). The EN pulse of each
// block starts the next one, as in the block diagram of the test setup.
//
// Pins: clk_50 is the 50 MHz board oscillator; key1_n is the KEY(1) push
// button, low when pressed, used as reset; gpio0_rx is the serial input on
// GPIO(0) and gpio1_tx the serial output on GPIO(1). Reset is active
// while the button is held and is released two clocks after it, through two
// flip-flops; every block uses a synchronous active-low reset.
//
// Timing: one pair every 32 bytes of input; the pipeline adds 10 clocks (200 ns
// at 50 MHz); the result leaves as 16 bytes. The clock, pins and block chain
// follow the source design; the serial settings are this design's choice.
module nbody_top #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic clk_50,
  input  logic key1_n,
  input  logic gpio0_rx,
  output logic gpio1_tx
);

  logic [1:0]  rst_sync;
  logic        rst_n;
  logic        en_in, en_out;
  logic [63:0] rx_a, rx_b, ry_a, ry_b, fx, fy;

  always_ff @(posedge clk_50) rst_sync <= {rst_sync[0], key1_n};
  // asserted at once while the key is held, released two clocks after it
  assign rst_n = rst_sync[1] & key1_n;

  uart_in #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart_in (
    .clk(clk_50), .rst_n, .rx(gpio0_rx),
    .en(en_in), .rx_a, .rx_b, .ry_a, .ry_b
  );

  force_pipeline u_pipeline (
    .clk(clk_50), .rst_n, .en_in,
    .rx_a, .rx_b, .ry_a, .ry_b,
    .en_out, .fx, .fy
  );

  uart_out #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart_out (
    .clk(clk_50), .rst_n, .en(en_out), .fx, .fy,
    .tx(gpio1_tx), .busy()
  );

endmodule
