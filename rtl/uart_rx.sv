// uart_rx: asynchronous serial receiver, 8 data bits, no parity, 1 stop bit.
//
// The line is first passed through two flip-flops to synchronise it to clk.
// A falling edge while idle starts a frame; the start bit is confirmed at its
// middle, then each data bit (LSB first) and the stop bit are sampled in the
// middle of their bit periods, CLKS_PER_BIT clocks apart. A frame with a valid
// stop bit raises 'valid' for one clock with the byte on 'data'; a frame whose
// stop bit is low is discarded. Idle line level is high.
//
// Timing: 'valid' rises about 9.5 bit periods after the start edge.
// The frame format is this design's choice; the source design names a UART
// but does not give its settings.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_t        state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync    <= 2'b11;
      state   <= IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      valid   <= 1'b0;
      data    <= '0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      unique case (state)
        IDLE: begin
          cnt <= '0;
          if (!sync[1]) state <= START;
        end
        START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= sync[1] ? IDLE : DATA;    // glitch: not a start bit
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt     <= '0;
            shreg   <= {sync[1], shreg[7:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= STOP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= IDLE;
            if (sync[1]) begin
              valid <= 1'b1;
              data  <= shreg;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
