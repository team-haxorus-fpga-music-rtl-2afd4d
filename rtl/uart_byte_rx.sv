// uart_byte_rx: serial byte reader for the depth stream from the host.
// The line idles high; a low level starts a byte, which then carries eight
// data bits, least significant first, and a high stop bit. The line is far
// slower than the system clock, so the reader counts CLKS_PER_BIT system
// cycles per bit and samples each bit in its middle. When the stop bit is
// high the byte is presented on byte_out and byte_valid is high for exactly
// one system cycle; a byte with a low stop bit is dropped, and the reader
// then waits for the line to return high before looking for a start bit.
// Default: 500,000 bit/s from a 100 MHz system clock = 200 cycles per bit.
// The stop-bit check and the two-flop input synchroniser are this design's
// own choices.
module uart_byte_rx #(
  parameter int unsigned CLKS_PER_BIT = 200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       serial_in,
  output logic [7:0] byte_out,
  output logic       byte_valid
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_STOP, S_BREAK} state_t;
  state_t state;

  logic [1:0]  sync_q;
  logic        rx;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;

  assign rx = sync_q[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q     <= 2'b11;
      state      <= S_IDLE;
      cnt        <= '0;
      bit_idx    <= '0;
      shreg      <= '0;
      byte_out   <= '0;
      byte_valid <= 1'b0;
    end else begin
      sync_q     <= {sync_q[0], serial_in};
      byte_valid <= 1'b0;
      case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!rx) state <= S_START;
        end
        S_START: begin
          // wait half a bit, then confirm the start bit is still low
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT/2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx ? S_IDLE : S_DATA;
          end else cnt <= cnt + 1'b1;
        end
        S_DATA: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        S_STOP: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= rx ? S_IDLE : S_BREAK;
            if (rx) begin
              byte_out   <= shreg;
              byte_valid <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        S_BREAK: if (rx) state <= S_IDLE;   // wait for the line to idle again
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
