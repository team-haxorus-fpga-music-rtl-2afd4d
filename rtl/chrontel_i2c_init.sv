// chrontel_i2c_init: configures the Chrontel 7301C DVI transmitter over I2C.
// After reset the module writes N_REGS registers, each as one I2C write
// transaction: START, device address 0x76 with the write bit (0xEC), the
// register address, the data byte, STOP. Each bit takes four quarter
// periods of Q_CYCLES system cycles (SCL low/data change, SCL rising, SCL
// high/sample, SCL falling), 100 kHz at the 100 MHz default. SDA is open
// drain: sda_drive_low pulls the line low, otherwise it floats high; the
// slave's acknowledge is read from sda_in and a missing one sets ack_error.
// SCL is driven push-pull (the transmitter never stretches the clock).
// done rises when all registers have been written.
// Register list (transmitter datasheet values for a pixel clock below
// 65 MHz): 0x49=0xC0 power on DVI, 0x21=0x09, 0x33=0x08, 0x34=0x16, 0x36=0x60.
// The list and the bit timing are this design's own choices.
module chrontel_i2c_init #(
  parameter int unsigned Q_CYCLES = 250,
  parameter logic [6:0]  DEV_ADDR = 7'h76
) (
  input  logic clk,
  input  logic rst,
  output logic scl,
  output logic sda_drive_low,
  input  logic sda_in,
  output logic done,
  output logic ack_error
);
  localparam int unsigned N_REGS = 5;
  localparam logic [N_REGS-1:0][15:0] REGS = {16'h3660, 16'h3416, 16'h3308, 16'h2109, 16'h49C0};

  typedef enum logic [2:0] {S_START, S_BITS, S_STOP, S_GAP, S_DONE} state_t;
  state_t state;
  logic [$clog2(Q_CYCLES+1)-1:0] qcnt;
  logic [1:0] q;          // quarter within a bit
  logic [4:0] bit_idx;    // 0..26: three bytes of 8 data bits + ack
  logic [2:0] reg_idx;
  logic [26:0] tx;        // bits of the transaction, MSB first, 1 = release
  logic tick;

  assign tick = (qcnt == ($bits(qcnt))'(Q_CYCLES - 1));
  always_comb begin
    logic [15:0] rv;
    rv = REGS[reg_idx];
    tx = {DEV_ADDR, 1'b0, 1'b1, rv[15:8], 1'b1, rv[7:0], 1'b1};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_GAP; qcnt <= '0; q <= '0; bit_idx <= '0; reg_idx <= '0;
      scl <= 1'b1; sda_drive_low <= 1'b0; done <= 1'b0; ack_error <= 1'b0;
    end else begin
      qcnt <= tick ? '0 : qcnt + 1'b1;
      if (tick) begin
        q <= q + 1'b1;
        case (state)
          S_START: case (q)
            2'd0: begin scl <= 1'b1; sda_drive_low <= 1'b0; end
            2'd1: sda_drive_low <= 1'b1;               // SDA falls, SCL high
            2'd2: scl <= 1'b0;
            default: begin state <= S_BITS; bit_idx <= '0; end
          endcase
          S_BITS: case (q)
            2'd0: sda_drive_low <= !tx[26 - bit_idx];
            2'd1: scl <= 1'b1;
            2'd2: if (bit_idx == 5'd8 || bit_idx == 5'd17 || bit_idx == 5'd26)
                    if (sda_in) ack_error <= 1'b1;
            default: begin
              scl <= 1'b0;
              if (bit_idx == 5'd26) state <= S_STOP;
              bit_idx <= bit_idx + 1'b1;
            end
          endcase
          S_STOP: case (q)
            2'd0: sda_drive_low <= 1'b1;
            2'd1: scl <= 1'b1;
            2'd2: sda_drive_low <= 1'b0;               // SDA rises, SCL high
            default: begin
              state <= S_GAP;
              reg_idx <= reg_idx + 1'b1;
            end
          endcase
          S_GAP: if (q == 2'd3) state <= (reg_idx == 3'(N_REGS)) ? S_DONE : S_START;
          default: done <= 1'b1;
        endcase
      end
    end
  end
endmodule
