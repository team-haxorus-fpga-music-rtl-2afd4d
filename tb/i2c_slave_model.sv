// i2c_slave_model: behavioural I2C slave for simulation. It watches SCL and
// the open-drain SDA, detects START and STOP, shifts in bytes on rising SCL,
// and acknowledges each byte by pulling SDA low in the ninth clock when
// ACK_ENABLE is set. Each complete write transaction of three bytes
// (address, register, data) is stored in log_dev/log_reg/log_val.
module i2c_slave_model #(
  parameter bit ACK_ENABLE = 1'b1
) (
  input  logic scl,
  input  logic sda_drive_low,   // master pulls low
  output logic sda_in,          // wired-AND line seen by the master
  output int   n_trans,
  output int   n_starts
);
  logic [7:0] log_dev [16];
  logic [7:0] log_reg [16];
  logic [7:0] log_val [16];
  logic       slave_low;
  logic       sda;
  int         bitn, bytes;
  logic [7:0] sh;
  logic [7:0] b [3];

  assign sda    = !(sda_drive_low || slave_low);
  assign sda_in = sda;

  initial begin
    slave_low = 0; bitn = 0; bytes = 0; n_trans = 0; n_starts = 0; sh = 0;
  end

  always @(negedge sda) if (scl) begin n_starts++; bitn = 0; bytes = 0; end
  always @(posedge sda) if (scl) begin
    if (bytes == 3 && n_trans < 16) begin
      log_dev[n_trans] = b[0]; log_reg[n_trans] = b[1]; log_val[n_trans] = b[2];
      n_trans++;
    end
    bytes = 0;
  end
  always @(posedge scl) begin
    if (bitn < 8) sh = {sh[6:0], sda};
    bitn++;
  end
  always @(negedge scl) begin
    if (bitn == 8) begin
      if (bytes < 3) b[bytes] = sh;
      bytes++;
      slave_low = ACK_ENABLE;
    end else if (bitn == 9) begin
      slave_low = 0;
      bitn = 0;
    end
  end
endmodule
