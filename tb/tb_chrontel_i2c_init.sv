// tb_chrontel_i2c_init: runs the initialisation (4 cycles per quarter bit)
// against a behavioural I2C slave and checks that five write transactions
// to device 0xEC arrive with the expected register/value pairs in order,
// no acknowledge is missed, done rises and the bus ends idle (both high).
// The cycle count from reset to done is checked against the bit timing:
// 5 transactions x (start 4 + 27 bits x 4 + stop 4 + gap 4) quarters plus
// the initial gap of 4 quarters.
module tb_chrontel_i2c_init;
  localparam int Q = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic scl, sdl, sda_in, done, ack_error;
  int n_trans, n_starts;
  int checks = 0, failures = 0;

  chrontel_i2c_init #(.Q_CYCLES(Q)) dut (.clk, .rst, .scl, .sda_drive_low(sdl), .sda_in, .done, .ack_error);
  i2c_slave_model #(.ACK_ENABLE(1)) slave (.scl, .sda_drive_low(sdl), .sda_in, .n_trans, .n_starts);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam logic [15:0] EXP [5] = '{16'h49C0, 16'h2109, 16'h3308, 16'h3416, 16'h3660};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc >= (5 * (4 + 27 * 4 + 4 + 4) + 4) * Q && cyc <= (5 * (4 + 27 * 4 + 4 + 4) + 4) * Q + Q + 2,
          $sformatf("init took %0d cycles", cyc));
    check(n_trans == 5 && n_starts == 5, $sformatf("%0d transactions, %0d starts", n_trans, n_starts));
    for (int i = 0; i < 5; i++)
      check(slave.log_dev[i] == 8'hEC && {slave.log_reg[i], slave.log_val[i]} == EXP[i],
            $sformatf("transaction %0d: %h %h %h", i, slave.log_dev[i], slave.log_reg[i], slave.log_val[i]));
    check(!ack_error, "all bytes acknowledged");
    repeat (50) @(negedge clk);
    check(scl && sda_in, "bus idle after init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
