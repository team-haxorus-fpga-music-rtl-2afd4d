// tb_uart_byte_rx: sends random bytes at 8 clocks per bit, including bytes
// with a broken stop bit that must be dropped, and checks every received
// byte, that byte_valid lasts one cycle, and the delay from the start edge
// to byte_valid (9.5 to 10.5 bit times plus the synchroniser).
module tb_uart_byte_rx;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, line = 1;
  logic [7:0] byte_out;
  logic byte_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uart_byte_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .serial_in(line), .byte_out, .byte_valid);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] expq[$];
  int n_good = 0;
  int n_rx = 0, start_cyc, cyc = 0, lat_min = 1 << 30, lat_max = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (byte_valid && !rst) begin
    int lat;
    lat = cyc - start_cyc;
    if (lat < lat_min) lat_min = lat;
    if (lat > lat_max) lat_max = lat;
    n_rx++;
    if (expq.size() == 0) check(0, $sformatf("unexpected byte %02h at cycle %0d", byte_out, cyc));
    else begin
      logic [7:0] e;
      e = expq.pop_front();
      check(byte_out == e, $sformatf("byte %02h expected %02h", byte_out, e));
    end
    @(posedge clk);
    check(!byte_valid, "byte_valid longer than one cycle");
  end

  task automatic send(input logic [7:0] b, input bit good_stop);
    @(negedge clk);
    start_cyc = cyc;
    line = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin line = b[i]; repeat (CPB) @(negedge clk); end
    line = good_stop; repeat (CPB) @(negedge clk);
    line = 1; repeat (2 * CPB) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      logic [7:0] b;
      bit good;
      if ((n % 7) != 3) n_good++;
      b = 8'($urandom);
      good = (n % 7) != 3;
      if (good) expq.push_back(b);
      send(b, good);
    end
    repeat (10) @(posedge clk);
    check(expq.size() == 0, "bytes missing");
    check(lat_min >= 9 * CPB + CPB / 2 && lat_max <= 10 * CPB + CPB / 2 + 4,
          $sformatf("latency %0d..%0d cycles", lat_min, lat_max));
    check(n_rx == n_good, $sformatf("received %0d of %0d bytes", n_rx, n_good));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
