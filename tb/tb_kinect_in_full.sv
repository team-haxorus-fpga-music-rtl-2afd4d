// tb_kinect_in_full: one full-size depth frame through the Kinect input path
// at its default parameters: 320x240 pixels, one byte each, then the zero
// byte, on a 500,000 bit/s line (200 system clocks per bit) with bytes sent
// back to back (start bit, 8 data bits, stop bit). The person is close in
// hand areas 0 and 3 (the top-left and top-right quarters of the upper half)
// and far everywhere else.
// A serialiser clocked by the system clock generates the line. Checks: the
// live hand_areas and dance_areas just before the zero byte, against counts
// of close pixels per area kept by the testbench; exactly one gesture pulse,
// bit 2 for the pair (0,3), and no volume pulse; and the frame time from
// the first start bit to the gesture pulse: 76,801 bytes of 10 bits at 200
// clocks per bit = 153,602,000 cycles (1.54 s at 100 MHz), plus a few
// cycles of synchroniser and pipeline delay.
module tb_kinect_in_full;
  localparam int CPB = 200, W = 320, H = 240;
  localparam int NBYTES = W * H + 1;
  localparam longint FRAME_CYCLES = longint'(NBYTES) * 10 * CPB;
  logic clk = 0, rst = 1;
  logic line;
  logic [99:0] dance_areas;
  logic [7:0] hand_areas;
  logic [25:0] gestures;
  logic vol_up, vol_down;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  kinect_in dut (.clk, .rst, .serial_in(line), .depth_thresh(8'd60),
    .dance_areas, .hand_areas, .gestures, .vol_up, .vol_down);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] pixel_at(input int idx);
    int px, py, area;
    if (idx >= W * H) return 8'd0;
    px = idx % W; py = idx / W;
    area = (py / 120) * 4 + px / 80;
    return (area == 0 || area == 3) ? 8'(20 + (px ^ py) % 30) : 8'(100 + (px + py) % 150);
  endfunction

  // serialiser: byte index, bit index 0..9 (0 start, 1..8 data, 9 stop)
  int     byte_idx = 0, bit_idx = 0, bit_cnt = 0;
  logic   sending = 0, done_sending = 0;
  longint cyc = 0, t_start = 0, t_gesture = -1;
  int     n_gesture = 0, n_vol = 0;
  logic [7:0] cur;
  always_comb begin
    cur = pixel_at(byte_idx);
    if (!sending)          line = 1'b1;
    else if (bit_idx == 0) line = 1'b0;
    else if (bit_idx == 9) line = 1'b1;
    else                   line = cur[bit_idx - 1];
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sending) begin
      if (bit_cnt == CPB - 1) begin
        bit_cnt <= 0;
        if (bit_idx == 9) begin
          bit_idx <= 0;
          if (byte_idx == NBYTES - 1) begin sending <= 0; done_sending <= 1; end
          byte_idx <= byte_idx + 1;
        end else bit_idx <= bit_idx + 1;
      end else bit_cnt <= bit_cnt + 1;
    end
    if (!rst && gestures != 0) begin
      n_gesture++;
      check(gestures == 26'b100, $sformatf("gesture bits %b expected pair (0,3) = bit 2", gestures));
      if (t_gesture < 0) t_gesture = cyc;
    end
    if (!rst && (vol_up || vol_down)) n_vol++;
  end

  // expected dance cells: 32x24 cells, active at 100 close pixels
  int cell_cnt [100];
  logic [99:0] exp_dance = 0;
  initial for (int i = 0; i < 100; i++) cell_cnt[i] = 0;
  initial begin
    for (int i = 0; i < W * H; i++) begin
      int px, py, c;
      px = i % W; py = i / W;
      c = (py / 24) * 10 + px / 32;
      if (pixel_at(i) < 8'd60) cell_cnt[c]++;
    end
    for (int i = 0; i < 100; i++) exp_dance[i] = (cell_cnt[i] >= 100);
  end

  initial begin
    repeat (160_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (50) @(posedge clk);
    @(negedge clk);
    sending = 1; t_start = cyc;
    // just before the zero byte: every area has been scanned completely
    wait (byte_idx == NBYTES - 1);
    @(negedge clk);
    check(hand_areas == 8'b0000_1001, $sformatf("hand_areas %b expected 00001001", hand_areas));
    check(dance_areas == exp_dance, $sformatf("dance_areas %h expected %h", dance_areas, exp_dance));
    check(n_gesture == 0, "gesture before the end of the frame");
    wait (done_sending);
    repeat (2000) @(negedge clk);
    check(n_gesture == 1, $sformatf("%0d gesture pulses, expected 1", n_gesture));
    check(n_vol == 0, "unexpected volume pulse");
    check(t_gesture - t_start >= FRAME_CYCLES - 2 * CPB && t_gesture - t_start <= FRAME_CYCLES,
          $sformatf("frame to gesture took %0d cycles, expected about %0d", t_gesture - t_start, FRAME_CYCLES));
    $display("frame of %0d bytes: gesture %0d cycles after the first start bit (%0d.%03d s at 100 MHz)",
             NBYTES, t_gesture - t_start, (t_gesture - t_start) / 100_000_000,
             ((t_gesture - t_start) / 100_000) % 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
