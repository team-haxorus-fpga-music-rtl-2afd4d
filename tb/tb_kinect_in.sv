// tb_kinect_in: drives the serial line (8 clocks per bit) with 20x10 depth
// frames in the host's format: one byte per pixel, never zero, then a zero
// byte. Dance cells are 2x1 pixels (threshold 2), hand areas 5x5 (threshold
// 20). A frame where the hand areas 0 and 3 are close must give gesture
// pair (0,3) = bit 2 at frame end and light the dance cells under them;
// a frame with hand areas 6 and 7 close must give volume down.
module tb_kinect_in;
  localparam int CPB = 8, W = 20, H = 10;
  logic clk = 0, rst = 1, line = 1;
  logic [99:0] dance_areas;
  logic [7:0] hand_areas;
  logic [25:0] gestures;
  logic vol_up, vol_down;
  int checks = 0, failures = 0;
  logic [25:0] g_seen = 0;
  int up_seen = 0, down_seen = 0;
  always #5 clk = ~clk;

  kinect_in #(.CLKS_PER_BIT(CPB), .FRAME_W(W), .FRAME_H(H),
              .HAND_COUNT_THRESH(20), .DANCE_COUNT_THRESH(2)) dut (
    .clk, .rst, .serial_in(line), .depth_thresh(8'd60),
    .dance_areas, .hand_areas, .gestures, .vol_up, .vol_down);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    g_seen |= gestures;
    if (vol_up) up_seen++;
    if (vol_down) down_seen++;
  end

  task automatic send(input logic [7:0] b);
    @(negedge clk);
    line = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin line = b[i]; repeat (CPB) @(negedge clk); end
    line = 1; repeat (2 * CPB) @(negedge clk);
  endtask

  task automatic frame(input logic [7:0] hands);
    logic [99:0] exp_dance;
    int cnt [100];
    exp_dance = 0;
    for (int i = 0; i < 100; i++) cnt[i] = 0;
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++) begin
        int area;
        area = (yy / 5) * 4 + xx / 5;
        send(hands[area] ? 8'd30 : 8'd250);
        if (hands[area]) cnt[yy * 10 + xx / 2]++;
        if (cnt[yy * 10 + xx / 2] >= 2) exp_dance[yy * 10 + xx / 2] = 1;
      end
    repeat (5) @(negedge clk);
    check(hand_areas == hands, $sformatf("hand_areas %b expected %b", hand_areas, hands));
    check(dance_areas == exp_dance, $sformatf("dance areas %h expected %h", dance_areas, exp_dance));
    g_seen = 0; up_seen = 0; down_seen = 0;
    send(8'd0);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    frame(8'b0000_1001);
    check(g_seen == 26'b100 && up_seen == 0 && down_seen == 0, $sformatf("gesture (0,3): %b", g_seen));
    frame(8'b1100_0000);
    check(g_seen == 0 && up_seen == 0 && down_seen == 1, "volume down gesture");
    frame(8'b1010_0000);
    check(g_seen == 0 && up_seen == 1 && down_seen == 0, "volume up gesture");
    frame(8'b0000_0000);
    check(g_seen == 0 && up_seen == 0 && down_seen == 0, "no gesture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
