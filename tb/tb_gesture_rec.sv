// tb_gesture_rec: 8x4 frames (eight 2x2 hand areas, count threshold 3).
// Each frame makes a random set of areas "close" (all four pixels near),
// then sends the zero byte. Expected: a pulse on the pair index of the two
// areas when exactly two are active (pairs 26/27 on vol_up/vol_down),
// nothing otherwise, one cycle after frame_end.
module tb_gesture_rec;
  localparam int W = 8, H = 4;
  logic clk = 0, rst = 1, pv = 0, fe = 0;
  logic [9:0] px = 0, py = 0;
  logic [7:0] pd = 0;
  logic [7:0] hand_areas;
  logic [25:0] gestures;
  logic vol_up, vol_down;
  int checks = 0, failures = 0, n_gest = 0, n_vol = 0, n_none = 0;
  always #5 clk = ~clk;

  gesture_rec #(.FRAME_W(W), .FRAME_H(H), .COUNT_THRESH(3)) dut (
    .clk, .rst, .pix_valid(pv), .pix_x(px), .pix_y(py), .pix_depth(pd),
    .depth_thresh(8'd50), .frame_end(fe), .hand_areas, .gestures, .vol_up, .vol_down);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int pair_index(input int i, input int j);
    int p;
    p = 0;
    for (int a = 0; a < 8; a++)
      for (int b = a + 1; b < 8; b++) begin
        if (a == i && b == j) return p;
        p++;
      end
    return -1;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 120; f++) begin
      logic [7:0] sel;
      logic [27:0] exp_pairs;
      int k;
      // choose 2 areas most of the time, otherwise 0, 1 or 3
      sel = 0;
      k = (f % 5 == 4) ? (f % 3 == 0 ? 3 : f % 2) : 2;
      while ($countones(sel) < k) sel[$urandom_range(0, 7)] = 1;
      for (int yy = 0; yy < H; yy++)
        for (int xx = 0; xx < W; xx++) begin
          int area;
          area = (yy / 2) * 4 + xx / 2;
          @(negedge clk);
          pv = 1; px = 10'(xx); py = 10'(yy);
          pd = sel[area] ? 8'd20 : 8'd200;
          if (xx == W - 1 && yy == H - 1) pd = sel[area] ? 8'd20 : 8'd200;
        end
      @(negedge clk); pv = 0;
      check(hand_areas == sel, $sformatf("hand_areas %b expected %b", hand_areas, sel));
      @(negedge clk); fe = 1;
      @(negedge clk); fe = 0;
      exp_pairs = 0;
      if ($countones(sel) == 2) begin
        int a, b;
        a = -1; b = -1;
        for (int i = 0; i < 8; i++) if (sel[i]) begin if (a < 0) a = i; else b = i; end
        exp_pairs[pair_index(a, b)] = 1;
      end
      check({vol_down, vol_up, gestures} == exp_pairs,
            $sformatf("frame %0d sel %b: got %b expected %b", f, sel, {vol_down, vol_up, gestures}, exp_pairs));
      if (exp_pairs[25:0] != 0) n_gest++;
      if (exp_pairs[27:26] != 0) n_vol++;
      if (exp_pairs == 0) n_none++;
      @(negedge clk);
      check({vol_down, vol_up, gestures} == 0, "gesture pulse longer than one cycle");
    end
    check(n_gest > 0 && n_none > 0, "coverage");
    $display("gestures %0d volume %0d none %0d", n_gest, n_vol, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
