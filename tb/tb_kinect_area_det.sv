// tb_kinect_area_det: random dance (10x10 over 64x48-pixel cells) and hand
// (4x2 over 160x240 cells) activity; random screen points are checked two
// cycles later: valid if the point's dance or hand cell is active, hand
// colour when its hand cell is active, dance colour otherwise; nothing off
// screen.
module tb_kinect_area_det;
  import haxorus_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [99:0] dance;
  logic [7:0] hand;
  coord_t x = 0, y = 0;
  logic valid;
  rgb_t color;
  int checks = 0, failures = 0;
  localparam logic [7:0][23:0] HC = {24'hFF00FF, 24'h00FFFF, 24'hFFFF00, 24'h0000FF,
                                     24'h00FF00, 24'hFF0000, 24'hFF8000, 24'h8000FF};

  kinect_area_det dut (.clk, .dance_areas(dance), .hand_areas(hand), .x, .y, .valid, .color);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int xx, yy, d, h;
      bit ev;
      logic [23:0] ec;
      if (n % 100 == 0) begin
        dance = {4{25'($urandom)}};
        hand = 8'($urandom) & 8'($urandom);
      end
      xx = (n % 10 == 9) ? $urandom_range(640, 799) : $urandom_range(0, 639);
      yy = $urandom_range(0, 479);
      @(negedge clk); x = 10'(xx); y = 10'(yy);
      d = (yy / 48) * 10 + xx / 64;
      h = (yy / 240) * 4 + xx / 160;
      ev = xx < 640 && (dance[d] || hand[h]);
      ec = hand[h] ? HC[h] : 24'hFFFFFF;
      @(negedge clk); @(negedge clk);
      check(valid == ev, $sformatf("(%0d,%0d) valid %0d expected %0d", xx, yy, valid, ev));
      if (ev) check(color == rgb_t'(ec), $sformatf("(%0d,%0d) colour %h expected %h", xx, yy, color, ec));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
