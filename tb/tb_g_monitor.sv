// tb_g_monitor: scans 8x6 frames of random depths past a monitor watching
// x 2..4, y 1..3 with a count threshold of 4. A reference counts the close
// pixels in the window and gives the expected active flag after every
// pixel, including the clear when the area's first pixel comes again.
module tb_g_monitor;
  localparam int W = 8, H = 6, TH = 4;
  localparam int XL = 2, XH = 5, YL = 1, YH = 4;
  logic clk = 0, rst = 1, pv = 0, active;
  logic [9:0] px = 0, py = 0;
  logic [7:0] pd = 0, thr = 8'd100;
  int checks = 0, failures = 0;
  int n_active = 0, n_clear = 0;
  always #5 clk = ~clk;

  g_monitor #(.X_LO(XL), .X_HI(XH), .Y_LO(YL), .Y_HI(YH), .COUNT_THRESH(TH)) dut (
    .clk, .rst, .pix_valid(pv), .pix_x(px), .pix_y(py), .pix_depth(pd),
    .depth_thresh(thr), .active);

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
    int cnt;
    bit exp_act, prev;
    cnt = 0; exp_act = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 40; f++) begin
      int pclose;
      pclose = (f % 4) * 25;   // 0%, 25%, 50%, 75% close pixels
      for (int yy = 0; yy < H; yy++)
        for (int xx = 0; xx < W; xx++) begin
          bit inw, close;
          @(negedge clk);
          pv = 1; px = 10'(xx); py = 10'(yy);
          pd = ($urandom_range(0, 99) < pclose) ? 8'($urandom_range(1, 99)) : 8'($urandom_range(100, 255));
          inw = xx >= XL && xx < XH && yy >= YL && yy < YH;
          close = pd < thr;
          prev = exp_act;
          if (inw) begin
            if (xx == XL && yy == YL) begin cnt = close; exp_act = 0; if (prev) n_clear++; end
            else if (close && !exp_act) cnt++;
            if (cnt >= TH) exp_act = 1;
          end
          @(negedge clk);
          pv = 0;
          check(active == exp_act, $sformatf("frame %0d pixel %0d,%0d active=%0d expected %0d", f, xx, yy, active, exp_act));
          if (exp_act && !prev) n_active++;
        end
    end
    check(n_active > 5 && n_clear > 5, $sformatf("active rose %0d times, cleared %0d times", n_active, n_clear));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
