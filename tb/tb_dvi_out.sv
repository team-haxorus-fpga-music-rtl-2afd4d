// tb_dvi_out: feeds random pixels and sync levels with pix_en every second
// cycle and checks the two 12-bit halves {G[3:0],B} then {R,G[7:4]}, XCLK
// low for the first half and high for the second, XCLK-N its inverse, and
// de/hsync/vsync registered with the first half.
module tb_dvi_out;
  import haxorus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pix_en = 0, de = 0, hs = 1, vs = 1;
  rgb_t pixel = '0;
  logic [11:0] d;
  logic dde, dhs, dvs, xp, xn, rn;
  int checks = 0, failures = 0;

  dvi_out dut (.clk, .rst, .pix_en, .pixel, .de, .hsync_n(hs), .vsync_n(vs), .dvi_d(d),
    .dvi_de(dde), .dvi_hsync_n(dhs), .dvi_vsync_n(dvs), .dvi_xclk_p(xp), .dvi_xclk_n(xn), .dvi_reset_n(rn));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 500; n++) begin
      rgb_t p;
      logic e, h, v;
      p = rgb_t'(24'($urandom)); e = 1'($urandom); h = 1'($urandom); v = 1'($urandom);
      pix_en = 1; pixel = p; de = e; hs = h; vs = v;
      @(negedge clk);
      pix_en = 0; pixel = rgb_t'(24'($urandom));   // must be ignored
      check(d == {p.g[3:0], p.b} && !xp && xn, "first half");
      check(dde == e && dhs == h && dvs == v && rn, "syncs with first half");
      @(negedge clk);
      check(d == {p.r, p.g[7:4]} && xp && !xn, "second half");
      check(dde == e && dhs == h && dvs == v, "syncs held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
