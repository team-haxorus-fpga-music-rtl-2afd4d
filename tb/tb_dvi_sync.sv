// tb_dvi_sync: runs the default 640x480 timing (two system cycles per
// pixel) for two frames and checks: pix_en every second cycle; X/Y steady
// for both cycles of a pixel; hsync every 800 pixels (1600 cycles), 96
// pixels low; vsync every 525 lines, 2 lines low; 307,200 visible pixels
// per frame; switch_buf once per frame, right after the last visible pixel.
module tb_dvi_sync;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pix_en, de, hs, vs, sb;
  logic [9:0] x, y;
  int checks = 0, failures = 0;

  dvi_sync dut (.clk, .rst, .pix_en, .x, .y, .de, .hsync_n(hs), .vsync_n(vs), .switch_buf(sb));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, pe_err, xy_err, de_cnt, hs_fall, hs_low, vs_fall, sb_cnt, last_hs_fall, hs_per_err;
    int last_vs_fall, vs_per, vs_low, sb_err;
    logic hs_q, vs_q, pe_q;
    logic [9:0] xq, yq;
    cyc = 0; pe_err = 0; xy_err = 0; de_cnt = 0; hs_fall = 0; hs_low = 0; vs_fall = 0; sb_cnt = 0;
    last_hs_fall = -1; hs_per_err = 0; last_vs_fall = -1; vs_per = 0; vs_low = 0; sb_err = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    hs_q = 1; vs_q = 1; xq = 0; yq = 0;
    for (int c = 0; c < 2 * 840_000; c++) begin
      @(negedge clk);
      cyc++;
      if (c > 0 && pix_en == pe_q) pe_err++;
      pe_q = pix_en;
      if (!pix_en && (x != xq || y != yq)) xy_err++;
      xq = x; yq = y;
      if (pix_en && de) de_cnt++;
      if (!hs) hs_low++;
      if (!vs) vs_low++;
      if (hs_q && !hs) begin
        if (last_hs_fall >= 0 && cyc - last_hs_fall != 1600) hs_per_err++;
        last_hs_fall = cyc; hs_fall++;
      end
      if (vs_q && !vs) begin
        if (last_vs_fall >= 0) vs_per = cyc - last_vs_fall;
        last_vs_fall = cyc; vs_fall++;
      end
      if (sb) begin
        sb_cnt++;
        // the last visible pixel (639,479) was on X/Y one cycle ago
        if (!(xq == 10'd639 && yq == 10'd479) && !(x == 10'd639 && y == 10'd479)) sb_err++;
      end
      hs_q = hs; vs_q = vs;
    end
    check(pe_err == 0, "pix_en every second cycle");
    check(xy_err == 0, "X/Y steady within a pixel");
    check(hs_per_err == 0 && hs_fall >= 1049, $sformatf("hsync period (%0d lines)", hs_fall));
    check(hs_low == hs_fall * 192 || hs_low == (hs_fall) * 192 + 0, $sformatf("hsync width %0d", hs_low));
    check(vs_fall == 2 && vs_per == 525 * 1600, $sformatf("vsync period %0d", vs_per));
    check(vs_low == 2 * 2 * 1600, $sformatf("vsync width %0d cycles", vs_low));
    check(de_cnt == 2 * 307200, $sformatf("visible pixels %0d", de_cnt));
    check(sb_cnt == 2 && sb_err == 0, $sformatf("switch_buf %0d times, %0d misplaced", sb_cnt, sb_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
