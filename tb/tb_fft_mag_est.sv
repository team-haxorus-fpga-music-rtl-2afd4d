// tb_fft_mag_est: random and corner-case real/imaginary pairs. Checks the
// estimate against 15/16*max + 15/32*min worked out with integer division,
// that it stays within -7%/+5% of the true magnitude sqrt(re^2+im^2), and
// the one-cycle latency of valid, index and last.
module tb_fft_mag_est;
  localparam int W = 29;
  logic clk = 0, rst = 1;
  logic iv = 0, il = 0, ov, ol;
  logic signed [W-1:0] re = 0, im = 0;
  logic [11:0] idx = 0, oidx;
  logic [W-1:0] mag;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fft_mag_est #(.W(W)) dut (.clk, .rst, .in_valid(iv), .in_re(re), .in_im(im),
    .in_index(idx), .in_last(il), .out_valid(ov), .out_mag(mag), .out_index(oidx), .out_last(ol));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      longint a, b, mx, mn, e;
      real t;
      @(negedge clk);
      case (n)
        0: begin re = -(1 <<< (W - 1)); im = 0; end
        1: begin re = 0; im = 0; end
        2: begin re = (1 <<< (W - 1)) - 1; im = -(1 <<< (W - 1)); end
        default: begin
          re = W'($signed($urandom)) >>> (n % 8);
          im = W'($signed($urandom)) >>> ((n * 3) % 8);
        end
      endcase
      iv = 1; idx = 12'(n); il = (n % 100) == 99;
      a = re < 0 ? -longint'(re) : longint'(re);
      b = im < 0 ? -longint'(im) : longint'(im);
      mx = a > b ? a : b; mn = a > b ? b : a;
      e = (mx - mx / 16) + (mn / 2 - mn / 32);
      t = $sqrt(real'(a) * real'(a) + real'(b) * real'(b));
      @(negedge clk);
      iv = 0;
      check(ov && oidx == 12'(n) && ol == ((n % 100) == 99), "valid/index/last after one cycle");
      check(longint'(mag) == e, $sformatf("re=%0d im=%0d mag=%0d expected %0d", re, im, mag, e));
      if (t > 64.0)
        check(real'(mag) > 0.93 * t && real'(mag) < 1.05 * t, $sformatf("estimate %0d far from %f", mag, t));
      @(negedge clk);
      check(!ov, "valid for one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
