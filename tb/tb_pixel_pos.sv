// tb_pixel_pos: feeds depth bytes for a 5x3 frame, a frame cut short by a
// zero byte, and a full frame again, and checks the x/y of every pixel,
// the depth, frame_end on zero bytes, and the one-cycle latency.
module tb_pixel_pos;
  localparam int W = 5, H = 3;
  logic clk = 0, rst = 1;
  logic bv = 0;
  logic [7:0] bin = 0;
  logic pix_valid, frame_end;
  logic [9:0] pix_x, pix_y;
  logic [7:0] pix_depth;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pixel_pos #(.FRAME_W(W), .FRAME_H(H)) dut (.clk, .rst, .byte_valid(bv), .byte_in(bin),
    .pix_valid, .pix_x, .pix_y, .pix_depth, .frame_end);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int ex = 0, ey = 0;
  task automatic put(input logic [7:0] b);
    @(negedge clk); bv = 1; bin = b;
    @(negedge clk); bv = 0;
    if (b == 0) begin
      check(frame_end && !pix_valid, "frame_end expected");
      ex = 0; ey = 0;
    end else begin
      check(pix_valid && !frame_end, "pix_valid expected");
      check(pix_x == 10'(ex) && pix_y == 10'(ey) && pix_depth == b,
            $sformatf("pixel at %0d,%0d d=%0d expected %0d,%0d d=%0d", pix_x, pix_y, pix_depth, ex, ey, b));
      ex++;
      if (ex == W) begin ex = 0; ey = (ey + 1) % H; end
    end
    @(negedge clk);
    check(!pix_valid && !frame_end, "strobe longer than one cycle");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < W * H; i++) put(8'(1 + $urandom_range(0, 254)));
    put(0);
    for (int i = 0; i < 7; i++) put(8'(1 + i));
    put(0);
    for (int i = 0; i < W * H + 3; i++) put(8'(200 + i % 50));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
