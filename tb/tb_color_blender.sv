// tb_color_blender: random valid bits and colours for the nine layers,
// checked one cycle later against the weighted average per component,
// worked out with the same weights (1,2,4,4,4,3,3,3,4) and integer division;
// no valid layer must give black.
module tb_color_blender;
  import haxorus_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [8:0] v;
  rgb_t [8:0] c;
  rgb_t out;
  int checks = 0, failures = 0;
  localparam int WT [9] = '{1, 2, 4, 4, 4, 3, 3, 3, 4};

  color_blender #(.N(9)) dut (.clk, .in_valid(v), .in_color(c), .pixel_out(out));

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
    for (int n = 0; n < 2000; n++) begin
      int sr, sg, sb, sw;
      rgb_t e;
      @(negedge clk);
      v = (n % 50 == 0) ? 9'd0 : 9'($urandom);
      for (int i = 0; i < 9; i++) c[i] = rgb_t'(24'($urandom));
      sr = 0; sg = 0; sb = 0; sw = 0;
      for (int i = 0; i < 9; i++) if (v[i]) begin
        sr += WT[i] * c[i].r; sg += WT[i] * c[i].g; sb += WT[i] * c[i].b; sw += WT[i];
      end
      e = (sw == 0) ? '0 : '{r: 8'(sr / sw), g: 8'(sg / sw), b: 8'(sb / sw)};
      @(negedge clk);
      check(out == e, $sformatf("valid %b: %h expected %h", v, out, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
