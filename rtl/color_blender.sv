// color_blender: blends the graphics layers into one pixel.
// Each of the N layers gives a colour and a valid bit for the current X/Y.
// Layers carry different weights (WEIGHTS[i]) so objects stand apart:
// shapes weigh more than the background and less than the waves. For each
// component the valid layers are averaged with their weights:
//   out.c = sum(w_i * c_i) / sum(w_i)   over valid layers,
// using one divider per component. No valid layer gives black.
// Timing: one register stage; pixel_out is valid one cycle after the inputs.
// The weight values are this design's own; the averaging follows the text.
module color_blender #(
  parameter int unsigned N = 9,
  parameter logic [N-1:0][3:0] WEIGHTS = {4'd4, 4'd3, 4'd3, 4'd3, 4'd4, 4'd4, 4'd4, 4'd2, 4'd1}
) (
  input  logic                        clk,
  input  logic [N-1:0]                in_valid,
  input  haxorus_pkg::rgb_t [N-1:0]   in_color,
  output haxorus_pkg::rgb_t           pixel_out
);
  import haxorus_pkg::*;
  localparam int unsigned SW = 8 + 4 + $clog2(N + 1);

  logic [SW-1:0] sum_r, sum_g, sum_b;
  logic [7:0]    sum_w;

  always_comb begin
    sum_r = '0; sum_g = '0; sum_b = '0; sum_w = '0;
    for (int i = 0; i < N; i++) begin
      if (in_valid[i]) begin
        sum_r += SW'(WEIGHTS[i] * in_color[i].r);
        sum_g += SW'(WEIGHTS[i] * in_color[i].g);
        sum_b += SW'(WEIGHTS[i] * in_color[i].b);
        sum_w += 8'(WEIGHTS[i]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (sum_w == 8'd0) pixel_out <= '0;
    else begin
      pixel_out.r <= 8'(sum_r / SW'(sum_w));
      pixel_out.g <= 8'(sum_g / SW'(sum_w));
      pixel_out.b <= 8'(sum_b / SW'(sum_w));
    end
  end
endmodule
