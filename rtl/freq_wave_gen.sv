// freq_wave_gen: frequency wave for one range of the spectrum.
// The FFT magnitude stream (one bin per valid cycle, index 0..4095) is
// watched for bins BIN_LO <= index < BIN_HI. Each such bin's height,
// min(mag >> MAG_SHIFT, MAX_H), is written at address index - BIN_LO of the
// back buffer, and summed. When the FFT signals its last bin (in_last) the
// two buffers swap, so the new spectrum is displayed without flicker, and
// band_avg becomes the mean height of the range (sum / number of bins),
// which sets the amplitude of one music wave.
// Display: screen column X shows bin BIN_LO + (X*SCALE >> 16), where
// SCALE = floor((BIN_HI-BIN_LO) * 65536 / 640), that is about
// X*(BIN_HI-BIN_LO)/640, as a line 2*THICK+1 pixels thick at
// Y = BASE_Y - height.
// With 48 kHz samples and 4096 bins a bin is about 11.7 Hz, so the default
// range 5..21 is 60-250 Hz (bass); 21..171 is 250-2,000 Hz and 171..512 is
// 2,000-6,000 Hz. Both buffers are cleared after reset (1024 cycles).
// Timing: valid/color for (x, y) two clock cycles later.
// Height scaling, line drawing and colour are this design's own choices.
// Port B of each buffer only writes (the bins arrive in order and are
// stored as they come), so its read data is left unused.
module freq_wave_gen #(
  parameter int unsigned MAG_W = 29,
  parameter int unsigned BIN_LO = 5,
  parameter int unsigned BIN_HI = 21,
  parameter int unsigned MAG_SHIFT = 14,
  parameter int unsigned MAX_H = 400,
  parameter int unsigned BASE_Y = 470,
  parameter int unsigned THICK = 1,
  parameter logic [23:0] COLOR = 24'hFF4000
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [11:0]          in_index,
  input  logic [MAG_W-1:0]     in_mag,
  input  logic                 in_last,
  input  haxorus_pkg::coord_t  x,
  input  haxorus_pkg::coord_t  y,
  output logic                 valid,
  output haxorus_pkg::rgb_t    color,
  output logic [9:0]           band_avg
);
  import haxorus_pkg::*;
  localparam int unsigned NBINS = BIN_HI - BIN_LO;
  localparam int unsigned SCALE = (NBINS * 65536) / H_ACTIVE;   // bins per column, Q16

  logic        fsel, clearing;
  logic [9:0]  clr_addr;
  logic [31:0] sum;
  logic [9:0]  height;
  logic        in_range;
  logic [9:0]  disp_addr;
  logic [9:0]  a_data [2];
  logic [9:0]  b_rdata [2];
  logic [9:0]  b_addr [2];
  logic [1:0]  b_we;
  logic [9:0]  b_wdata [2];

  assign in_range = (in_index >= 12'(BIN_LO)) && (in_index < 12'(BIN_HI));
  always_comb begin
    logic [MAG_W-1:0] h;
    h = in_mag >> MAG_SHIFT;
    height = (h > MAG_W'(MAX_H)) ? 10'(MAX_H) : 10'(h);
  end
  always_comb begin
    logic [25:0] p;
    p = 26'(x) * 26'(SCALE);
    disp_addr = 10'(p >> 16);
  end

  for (genvar i = 0; i < 2; i++) begin : g_buf
    wave_ram #(.DEPTH(1024), .WIDTH(10)) u_ram (
      .clk, .a_addr(disp_addr), .a_data(a_data[i]),
      .b_addr(b_addr[i]), .b_we(b_we[i]), .b_wdata(b_wdata[i]), .b_rdata(b_rdata[i]));
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      b_addr[i]  = clearing ? clr_addr : 10'(in_index - 12'(BIN_LO));
      b_wdata[i] = clearing ? 10'd0 : height;
      b_we[i]    = clearing;
    end
    if (!clearing) b_we[!fsel] = in_valid && in_range;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fsel <= 1'b0; clearing <= 1'b1; clr_addr <= '0; sum <= '0; band_avg <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == 10'd1023) clearing <= 1'b0;
    end else if (in_valid) begin
      logic [31:0] s;
      s = sum + (in_range ? 32'(height) : 32'd0);
      if (in_last) begin
        fsel     <= ~fsel;
        band_avg <= 10'(s / 32'(NBINS));
        sum      <= '0;
      end else sum <= s;
    end
  end

  coord_t y1;
  logic   on1;
  always_ff @(posedge clk) begin
    y1  <= y;
    on1 <= (x < 10'(H_ACTIVE)) && (y < 10'(V_ACTIVE));
  end
  always_ff @(posedge clk) begin
    logic [10:0] ly;
    logic [10:0] d;
    ly = 11'(BASE_Y) - 11'(a_data[fsel]);
    d  = (11'(y1) > ly) ? 11'(y1) - ly : ly - 11'(y1);
    valid <= on1 && (d <= 11'(THICK));
    color <= rgb_t'(COLOR);
  end
endmodule
