// wave_gen: one music-driven wave of the graphics engine.
// The wave is stored as its Y coordinate per X column in a 1024 x 10 block
// RAM: a wave passes the vertical line test, so one Y per X suffices.
// Motion: once per frame the wave moves one column to the left. Two buffers
// are used (double buffering): the display reads the front buffer while the
// update engine copies front[a+1] into back[a] for a = 0..638 and writes the
// newly computed Y into back[639]. At the next frame_tick (switch_buf) the
// buffers swap, so the newly written one is displayed and the old one is
// overwritten. The copy takes about 640 cycles, far less than a frame.
// The new Y follows a phase register: UP (Y falls by speed per column until
// CENTER_Y - amplitude), DOWN (Y rises until CENTER_Y + amplitude) and, for
// wave type 1, CONST (Y held for FLAT_COLS columns) before going UP again.
// The amplitude is amp_in, an average of one FFT range, limited to MAX_AMP;
// the line thickness follows the loudness |audio_ampl|, 1 + |a|/2048 pixels,
// both sampled once per frame. Speed (1..8) and colour are random, set at
// the first frame after reset and by cmd_rand; cmd_type switches the type.
// After reset both buffers are filled with CENTER_Y (1024 cycles).
// Timing: valid/color for (x, y) two clock cycles later (RAM read, compare).
// The phase rule, FLAT_COLS, the thickness formula and MAX_AMP are own choices.
// Only the top five bits of |audio_ampl| set the thickness; the rest are unused.
module wave_gen #(
  parameter int unsigned CENTER_Y = 240,
  parameter int unsigned MAX_AMP = 200,
  parameter int unsigned FLAT_COLS = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 frame_tick,
  input  logic [2:0][7:0]      rnd,
  input  logic                 cmd_rand,
  input  logic                 cmd_type,
  input  logic [9:0]           amp_in,
  input  logic signed [15:0]   audio_ampl,
  input  haxorus_pkg::coord_t  x,
  input  haxorus_pkg::coord_t  y,
  output logic                 valid,
  output haxorus_pkg::rgb_t    color,
  output logic                 busy
);
  import haxorus_pkg::*;
  typedef enum logic [1:0] {PH_UP, PH_DOWN, PH_CONST} phase_t;
  typedef enum logic [1:0] {U_CLEAR, U_IDLE, U_COPY, U_LAST} upd_t;

  logic       fsel;                 // buffer displayed: 0 or 1
  upd_t       ust;
  logic [9:0] ua;                   // update address
  logic       rd_pending;
  phase_t     phase;
  logic [9:0] cur_y, amp, width;
  logic [3:0] speed;
  logic [7:0] flat_cnt;
  logic       wtype, need_init;
  rgb_t       wcolor;

  logic [9:0] a_data [2];
  logic [9:0] b_rdata [2];
  logic [9:0] b_addr [2];
  logic [1:0] b_we;
  logic [9:0] b_wdata [2];
  logic [9:0] copy_q;

  for (genvar i = 0; i < 2; i++) begin : g_buf
    wave_ram #(.DEPTH(1024), .WIDTH(10)) u_ram (
      .clk, .a_addr(x), .a_data(a_data[i]),
      .b_addr(b_addr[i]), .b_we(b_we[i]), .b_wdata(b_wdata[i]), .b_rdata(b_rdata[i]));
  end

  // port B use: clear both, or read front at ua+1 and write back at ua
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      b_addr[i]  = ua;
      b_we[i]    = 1'b0;
      b_wdata[i] = 10'(CENTER_Y);
    end
    copy_q = b_rdata[fsel];
    case (ust)
      U_CLEAR: begin b_we = 2'b11; end
      U_COPY: begin
        b_addr[fsel]  = ua + 10'd1;
        b_addr[!fsel] = ua - 10'd1;
        b_we[!fsel]   = rd_pending;
        b_wdata[!fsel] = copy_q;
      end
      U_LAST: begin
        b_addr[!fsel]  = 10'(H_ACTIVE - 1);
        b_we[!fsel]    = 1'b1;
        b_wdata[!fsel] = cur_y;
      end
      default: ;
    endcase
  end

  // next Y of the wave
  function automatic logic [9:0] clamp_y(input int v);
    if (v < 0) return 10'd0;
    if (v > int'(V_ACTIVE - 1)) return 10'(V_ACTIVE - 1);
    return 10'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      fsel <= 1'b0; ust <= U_CLEAR; ua <= '0; rd_pending <= 1'b0;
      phase <= PH_UP; cur_y <= 10'(CENTER_Y); amp <= '0; width <= 10'd1;
      speed <= 4'd1; flat_cnt <= '0; wtype <= 1'b0; need_init <= 1'b1;
      wcolor <= '0;
    end else begin
      if (cmd_rand || (need_init && frame_tick)) begin
        speed     <= 4'd1 + 4'(rnd[0][2:0]);
        wcolor    <= '{r: rnd[1], g: rnd[2], b: rnd[0] | 8'h40};
        need_init <= 1'b0;
      end
      if (cmd_type) wtype <= ~wtype;
      case (ust)
        U_CLEAR: begin
          ua <= ua + 1'b1;
          if (ua == 10'd1023) ust <= U_IDLE;
        end
        U_IDLE: begin
          if (frame_tick) begin
            logic [15:0] mag;
            int ny;
            fsel  <= ~fsel;       // newly written buffer becomes the display
            ust   <= U_COPY;
            ua    <= '0;
            rd_pending <= 1'b0;
            amp   <= (amp_in > 10'(MAX_AMP)) ? 10'(MAX_AMP) : amp_in;
            mag   = audio_ampl[15] ? 16'(-audio_ampl) : 16'(audio_ampl);
            width <= 10'd1 + 10'(mag[15:11]);
            // advance the wave phase by one column
            case (phase)
              PH_UP: begin
                ny = int'(cur_y) - int'(speed);
                if (ny <= int'(CENTER_Y) - int'(amp)) phase <= PH_DOWN;
                cur_y <= clamp_y(ny);
              end
              PH_DOWN: begin
                ny = int'(cur_y) + int'(speed);
                if (ny >= int'(CENTER_Y) + int'(amp)) begin
                  phase <= wtype ? PH_CONST : PH_UP;
                  flat_cnt <= '0;
                end
                cur_y <= clamp_y(ny);
              end
              default: begin
                flat_cnt <= flat_cnt + 1'b1;
                if (flat_cnt == 8'(FLAT_COLS - 1)) phase <= PH_UP;
              end
            endcase
          end
        end
        U_COPY: begin
          // the read of front[ua+1] issued now is written to back[ua] next cycle
          rd_pending <= 1'b1;
          ua <= ua + 1'b1;
          if (ua == 10'(H_ACTIVE - 1)) ust <= U_LAST;
        end
        default: ust <= U_IDLE;   // U_LAST writes the new column
      endcase
    end
  end

  assign busy = (ust != U_IDLE);

  // display: stage 1 is the RAM read, stage 2 the compare
  coord_t y1;
  logic   on1;
  always_ff @(posedge clk) begin
    y1  <= y;
    on1 <= (x < 10'(H_ACTIVE)) && (y < 10'(V_ACTIVE));
  end
  always_ff @(posedge clk) begin
    logic [9:0] wy, d;
    wy = a_data[fsel];
    d  = (y1 > wy) ? y1 - wy : wy - y1;
    valid <= on1 && !need_init && (d <= width);
    color <= wcolor;
  end
endmodule
