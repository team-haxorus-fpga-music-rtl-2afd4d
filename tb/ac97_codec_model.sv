// ac97_codec_model: behavioural model of an AC'97 codec on the AC-Link, for
// simulation only (not synthesizable). It generates the bit clock, follows
// the controller's SYNC to find frame starts, samples the controller's
// serial data at falling bit-clock edges and drives its own frames on
// rising edges. Its frames carry tag bit 15 (codec ready, after READY_FRAMES
// frames), slots 3/4 valid and the ADC samples left(n) = n*97+3 and
// right(n) = ~(n*31) for frame n. Register writes received in slots 1/2 are
// stored in regs[]; PCM received in slots 3/4 is kept in the last_pcm_*
// outputs. sync_errors counts frames whose SYNC was not high for exactly the
// 16 bits of slot 0.
module ac97_codec_model #(
  parameter int HALF_NS = 20,
  parameter int READY_FRAMES = 2
) (
  output logic        bit_clk,
  output logic        sdata_in,
  input  logic        sdata_out,
  input  logic        sync,
  output int          frames_rx,
  output int          frames_tx,
  output int          sync_errors,
  output int          reg_writes,
  output logic [15:0] last_pcm_l,
  output logic [15:0] last_pcm_r,
  output logic [6:0]  last_wr_addr,
  output logic [15:0] last_wr_data
);
  logic [15:0] regs [128];
  logic [255:0] rx_frame, tx_frame;
  int  bit_f;          // index of the bit sampled at the last falling edge
  int  sync_len;
  logic sync_prev;
  bit   locked;

  function automatic logic [15:0] adc_l(input int n); return 16'(n * 97 + 3); endfunction
  function automatic logic [15:0] adc_r(input int n); return ~16'(n * 31); endfunction

  function automatic logic [255:0] make_frame(input int n);
    logic [15:0] tag;
    tag = {(n >= READY_FRAMES), 2'b00, 2'b11, 11'd0};
    return {tag, 20'd0, 20'd0, adc_l(n), 4'd0, adc_r(n), 4'd0, 160'd0};
  endfunction

  initial begin
    bit_clk = 0; sdata_in = 0; bit_f = 255; sync_prev = 0; locked = 0; sync_len = 0;
    frames_rx = 0; frames_tx = 0; sync_errors = 0; reg_writes = 0;
    last_pcm_l = 0; last_pcm_r = 0; last_wr_addr = 0; last_wr_data = 0;
    rx_frame = '0; tx_frame = make_frame(0);
    for (int i = 0; i < 128; i++) regs[i] = 16'hFFFF;
    forever #(HALF_NS * 1ns) bit_clk = ~bit_clk;
  end

  // falling edge: sample the controller
  always @(negedge bit_clk) if ($time > 0) begin
    if (sync && !sync_prev) begin
      bit_f = 0;
      locked = 1;
      sync_len = 0;
    end else bit_f = bit_f + 1;
    sync_prev = sync;
    rx_frame[255 - (bit_f % 256)] = sdata_out;
    if (sync && locked) sync_len++;
    if (bit_f == 255 && locked) begin
      if (sync_len != 16) begin sync_errors++; $display("codec model: SYNC %0d bits in frame %0d at %t", sync_len, frames_rx, $time); end
      sync_len = 0;
      frames_rx++;
      if (rx_frame[255]) begin
        if (rx_frame[254] && rx_frame[253] && !rx_frame[239]) begin
          regs[rx_frame[238:232]] = rx_frame[219:204];
          last_wr_addr = rx_frame[238:232];
          last_wr_data = rx_frame[219:204];
          reg_writes++;
        end
        if (rx_frame[252]) last_pcm_l = rx_frame[199:184];
        if (rx_frame[251]) last_pcm_r = rx_frame[179:164];
      end
    end
  end

  // rising edge: drive the next bit of our frame
  always @(posedge bit_clk) if ($time > 0) begin
    int nb;
    nb = (bit_f + 1) % 256;
    if (nb == 0) begin
      tx_frame = make_frame(frames_tx);
      frames_tx++;
    end
    sdata_in <= tx_frame[255 - nb];
  end
endmodule
