// ac97_link: AC-Link frame engine between the FPGA and the AC'97 codec.
// A frame is 256 bits sent MSB first: slot 0 (16-bit tag) then slots 1-12
// (20 bits each). SYNC is high for the 16 bit clocks of slot 0. Outgoing
// frames carry the tag (frame valid, and which of slots 1-4 are valid), a
// register command in slots 1/2 (slot 1 bit 19 = 1 for a read, bits 18:12
// the register address; slot 2 the 16 write data bits above 4 zero bits) and
// the left/right PCM for the DAC in slots 3/4 (16 bits above 4 zeros).
// Slots 5-12 are sent as zeros and ignored on input.
// The whole link runs in the system clock domain: the codec's bit clock is
// synchronised and its edges detected. Outgoing bits and SYNC change after a
// rising bit-clock edge; incoming bits are sampled at the falling edge (the
// AC'97 convention). When a complete incoming frame has been received,
// codec_ready (tag bit 15) is updated, and if tag bits 12/11 mark slots 3/4
// valid, pcm_in_l/r take the ADC samples and pcm_in_valid pulses once:
// one sample per frame, 48 kHz with the 12.288 MHz bit clock.
// Command handshake: cmd_valid is held with cmd_read/cmd_addr/cmd_data; the
// command is placed into the next frame and cmd_ack pulses at that frame's
// start. Read data returned in slot 2 appears on status_data with
// status_valid. The 2-flop synchroniser and this handshake are own choices;
// an assertion checks the handshake rule in simulation.
// The receive shift register keeps 255 bits: with the bit being sampled they
// form the whole frame, so bit 255 of in_sr is never read.
module ac97_link (
  input  logic        clk,
  input  logic        rst,
  // codec pins
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sdata_out,
  output logic        ac97_sync,
  output logic        ac97_reset_n,
  // register commands
  input  logic        cmd_valid,
  input  logic        cmd_read,
  input  logic [6:0]  cmd_addr,
  input  logic [15:0] cmd_data,
  output logic        cmd_ack,
  output logic        status_valid,
  output logic [6:0]  status_addr,
  output logic [15:0] status_data,
  // PCM
  input  logic [15:0] pcm_out_l,
  input  logic [15:0] pcm_out_r,
  output logic [15:0] pcm_in_l,
  output logic [15:0] pcm_in_r,
  output logic        pcm_in_valid,
  output logic        codec_ready,
  output logic        frame_start
);
  localparam int unsigned FRAME_BITS = 256;

  logic [2:0]   bclk_q;
  logic         bclk_rise, bclk_fall;
  logic [7:0]   bit_cnt;       // index of the bit currently on the line
  logic         running;       // a frame has been started
  logic [255:0] out_sr, in_sr, new_frame, in_frame;
  logic [15:0]  out_tag;
  logic         with_cmd;

  assign bclk_rise = bclk_q[1] & ~bclk_q[2];
  assign bclk_fall = ~bclk_q[1] & bclk_q[2];

  assign with_cmd = cmd_valid;
  assign out_tag  = {1'b1, with_cmd, with_cmd & ~cmd_read, 1'b1, 1'b1, 11'd0};
  assign new_frame = {out_tag,
                      cmd_read, cmd_addr, 12'd0,
                      cmd_data, 4'd0,
                      pcm_out_l, 4'd0,
                      pcm_out_r, 4'd0,
                      160'd0};
  assign in_frame = {in_sr[254:0], ac97_sdata_in};

  always_ff @(posedge clk) begin
    if (rst) begin
      bclk_q        <= '0;
      bit_cnt       <= 8'(FRAME_BITS - 1);
      running       <= 1'b0;
      out_sr        <= '0;
      in_sr         <= '0;
      ac97_sdata_out <= 1'b0;
      ac97_sync     <= 1'b0;
      ac97_reset_n  <= 1'b0;
      cmd_ack       <= 1'b0;
      status_valid  <= 1'b0;
      status_addr   <= '0;
      status_data   <= '0;
      pcm_in_l      <= '0;
      pcm_in_r      <= '0;
      pcm_in_valid  <= 1'b0;
      codec_ready   <= 1'b0;
      frame_start   <= 1'b0;
    end else begin
      bclk_q       <= {bclk_q[1:0], ac97_bit_clk};
      ac97_reset_n <= 1'b1;
      cmd_ack      <= 1'b0;
      pcm_in_valid <= 1'b0;
      status_valid <= 1'b0;
      frame_start  <= 1'b0;
      if (bclk_rise) begin
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == 8'(FRAME_BITS - 1)) begin
          // start of a new frame
          running        <= 1'b1;
          frame_start    <= 1'b1;
          cmd_ack        <= with_cmd;
          ac97_sdata_out <= new_frame[255];
          out_sr         <= {new_frame[254:0], 1'b0};
          ac97_sync      <= 1'b1;
        end else begin
          ac97_sdata_out <= out_sr[255];
          out_sr         <= {out_sr[254:0], 1'b0};
          ac97_sync      <= (bit_cnt + 1'b1) < 8'd16;
        end
      end
      if (bclk_fall && running) begin
        in_sr <= in_frame;
        if (bit_cnt == 8'(FRAME_BITS - 1)) begin
          codec_ready <= in_frame[255];
          if (in_frame[252] && in_frame[251]) begin
            pcm_in_l     <= in_frame[199:184];
            pcm_in_r     <= in_frame[179:164];
            pcm_in_valid <= 1'b1;
          end
          if (in_frame[254] && in_frame[253]) begin
            status_addr  <= in_frame[238:232];
            status_data  <= in_frame[219:204];
            status_valid <= 1'b1;
          end
        end
      end
    end
  end

  // Handshake rule: once raised, cmd_valid stays high with the same
  // cmd_read/cmd_addr until cmd_ack (cmd_data may still be updated: it is
  // taken at the frame start, together with the acknowledge).
  logic       cmd_pending;
  logic [7:0] cmd_held;
  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_pending <= 1'b0;
      cmd_held    <= '0;
    end else begin
      if (cmd_pending)
        assert (cmd_valid && {cmd_read, cmd_addr} == cmd_held)
          else $error("ac97_link: command withdrawn or changed before cmd_ack");
      cmd_pending <= cmd_valid && !cmd_ack;
      cmd_held    <= {cmd_read, cmd_addr};
    end
  end
endmodule
