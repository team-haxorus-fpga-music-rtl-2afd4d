// ac97_cmd: codec register sequencer and volume control.
// Once the codec reports ready, the sequencer writes its register list in a
// loop, one register per AC-Link frame, using the cmd_valid/cmd_ack
// handshake of ac97_link. The list sets master and headphone volume from
// the current attenuation, mutes the line-in mixer volume (the ADC samples
// are only correct with line-in muted), sets PCM-out volume to 0 dB,
// selects line-in as the record source and sets the record gain to 0 dB.
// vol_up / vol_down pulses (from the Kinect gestures) lower or raise the
// master attenuation by one 1.5 dB step, limited to 0..31; because the list
// is rewritten continuously the new volume reaches the codec within one pass.
// Register addresses are the standard AC'97 map; the values other than the
// line-in mute, the loop and the default attenuation are own choices.
module ac97_cmd #(
  parameter logic [4:0] VOL_DEFAULT = 5'd8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        codec_ready,
  input  logic        vol_up,
  input  logic        vol_down,
  output logic        cmd_valid,
  output logic        cmd_read,
  output logic [6:0]  cmd_addr,
  output logic [15:0] cmd_data,
  input  logic        cmd_ack,
  output logic [4:0]  vol_atten
);
  import haxorus_pkg::*;
  localparam int unsigned N_CMDS = 6;
  logic [2:0] idx;

  always_comb begin
    cmd_read = 1'b0;
    case (idx)
      3'd0:    begin cmd_addr = AC97_REG_MASTER_VOL; cmd_data = {3'b000, vol_atten, 3'b000, vol_atten}; end
      3'd1:    begin cmd_addr = AC97_REG_HP_VOL;     cmd_data = {3'b000, vol_atten, 3'b000, vol_atten}; end
      3'd2:    begin cmd_addr = AC97_REG_LINEIN_VOL; cmd_data = 16'h8808; end  // muted
      3'd3:    begin cmd_addr = AC97_REG_PCMOUT_VOL; cmd_data = 16'h0808; end
      3'd4:    begin cmd_addr = AC97_REG_REC_SELECT; cmd_data = 16'h0404; end  // line in
      default: begin cmd_addr = AC97_REG_REC_GAIN;   cmd_data = 16'h0000; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      cmd_valid <= 1'b0;
      vol_atten <= VOL_DEFAULT;
    end else begin
      cmd_valid <= codec_ready;
      if (cmd_ack) idx <= (idx == 3'(N_CMDS - 1)) ? '0 : idx + 1'b1;
      if (vol_up && vol_atten != 5'd0)        vol_atten <= vol_atten - 1'b1;
      else if (vol_down && vol_atten != 5'd31) vol_atten <= vol_atten + 1'b1;
    end
  end
endmodule
