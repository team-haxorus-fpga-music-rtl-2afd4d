// tb_ac97_link: runs the link against the behavioural codec (bit clock
// period 80 ns = 8 system cycles). Checks: SYNC high for exactly 16 bits in
// every frame; every incoming ADC sample pair equals what the codec sent;
// the PCM sent to the DAC equals pcm_out_l/r; a register write placed with
// cmd_valid arrives at the codec with its address and data and cmd_ack
// pulses once per frame; codec_ready follows the codec's tag bit; and the
// frame period is 256 bit clocks (2048 system cycles).
module tb_ac97_link;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic bit_clk, sdi, sdo, sync, reset_n;
  logic cmd_valid = 0, cmd_ack, status_valid, pcm_in_valid, codec_ready, frame_start;
  logic [6:0] cmd_addr = 0, status_addr;
  logic [15:0] cmd_data = 0, status_data, pcm_in_l, pcm_in_r;
  logic [15:0] pcm_out_l = 0, pcm_out_r = 0;
  int frames_rx, frames_tx, sync_errors, reg_writes;
  logic [15:0] last_pcm_l, last_pcm_r, last_wr_data;
  logic [6:0] last_wr_addr;
  int checks = 0, failures = 0;

  ac97_link dut (.clk, .rst, .ac97_bit_clk(bit_clk), .ac97_sdata_in(sdi), .ac97_sdata_out(sdo),
    .ac97_sync(sync), .ac97_reset_n(reset_n), .cmd_valid, .cmd_read(1'b0), .cmd_addr, .cmd_data,
    .cmd_ack, .status_valid, .status_addr, .status_data, .pcm_out_l, .pcm_out_r,
    .pcm_in_l, .pcm_in_r, .pcm_in_valid, .codec_ready, .frame_start);

  ac97_codec_model #(.HALF_NS(40), .READY_FRAMES(3)) codec (.bit_clk, .sdata_in(sdi), .sdata_out(sdo), .sync,
    .frames_rx, .frames_tx, .sync_errors, .reg_writes, .last_pcm_l, .last_pcm_r,
    .last_wr_addr, .last_wr_data);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [15:0] adc_l(input int n); return 16'(n * 97 + 3); endfunction
  function automatic logic [15:0] adc_r(input int n); return ~16'(n * 31); endfunction

  // ADC samples: the codec's frame n arrives complete during controller frame n
  int n_pcm = 0, last_fs = 0, cyc = 0, n_fs = 0, period_err = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && frame_start) begin
      if (n_fs > 1 && cyc - last_fs != 2048) period_err++;
      last_fs = cyc; n_fs++;
    end
    if (!rst && pcm_in_valid) begin
      int n;
      n = frames_tx - 1;
      check(pcm_in_l == adc_l(n) && pcm_in_r == adc_r(n),
            $sformatf("ADC frame %0d: %h %h expected %h %h", n, pcm_in_l, pcm_in_r, adc_l(n), adc_r(n)));
      n_pcm++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acks;
    repeat (5) @(posedge clk);
    rst = 0;
    @(posedge clk);
    check(reset_n, "codec reset released");
    // a few frames of PCM out
    for (int k = 0; k < 4; k++) begin
      pcm_out_l = 16'($urandom); pcm_out_r = 16'($urandom);
      repeat (2 * 2048) @(posedge clk);
      check(last_pcm_l == pcm_out_l && last_pcm_r == pcm_out_r, "DAC PCM in slots 3/4");
    end
    check(codec_ready, "codec ready seen");
    // register writes
    for (int k = 0; k < 5; k++) begin
      int w0;
      w0 = reg_writes;
      cmd_addr = 7'($urandom); cmd_data = 16'($urandom); cmd_valid = 1;
      acks = 0;
      while (!cmd_ack) @(posedge clk);
      @(negedge clk); cmd_valid = 0;
      repeat (2100) @(posedge clk) if (cmd_ack) acks++;
      check(acks == 0, "ack only while cmd_valid");
      check(reg_writes == w0 + 1 && last_wr_addr == cmd_addr && last_wr_data == cmd_data,
            $sformatf("write %h <= %h seen as %h <= %h", cmd_addr, cmd_data, last_wr_addr, last_wr_data));
    end
    check(sync_errors == 0, $sformatf("%0d frames with bad SYNC", sync_errors));
    check(n_pcm > 10, $sformatf("%0d ADC samples", n_pcm));
    check(period_err == 0 && n_fs > 10, "frame period 256 bit clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
