// tb_ac97_cmd: acknowledges commands like the link does (one every 100
// cycles) and checks that nothing is issued before codec_ready, that the
// register list is written in order with line-in muted, that volume up/down
// move the attenuation by one step within 0..31, and that the master and
// headphone writes carry the current attenuation.
module tb_ac97_cmd;
  import haxorus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic ready = 0, up = 0, down = 0, cmd_valid, cmd_read, cmd_ack = 0;
  logic [6:0] cmd_addr;
  logic [15:0] cmd_data;
  logic [4:0] vol;
  int checks = 0, failures = 0;

  ac97_cmd #(.VOL_DEFAULT(5'd8)) dut (.clk, .rst, .codec_ready(ready), .vol_up(up), .vol_down(down),
    .cmd_valid, .cmd_read, .cmd_addr, .cmd_data, .cmd_ack, .vol_atten(vol));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam logic [6:0] ADDRS [6] = '{7'h02, 7'h04, 7'h10, 7'h18, 7'h1A, 7'h1C};

  task automatic take(input int k, input int exp_vol);
    logic [15:0] d;
    repeat (100) @(posedge clk);
    check(cmd_valid && !cmd_read, "command pending");
    check(cmd_addr == ADDRS[k], $sformatf("command %0d address %h", k, cmd_addr));
    case (k)
      0, 1: d = {3'b0, 5'(exp_vol), 3'b0, 5'(exp_vol)};
      2: d = 16'h8808;
      3: d = 16'h0808;
      4: d = 16'h0404;
      default: d = 16'h0000;
    endcase
    check(cmd_data == d, $sformatf("register %h data %h expected %h", cmd_addr, cmd_data, d));
    if (k == 2) check(cmd_data[15], "line-in muted");
    @(negedge clk); cmd_ack = 1; @(negedge clk); cmd_ack = 0;
  endtask

  task automatic pulse(input bit u);
    @(negedge clk); up = u; down = !u; @(negedge clk); up = 0; down = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    check(!cmd_valid, "no command before codec ready");
    ready = 1;
    v = 8;
    for (int k = 0; k < 6; k++) take(k, v);
    for (int i = 0; i < 3; i++) pulse(1);
    v = 5;
    check(vol == 5'(v), "volume up three steps");
    for (int k = 0; k < 6; k++) take(k, v);
    for (int i = 0; i < 40; i++) pulse(0);
    check(vol == 5'd31, "attenuation limited at 31");
    for (int i = 0; i < 40; i++) pulse(1);
    check(vol == 5'd0, "attenuation limited at 0");
    pulse(0);
    check(vol == 5'd1, "volume down one step");
    for (int k = 0; k < 6; k++) take(k, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
