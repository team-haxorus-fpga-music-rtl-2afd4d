// tb_wave_ram: writes random words through port B, then reads them back
// through both ports while port B keeps writing elsewhere. Checks the
// one-cycle read latency of both ports against a reference array, and
// that port B's read output holds during a write.
module tb_wave_ram;
  localparam int DEPTH = 1024, WIDTH = 10;
  logic clk = 0;
  logic [9:0] a_addr = 0, b_addr = 0;
  logic b_we = 0;
  logic [WIDTH-1:0] b_wdata = 0;
  logic [WIDTH-1:0] a_data, b_rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  wave_ram dut (.clk, .a_addr, .a_data, .b_addr, .b_we, .b_wdata, .b_rdata);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] held;
    // fill every word through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_we = 1; b_addr = 10'(i); b_wdata = WIDTH'($urandom);
      ref_mem[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    // random reads on both ports, one cycle latency
    for (int n = 0; n < 2000; n++) begin
      int ra, rb;
      ra = $urandom_range(0, DEPTH - 1);
      rb = $urandom_range(0, DEPTH - 1);
      @(negedge clk); a_addr = 10'(ra); b_addr = 10'(rb); b_we = 0;
      @(negedge clk);
      check(a_data == ref_mem[ra], $sformatf("port A @%0d: %0d expected %0d", ra, a_data, ref_mem[ra]));
      check(b_rdata == ref_mem[rb], $sformatf("port B @%0d: %0d expected %0d", rb, b_rdata, ref_mem[rb]));
      // a write on port B while port A reads another word
      held = b_rdata;
      b_we = 1; b_addr = 10'((rb + 1) % DEPTH); b_wdata = WIDTH'($urandom);
      ref_mem[(rb + 1) % DEPTH] = b_wdata;
      @(negedge clk);
      b_we = 0;
      check(b_rdata == held, "port B read output changed during a write");
      check(a_data == ref_mem[ra], "port A output changed while its address was held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
