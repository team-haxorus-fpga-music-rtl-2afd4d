// tb_lfsr_rng: holds reset for two different lengths and checks that each
// LFSR is seeded with (hold count low byte ^ high byte ^ its constant),
// that the eight LFSRs differ, that each then follows x^8+x^6+x^5+x^4+1
// step by step, that it never reaches zero, and that a reload happens after
// RELOAD_CYCLES cycles (the value then leaves the plain LFSR sequence for
// at least one register).
module tb_lfsr_rng;
  localparam int RELOAD = 300;
  logic clk = 0, rst = 0;
  always #5 clk = ~clk;
  logic [7:0][7:0] rnd;
  int checks = 0, failures = 0;

  lfsr_rng #(.N_LFSR(8), .RELOAD_CYCLES(RELOAD)) dut (.clk, .rst, .rnd);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] ref_step(input logic [7:0] q);
    logic fb;
    fb = q[7] ^ q[5] ^ q[4] ^ q[3];
    return {q[6:0], fb};
  endfunction
  function automatic logic [7:0] ref_seed(input int hold, input int i);
    logic [15:0] h;
    logic [7:0] v;
    h = 16'(hold);
    v = h[7:0] ^ h[15:8] ^ 8'(8'h1D * (i + 1) + 8'h35);
    return v == 0 ? (8'(8'h5A + i) | 8'h01) : v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int hold);
    logic [7:0][7:0] e;
    bit distinct, left_seq;
    @(negedge clk); rst = 1;
    repeat (hold) @(negedge clk);
    rst = 0;
    @(negedge clk);     // seeds loaded at this edge
    for (int i = 0; i < 8; i++) e[i] = ref_seed(hold - 1, i);
    check(rnd == e, $sformatf("seeds after %0d reset cycles: %h expected %h", hold, rnd, e));
    distinct = 1;
    for (int i = 0; i < 8; i++) for (int j = i + 1; j < 8; j++) if (rnd[i] == rnd[j]) distinct = 0;
    check(distinct, "LFSRs seeded differently");
    for (int s = 1; s < RELOAD; s++) begin
      for (int i = 0; i < 8; i++) e[i] = ref_step(e[i]);
      @(negedge clk);
      check(rnd == e, $sformatf("step %0d", s));
      for (int i = 0; i < 8; i++) check(rnd[i] != 0, "never zero");
    end
    for (int i = 0; i < 8; i++) e[i] = ref_step(e[i]);
    @(negedge clk);
    left_seq = (rnd != e);
    check(left_seq, "reload after RELOAD_CYCLES");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(37);
    run(600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
