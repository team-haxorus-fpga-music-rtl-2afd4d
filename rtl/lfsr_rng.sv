// lfsr_rng: random number generator of the graphics engine.
// N_LFSR 8-bit linear feedback shift registers (x^8+x^6+x^5+x^4+1, maximal
// length) each step once per clock. Their seeds come from how long the user
// holds reset: a counter runs while rst is high, and when rst falls every
// LFSR is loaded with that count mixed with its own constant, so each one
// starts differently. Every RELOAD_CYCLES cycles each LFSR is reloaded with
// new data (a free-running counter mixed with its neighbour), so that the
// sequence does not simply repeat. A zero load is replaced by a non-zero
// constant, since the all-zero state would lock. rnd[i] is LFSR i.
// The polynomial, the mixing and RELOAD_CYCLES are this design's own.
module lfsr_rng #(
  parameter int unsigned N_LFSR = 8,
  parameter int unsigned RELOAD_CYCLES = 1 << 24
) (
  input  logic                  clk,
  input  logic                  rst,
  output logic [N_LFSR-1:0][7:0] rnd
);
  logic [15:0] hold_cnt;
  logic        rst_q;
  logic [31:0] run_cnt;
  logic [31:0] reload_cnt;

  function automatic logic [7:0] step(input logic [7:0] q);
    return {q[6:0], q[7] ^ q[5] ^ q[4] ^ q[3]};
  endfunction

  function automatic logic [7:0] nz(input logic [7:0] v, input int unsigned i);
    return (v == 8'd0) ? 8'(8'h5A + i) | 8'h01 : v;
  endfunction

  function automatic logic [7:0] kconst(input int unsigned i);
    return 8'(8'h1D * (i + 1) + 8'h35);
  endfunction

  always_ff @(posedge clk) begin
    rst_q   <= rst;
    run_cnt <= rst ? 32'd0 : run_cnt + 1'b1;
    if (rst) begin
      hold_cnt   <= (!rst_q) ? 16'd0 : hold_cnt + 1'b1;
      reload_cnt <= '0;
      for (int i = 0; i < N_LFSR; i++) rnd[i] <= nz(kconst(i), i);
    end else if (rst_q) begin
      for (int i = 0; i < N_LFSR; i++)
        rnd[i] <= nz(hold_cnt[7:0] ^ hold_cnt[15:8] ^ kconst(i), i);
    end else begin
      if (reload_cnt == 32'(RELOAD_CYCLES - 1)) begin
        reload_cnt <= '0;
        for (int i = 0; i < N_LFSR; i++)
          rnd[i] <= nz(run_cnt[7:0] ^ kconst(i) ^ rnd[(i + 1) % N_LFSR], i);
      end else begin
        reload_cnt <= reload_cnt + 1'b1;
        for (int i = 0; i < N_LFSR; i++) rnd[i] <= step(rnd[i]);
      end
    end
  end
endmodule
