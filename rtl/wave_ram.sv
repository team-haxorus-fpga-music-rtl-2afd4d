// wave_ram: one wave buffer, a DEPTH x WIDTH block RAM with two ports.
// Port A is read-only and feeds the display: a_data is the word at a_addr
// one cycle later. Port B reads or writes for the buffer-update engine:
// when b_we is high b_wdata is written at b_addr, otherwise b_rdata is the
// word at b_addr one cycle later. Written as an array so that synthesis maps
// it to a true dual-port block RAM. Default 1024 x 10 bits: the X coordinate
// is the address and the Y coordinate the data.
module wave_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 10
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  output logic [WIDTH-1:0]         a_data,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic                     b_we,
  input  logic [WIDTH-1:0]         b_wdata,
  output logic [WIDTH-1:0]         b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) a_data <= mem[a_addr];

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    else      b_rdata <= mem[b_addr];
  end
endmodule
