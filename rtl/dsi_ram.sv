// dsi_ram: the buffer store, DEPTH x DATA_W (4096 x 16 as in the original).
// Single port: the word at addr is written with di when we is high, and
// do_q registers the word at addr every clock (synchronous read, old data
// on a write to the same cell). Like the original memory chip it has no
// reset: the cells are emptied by reading them out through a zeroing ALU.
module dsi_ram #(
  parameter int unsigned DATA_W = dsi_pkg::DSI_DATA_W,
  parameter int unsigned ADDR_W = dsi_pkg::DSI_ADDR_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] di,
  output logic [DATA_W-1:0] do_q
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= di;
    do_q <= mem[addr];
  end
endmodule
