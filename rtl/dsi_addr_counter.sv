// dsi_addr_counter: sequential address of the buffer store.
// Cleared by the reset pulse (reset int/det from F, or CAMAC A0F9) and
// advanced by one at the rear front of each writing strobe, so successive
// spectral channels land in successive cells. Clear has priority over
// increment; the count wraps past the last cell (the wrap is this design's
// choice). One clock: clr/inc act at the next rising edge.
module dsi_addr_counter #(
  parameter int unsigned ADDR_W = dsi_pkg::DSI_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              inc,
  output logic [ADDR_W-1:0] addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    addr <= '0;
    else if (clr)  addr <= '0;
    else if (inc)  addr <= addr + 1'b1;
  end
endmodule
