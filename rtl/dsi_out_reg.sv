// dsi_out_reg: output register between the buffer store and the ALU.
// On the front of the writing strobe (latch high for one clock) it takes the
// addressed buffer word; it then feeds the ALU's A input and the CAMAC output
// gate. Reset to 0 is this design's choice.
module dsi_out_reg #(
  parameter int unsigned DATA_W = dsi_pkg::DSI_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              latch,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (latch) q <= d;
  end
endmodule
