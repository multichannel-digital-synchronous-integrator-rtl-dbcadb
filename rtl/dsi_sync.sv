// dsi_sync: STAGES-flip-flop synchroniser for a front-panel control line
// (F, CIN or END) entering the module clock domain. STAGES must be 2 or
// more. Output is 0 after reset and follows d STAGES clocks later. The
// original module's inputs are asynchronous edges; synchronising them into
// one clock domain is this design's own addition.
module dsi_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic [STAGES-1:0] r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= '0;
    else        r <= {r[STAGES-2:0], d};
  end
  assign q = r[STAGES-1];
endmodule
