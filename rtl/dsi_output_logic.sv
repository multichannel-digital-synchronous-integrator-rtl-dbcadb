// dsi_output_logic: gate from the output register to the CAMAC read lines.
// R1-R16 carry the output register only while the module answers an A0F0
// read (rd_en), and are 0 otherwise so that several modules can share the
// dataway as a wired OR. An AND gate per bit, as in the original.
module dsi_output_logic #(
  parameter int unsigned DATA_W = dsi_pkg::DSI_DATA_W
) (
  input  logic [DATA_W-1:0] d,
  input  logic              rd_en,
  output logic [DATA_W-1:0] r
);
  assign r = d & {DATA_W{rd_en}};
endmodule
