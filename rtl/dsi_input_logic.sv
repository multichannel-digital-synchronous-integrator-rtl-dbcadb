// dsi_input_logic: source of the ALU's B operand.
// While CIN enables the module, B is the front-panel ADC code; otherwise it
// is the last word the computer wrote with the test write command, so codes
// can be loaded into the buffer and every ALU function exercised from the
// CAMAC bus. The AND-OR selection follows the original; holding the W word
// in a register (loaded when w_ld pulses) is this design's choice, because
// the W lines are valid only during the command.
module dsi_input_logic #(
  parameter int unsigned DATA_W = dsi_pkg::DSI_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] adc_code,
  input  logic              cin,
  input  logic [DATA_W-1:0] w,
  input  logic              w_ld,
  output logic [DATA_W-1:0] b
);
  logic [DATA_W-1:0] w_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    w_hold <= '0;
    else if (w_ld) w_hold <= w;
  end

  assign b = (adc_code & {DATA_W{cin}}) | (w_hold & {DATA_W{~cin}});
endmodule
