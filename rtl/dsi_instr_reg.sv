// dsi_instr_reg: instruction register selecting the ALU function.
// The control scheme sets it (ir_set, ir_code): A+B at each rise of F, A-B at
// each fall of F in the detection mode, 0 for every A0F0 readout. For tests
// the computer loads it directly (ld, CAMAC A0F17): W[1:0] is the function
// and W[2] the mode bit (1 = detection). A set from the control scheme wins
// over a load in the same clock. The mode bit, the load command and the
// reset value (A+B, integration) are this design's choices.
module dsi_instr_reg
  import dsi_pkg::*;
#(
  parameter int unsigned DATA_W = dsi_pkg::DSI_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ir_set,
  input  alu_op_t           ir_code,
  input  logic              ld,
  input  logic [DATA_W-1:0] w,
  output alu_op_t           op,
  output logic              det_mode
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op       <= OP_ADD;
      det_mode <= 1'b0;
    end else if (ir_set) begin
      op       <= ir_code;
    end else if (ld) begin
      op       <= alu_op_t'(w[1:0]);
      det_mode <= w[2];
    end
  end
endmodule
