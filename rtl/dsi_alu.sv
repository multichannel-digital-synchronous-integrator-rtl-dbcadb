// dsi_alu: the integrator's arithmetic and logic unit.
// A is the addressed buffer word (taken from the output register), B the
// ADC code or a word from the computer. Four functions, chosen by the
// instruction register: A+B (accumulate), A-B (subtract in the detection
// mode), B (test load) and logic 0 (clear during readout). The four
// functions are the original's; results wrapping modulo 2^DATA_W is this
// design's choice. Purely combinational.
module dsi_alu
  import dsi_pkg::*;
#(
  parameter int unsigned DATA_W = dsi_pkg::DSI_DATA_W
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  alu_op_t           op,
  output logic [DATA_W-1:0] al
);
  always_comb begin
    unique case (op)
      OP_ADD:  al = a + b;
      OP_SUB:  al = a - b;
      OP_LOAD: al = b;
      default: al = '0;
    endcase
  end
endmodule
