// tb_dsi_instr_reg: checks the reset value (A+B, integration), loads from the
// control scheme and from the computer (W[1:0] function, W[2] mode), and the
// priority of a control-scheme set over a simultaneous computer load.
module tb_dsi_instr_reg;
  import dsi_pkg::*;
  logic clk = 0, rst_n = 0, ir_set = 0, ld = 0, det_mode;
  alu_op_t ir_code = OP_ADD, op, ref_op;
  logic ref_det;
  logic [15:0] w = 0;
  int checks = 0, failures = 0;

  dsi_instr_reg dut (.clk, .rst_n, .ir_set, .ir_code, .ld, .w, .op, .det_mode);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ref_op = OP_ADD; ref_det = 0;
    checks++; if (op !== OP_ADD || det_mode !== 1'b0) failures++;
    for (int i = 0; i < 2000; i++) begin
      ir_set = ($urandom % 3) == 0; ld = ($urandom % 3) == 0;
      ir_code = alu_op_t'($urandom % 4); w = 16'($urandom);
      @(posedge clk); #1;
      if (ir_set) ref_op = ir_code;
      else if (ld) begin ref_op = alu_op_t'(w[1:0]); ref_det = w[2]; end
      checks++;
      if (op !== ref_op || det_mode !== ref_det) begin
        failures++; $display("FAIL op=%0d exp=%0d det=%b exp=%b", op, ref_op, det_mode, ref_det);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
