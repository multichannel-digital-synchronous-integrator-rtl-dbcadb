// tb_dsi_alu: checks the four ALU functions (A+B, A-B, B, 0) on directed
// corner values and random operands against a reference computed here,
// including wrap-around of sums and differences modulo 2^16.
module tb_dsi_alu;
  import dsi_pkg::*;
  logic [15:0] a, b, al, exp_v;
  alu_op_t op;
  int checks = 0, failures = 0;

  dsi_alu dut (.a, .b, .op, .al);

  function automatic logic [15:0] ref_alu(logic [15:0] x, logic [15:0] y, alu_op_t o);
    case (o)
      OP_ADD:  return 16'((32'(x) + 32'(y)) % 65536);
      OP_SUB:  return 16'((32'(x) + 65536 - 32'(y)) % 65536);
      OP_LOAD: return y;
      default: return 16'd0;
    endcase
  endfunction

  task automatic try(logic [15:0] x, logic [15:0] y, alu_op_t o);
    a = x; b = y; op = o; #1;
    exp_v = ref_alu(x, y, o);
    checks++;
    if (al !== exp_v) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h al=%h exp=%h", o, x, y, al, exp_v);
    end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    try(16'hFFFF, 16'h0001, OP_ADD);
    try(16'h0000, 16'h0001, OP_SUB);
    try(16'h1234, 16'h0F0F, OP_ADD);
    try(16'h1234, 16'h0F0F, OP_SUB);
    try(16'h1234, 16'hBEEF, OP_LOAD);
    try(16'h1234, 16'hBEEF, OP_ZERO);
    for (int i = 0; i < 400; i++)
      try(16'($urandom), 16'($urandom), alu_op_t'(i % 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
