// tb_dsi_out_reg: the output register must take d only in clocks where
// latch is high and hold it otherwise; checked against a reference each clock.
module tb_dsi_out_reg;
  logic clk = 0, rst_n = 0, latch = 0;
  logic [15:0] d = 0, q, ref_q = 0;
  int checks = 0, failures = 0;

  dsi_out_reg dut (.clk, .rst_n, .latch, .d, .q);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (q !== 16'd0) failures++;
    for (int i = 0; i < 2000; i++) begin
      latch = ($urandom % 3) == 0; d = 16'($urandom);
      @(posedge clk); #1;
      if (latch) ref_q = d;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL q=%h exp=%h", q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
