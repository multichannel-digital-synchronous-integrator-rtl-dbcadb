// tb_dsi_ram: writes random words to random cells of the 4096x16 buffer,
// keeps a reference copy, and checks every read (one clock of read latency),
// including reads of every written cell at the end.
module tb_dsi_ram;
  logic clk = 0, we = 0;
  logic [11:0] addr = 0;
  logic [15:0] di = 0, do_q;
  logic [15:0] ref_mem [4096];
  bit written [4096];
  int checks = 0, failures = 0;

  dsi_ram dut (.clk, .we, .addr, .di, .do_q);
  always #5 clk = ~clk;

  task automatic wr(logic [11:0] ad, logic [15:0] d);
    we = 1; addr = ad; di = d;
    @(posedge clk); #1;
    we = 0;
    ref_mem[ad] = d; written[ad] = 1;
  endtask

  task automatic rd(logic [11:0] ad);
    addr = ad;
    @(posedge clk); #1;
    checks++;
    if (do_q !== ref_mem[ad]) begin
      failures++; $display("FAIL addr=%0d got=%h exp=%h", ad, do_q, ref_mem[ad]);
    end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < 4096; i++) wr(12'(i), 16'($urandom));
    for (int i = 0; i < 4096; i++) rd(12'(i));
    for (int i = 0; i < 3000; i++) begin
      if ($urandom % 2) wr(12'($urandom), 16'($urandom));
      else              rd(12'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
