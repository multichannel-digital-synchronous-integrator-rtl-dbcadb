// tb_dsi_addr_counter: drives random clear/increment requests into the
// address counter and compares it every clock with a reference count; also
// checks that clear wins over increment and that the count wraps.
module tb_dsi_addr_counter;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [11:0] addr;
  int ref_cnt = 0;
  int checks = 0, failures = 0;

  dsi_addr_counter dut (.clk, .rst_n, .clr, .inc, .addr);
  always #5 clk = ~clk;

  task automatic step(logic c, logic i);
    clr = c; inc = i;
    @(posedge clk); #1;
    if (c) ref_cnt = 0; else if (i) ref_cnt = (ref_cnt + 1) % 4096;
    checks++;
    if (addr !== 12'(ref_cnt)) begin
      failures++; $display("FAIL addr=%0d exp=%0d", addr, ref_cnt);
    end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    checks++; if (addr !== 0) failures++;
    step(1, 1);                                  // clear wins
    for (int i = 0; i < 4100; i++) step(0, 1);   // wraps past 4095
    for (int i = 0; i < 2000; i++) step(($urandom % 50) == 0, $urandom % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
