// tb_dsi_capacity: fills one module's whole 4096-word buffer.
// Integration mode with K = 2048 channels uses cells 0..4095 (files A and E),
// the largest channel count that mode can hold; detection mode with
// K = 4096 channels uses every cell for file D. Two modulation periods each;
// every cell is read back over CAMAC and compared with sums computed here,
// and a second readout pass checks that reading cleared the buffer.
module tb_dsi_capacity;
  import dsi_pkg::*;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  logic [15:0] adc_code = 0, camac_r;
  logic end_conv = 0, fmod = 0, cin = 0, camac_n = 1, camac_q, camac_x, busy;
  camac_cmd_t camac = '0;
  int checks = 0, failures = 0;
  logic [15:0] sum_a [4096], sum_e [4096];

  dsi dut (.clk, .rst_n, .adc_code, .end_conv, .fmod, .cin, .camac_n, .camac,
           .camac_r, .camac_q, .camac_x, .busy);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic clocks(int n); repeat (n) @(posedge clk); #1; endtask

  task automatic cmd(logic [4:0] f, logic [15:0] w = 0);
    camac.a = 0; camac.f = f; camac.w = w; camac.s1 = 1;
    clocks(1); camac.s1 = 0;
    while (busy) clocks(1);
  endtask

  task automatic read_word(output logic [15:0] d);
    cmd(CF_READ); d = camac_r;
  endtask

  task automatic sample(logic [15:0] code);
    adc_code = code; end_conv = 1; clocks(2); end_conv = 0; clocks(7);
  endtask

  task automatic modulate(int k_ch);
    logic [15:0] v;
    for (int k = 0; k < k_ch; k++) begin sum_a[k] = 0; sum_e[k] = 0; end
    for (int i = 0; i < N; i++) begin
      fmod = 1; clocks(4);
      for (int k = 0; k < k_ch; k++) begin v = 16'($urandom); sum_a[k] += v; sample(v); end
      fmod = 0; clocks(4);
      for (int k = 0; k < k_ch; k++) begin v = 16'($urandom); sum_e[k] += v; sample(v); end
    end
    clocks(12);
  endtask

  task automatic clear_and_check();
    logic [15:0] d;
    cmd(CF_RESET);
    for (int i = 0; i < 4096; i++) begin read_word(d); check(d == 0, "buffer empty"); end
  endtask

  initial begin
    #500000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] d;
    clocks(3); rst_n = 1; clocks(4);
    cmd(CF_RESET);
    for (int i = 0; i < 4096; i++) read_word(d);
    clear_and_check();

    // integration, K = 2048: A in 0..2047, E in 2048..4095
    cmd(CF_LOAD, 16'h0000);
    cin = 1; clocks(4); modulate(2048); cin = 0; clocks(4);
    cmd(CF_RESET);
    for (int k = 0; k < 2048; k++) begin read_word(d); check(d == sum_a[k], "K=2048 file A"); end
    for (int k = 0; k < 2048; k++) begin read_word(d); check(d == sum_e[k], "K=2048 file E"); end
    clear_and_check();

    // detection, K = 4096: D in every cell
    cmd(CF_LOAD, 16'h0004);
    cin = 1; clocks(4); modulate(4096); cin = 0; clocks(4);
    cmd(CF_RESET);
    for (int k = 0; k < 4096; k++) begin read_word(d); check(d == 16'(sum_a[k] - sum_e[k]), "K=4096 file D"); end
    clear_and_check();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
