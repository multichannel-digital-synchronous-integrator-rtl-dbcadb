// tb_dsi: one integrator module end to end, at its default 4096x16 size.
//  1. clear: A0F9 then 4096 x A0F0 empties the (random) buffer; a second
//     pass must read all zeros;
//  2. diagnostics: A0F17 selects each ALU function, A0F16 writes words
//     through it (load, add, subtract, zero), A0F0 reads them back;
//  3. integration: K channels, N modulation periods with CIN high; cells
//     0..K-1 must hold sum(a), K..2K-1 sum(e);
//  4. detection: same stimulus in the detection mode; cells 0..K-1 must hold
//     sum(a-e) modulo 2^16 and nothing beyond K is touched.
// Reference sums are computed here from the generated ADC codes. Also checks
// the strobe timing: A0F0 data is on R exactly 3 clocks after the command.
module tb_dsi;
  import dsi_pkg::*;
  localparam int K = 40, N = 3;
  logic clk = 0, rst_n = 0;
  logic [15:0] adc_code = 0, camac_r;
  logic end_conv = 0, fmod = 0, cin = 0, camac_n = 1, camac_q, camac_x, busy;
  camac_cmd_t camac = '0;
  int checks = 0, failures = 0;
  logic [15:0] sum_a [K], sum_e [K], test_ref [64];

  dsi dut (.clk, .rst_n, .adc_code, .end_conv, .fmod, .cin, .camac_n, .camac,
           .camac_r, .camac_q, .camac_x, .busy);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic clocks(int n); repeat (n) @(posedge clk); #1; endtask

  // one CAMAC cycle: S1 for one clock, then wait until the module is idle
  task automatic cmd(logic [4:0] f, logic [15:0] w = 0);
    camac.a = 0; camac.f = f; camac.w = w; camac.s1 = 1;
    #0; check(camac_x && camac_q, "X and Q for an accepted command");
    clocks(1); camac.s1 = 0;
    while (busy) clocks(1);
  endtask

  task automatic read_word(output logic [15:0] d);
    cmd(CF_READ);
    d = camac_r;
  endtask

  task automatic sample(logic [15:0] code);
    adc_code = code; clocks(1);
    end_conv = 1; clocks(2); end_conv = 0; clocks(6);
  endtask

  // N modulation periods: F high = Antenna, F low = Equivalent
  task automatic modulate(bit det);
    logic [15:0] a, e;
    for (int k = 0; k < K; k++) begin sum_a[k] = 0; sum_e[k] = 0; end
    for (int i = 0; i < N; i++) begin
      fmod = 1; clocks(6);
      for (int k = 0; k < K; k++) begin a = 16'($urandom % 4096); sum_a[k] += a; sample(a); end
      fmod = 0; clocks(6);
      for (int k = 0; k < K; k++) begin e = 16'($urandom % 4096); sum_e[k] += e; sample(e); end
    end
    clocks(6);
  endtask

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] d;
    int t0;
    clocks(3); rst_n = 1; clocks(4);

    // 1. clear the buffer by reading it out
    cmd(CF_RESET);
    for (int i = 0; i < 4096; i++) read_word(d);
    cmd(CF_RESET);
    for (int i = 0; i < 4096; i++) begin read_word(d); check(d == 0, "buffer cleared by readout"); end

    // read timing: R valid 3 clocks after the command, 0 before
    cmd(CF_RESET);
    camac.f = CF_READ; camac.s1 = 1; clocks(1); camac.s1 = 0;
    t0 = 1;
    while (!dut.rd_en) begin clocks(1); t0++; end
    check(t0 == 3, "A0F0 data after 3 clocks");
    while (busy) clocks(1);

    // 2. diagnostics through the CAMAC bus
    cmd(CF_LOAD, 16'(OP_LOAD));
    cmd(CF_RESET);
    for (int i = 0; i < 64; i++) begin test_ref[i] = 16'($urandom); cmd(CF_WRITE, test_ref[i]); end
    cmd(CF_LOAD, 16'(OP_ADD));
    cmd(CF_RESET);
    for (int i = 0; i < 64; i++) begin d = 16'($urandom); test_ref[i] += d; cmd(CF_WRITE, d); end
    cmd(CF_LOAD, 16'(OP_SUB));
    cmd(CF_RESET);
    for (int i = 0; i < 32; i++) begin d = 16'($urandom); test_ref[i] -= d; cmd(CF_WRITE, d); end
    cmd(CF_LOAD, 16'(OP_ZERO));
    for (int i = 32; i < 48; i++) begin test_ref[i] = 0; cmd(CF_WRITE, 16'hFFFF); end
    cmd(CF_RESET);
    for (int i = 0; i < 64; i++) begin read_word(d); check(d == test_ref[i], "diagnostic ALU result"); end

    // 3. integration mode
    cmd(CF_LOAD, 16'h0000);               // A+B, integration
    cin = 1; clocks(4);
    modulate(0);
    cin = 0; clocks(4);
    cmd(CF_RESET);
    for (int k = 0; k < K; k++) begin read_word(d); check(d == sum_a[k], "integration: file A"); end
    for (int k = 0; k < K; k++) begin read_word(d); check(d == sum_e[k], "integration: file E"); end
    for (int k = 0; k < 8; k++)  begin read_word(d); check(d == 0, "integration: nothing past 2K"); end

    // 4. detection mode
    cmd(CF_LOAD, 16'h0004);               // A+B, detection
    cin = 1; clocks(4);
    modulate(1);
    cin = 0; clocks(4);
    cmd(CF_RESET);
    for (int k = 0; k < K; k++) begin read_word(d); check(d == 16'(sum_a[k] - sum_e[k]), "detection: file D"); end
    for (int k = 0; k < K; k++) begin read_word(d); check(d == 0, "detection: only K cells used"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
