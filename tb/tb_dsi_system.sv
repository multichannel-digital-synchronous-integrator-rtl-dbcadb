// tb_dsi_system: the two-module integrator at its default size (two 4096x16
// buffers), run the way the spectral complex uses it: K = 1000 channels per
// modulation half-period, N modulation periods per integration.
//  cycle 0: both buffers are emptied by a readout pass; module 0 is then
//           diagnosed through the CAMAC test functions;
//  cycle 1: CIN high, module 0 integrates (integration mode);
//  cycle 2: CIN low, module 1 detects (detection mode) while the computer
//           reads module 0 (files A and E) at the same time;
//  cycle 3: CIN high, module 0 detects while module 1 (file D) is read.
// Every word read is compared with sums computed here from the generated
// ADC codes. The F edge that follows the last END of a half-period comes
// while that strobe still runs, so the queued address reset is exercised.
// Each mechanism is counted and must occur: reset int, reset det on the F
// fall (A-B), END strobes, A0F0 read+clear, A0F9, test write, instruction
// load, a queued event, and a readout overlapping the other module's
// acquisition.
module tb_dsi_system;
  import dsi_pkg::*;
  localparam int K = 1000, N = 3;
  logic clk = 0, rst_n = 0;
  logic [15:0] adc_code = 0, camac_r;
  logic end_conv = 0, fmod = 0, cin = 0, camac_q, camac_x;
  logic [1:0] camac_n = 0, busy;
  camac_cmd_t camac = '0;
  int checks = 0, failures = 0;
  logic [15:0] sum_a [K], sum_e [K], exp_a [K], exp_e [K], test_ref [16];
  int n_rst_int = 0, n_rst_det_fall = 0, n_end_strobe = 0, n_rd = 0, n_a0f9 = 0;
  int n_wr = 0, n_ld = 0, n_queued = 0, n_overlap = 0;
  bit acquiring = 0;

  dsi_system dut (.clk, .rst_n, .adc_code, .end_conv, .fmod, .cin, .camac_n, .camac,
                  .camac_r, .camac_q, .camac_x, .busy);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  // mechanism monitors on both modules
  for (genvar m = 0; m < 2; m++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_mod[m].u_dsi.u_ctl.ir_set && dut.g_mod[m].u_dsi.u_ctl.addr_rst &&
          dut.g_mod[m].u_dsi.u_ctl.ir_code == OP_ADD) n_rst_int++;
      if (dut.g_mod[m].u_dsi.u_ctl.ir_set && dut.g_mod[m].u_dsi.u_ctl.addr_rst &&
          dut.g_mod[m].u_dsi.u_ctl.ir_code == OP_SUB) n_rst_det_fall++;
      if (dut.g_mod[m].u_dsi.u_ctl.ev_end) n_end_strobe++;
      if (dut.g_mod[m].u_dsi.cmd_rd)  begin n_rd++; if (acquiring) n_overlap++; end
      if (dut.g_mod[m].u_dsi.cmd_rst) n_a0f9++;
      if (dut.g_mod[m].u_dsi.cmd_wr)  n_wr++;
      if (dut.g_mod[m].u_dsi.cmd_ld)  n_ld++;
      if (dut.g_mod[m].u_dsi.u_ctl.state != 0 &&
          (dut.g_mod[m].u_dsi.u_ctl.p_rise || dut.g_mod[m].u_dsi.u_ctl.p_fall)) n_queued++;
    end
  end

  task automatic clocks(int n); repeat (n) @(posedge clk); #1; endtask

  // CAMAC cycle to module m; waits for that module to finish
  task automatic cmd(int m, logic [4:0] f, logic [15:0] w = 0);
    camac_n = 2'b01 << m; camac.a = 0; camac.f = f; camac.w = w; camac.s1 = 1;
    #0; check(camac_x && camac_q, "X and Q for an accepted command");
    clocks(1); camac.s1 = 0; camac_n = 0;
    while (busy[m]) clocks(1);
  endtask

  task automatic read_word(int m, output logic [15:0] d);
    cmd(m, CF_READ);
    camac_n = 2'b01 << m; #0; d = camac_r; clocks(1); camac_n = 0;
  endtask

  task automatic sample(logic [15:0] code, bit last);
    adc_code = code; end_conv = 1;   // the ADC presents its code with END
    clocks(2); end_conv = 0;
    if (!last) clocks(7);
  endtask

  // N modulation periods on the front panel (the module CIN enables takes them)
  task automatic modulate();
    logic [15:0] a, e;
    for (int k = 0; k < K; k++) begin sum_a[k] = 0; sum_e[k] = 0; end
    for (int i = 0; i < N; i++) begin
      fmod = 1; clocks(4);
      for (int k = 0; k < K; k++) begin a = 16'($urandom % 1024); sum_a[k] += a; sample(a, k == K-1); end
      fmod = 0; clocks(4);          // edge arrives while the last strobe runs
      for (int k = 0; k < K; k++) begin e = 16'($urandom % 1024); sum_e[k] += e; sample(e, k == K-1); end
    end
    clocks(12);
  endtask

  task automatic read_and_check(int m, bit det);
    logic [15:0] d;
    cmd(m, CF_RESET);
    for (int k = 0; k < K; k++) begin
      read_word(m, d);
      check(d == (det ? 16'(exp_a[k] - exp_e[k]) : exp_a[k]), det ? "file D" : "file A");
    end
    for (int k = 0; k < K; k++) begin
      read_word(m, d);
      check(d == (det ? 16'd0 : exp_e[k]), det ? "nothing past K" : "file E");
    end
  endtask

  initial begin
    #200000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] d;
    clocks(3); rst_n = 1; clocks(4);

    // cycle 0: empty both buffers, check, then diagnose module 0
    for (int m = 0; m < 2; m++) begin
      cmd(m, CF_RESET);
      for (int i = 0; i < 4096; i++) read_word(m, d);
      cmd(m, CF_RESET);
      for (int i = 0; i < 4096; i++) begin read_word(m, d); check(d == 0, "buffer cleared"); end
    end
    cmd(0, CF_LOAD, 16'(OP_LOAD));
    cmd(0, CF_RESET);
    for (int i = 0; i < 16; i++) begin test_ref[i] = 16'($urandom); cmd(0, CF_WRITE, test_ref[i]); end
    cmd(0, CF_LOAD, 16'(OP_SUB));
    cmd(0, CF_RESET);
    for (int i = 0; i < 16; i++) begin d = 16'($urandom); test_ref[i] -= d; cmd(0, CF_WRITE, d); end
    cmd(0, CF_RESET);
    for (int i = 0; i < 16; i++) begin read_word(0, d); check(d == test_ref[i], "diagnostic"); end
    cmd(0, CF_LOAD, 16'h0000);              // integration mode
    cmd(1, CF_LOAD, 16'h0004);              // detection mode

    // cycle 1: module 0 integrates
    cin = 1; clocks(4);
    acquiring = 1; modulate(); acquiring = 0;
    exp_a = sum_a; exp_e = sum_e;

    // cycle 2: module 1 detects while module 0 is read out
    cin = 0; clocks(4);
    fork
      begin acquiring = 1; modulate(); acquiring = 0; end
      read_and_check(0, 0);
    join
    exp_a = sum_a; exp_e = sum_e;
    cmd(0, CF_LOAD, 16'h0004);              // module 0 to detection mode

    // cycle 3: module 0 detects while module 1 is read out
    cin = 1; clocks(4);
    fork
      begin acquiring = 1; modulate(); acquiring = 0; end
      read_and_check(1, 1);
    join
    exp_a = sum_a; exp_e = sum_e;
    cin = 0; clocks(4);
    read_and_check(0, 1);

    $display("mechanisms: reset_int=%0d reset_det_fall=%0d end_strobes=%0d A0F0=%0d A0F9=%0d",
             n_rst_int, n_rst_det_fall, n_end_strobe, n_rd, n_a0f9);
    $display("            test_write=%0d instr_load=%0d queued=%0d overlapped_reads=%0d",
             n_wr, n_ld, n_queued, n_overlap);
    check(n_rst_int > 0, "reset int happened");
    check(n_rst_det_fall > 0, "reset det on F fall happened");
    check(n_end_strobe == 3 * 2 * K * N, "every END gave one strobe");
    check(n_rd > 0 && n_a0f9 > 0, "readout commands happened");
    check(n_wr > 0 && n_ld > 0, "test commands happened");
    check(n_queued > 0, "queued event happened");
    check(n_overlap > 0, "readout overlapped acquisition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
