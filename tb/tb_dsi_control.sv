// tb_dsi_control: drives the control scheme with synchronised F, CIN, END
// and decoded CAMAC command pulses, and checks what it orders:
//  - every strobe is LATCH, WRITE, INC on three consecutive clocks;
//  - F rise (with CIN) resets the address with code A+B; F fall does so with
//    A-B in the detection mode only; nothing happens with CIN low;
//  - A0F9 resets the address without touching the instruction;
//  - A0F0 sets code 0 before its strobe and opens the read gate, which the
//    next command closes; a test write runs a strobe with no new code;
//  - an END arriving during a strobe is queued and served afterwards.
module tb_dsi_control;
  import dsi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fmod_s = 0, cin_s = 0, end_s = 0, det_mode = 0;
  logic cmd_rd = 0, cmd_rst = 0, cmd_wr = 0, cmd_any = 0;
  logic addr_rst, addr_inc, ram_we, out_latch, ir_set, rd_en, busy;
  alu_op_t ir_code;
  int checks = 0, failures = 0;
  int n_latch = 0, n_we = 0, n_inc = 0, n_rst = 0, n_set_add = 0, n_set_sub = 0, n_set_zero = 0;
  logic latch_d1 = 0, latch_d2 = 0;

  dsi_control dut (.clk, .rst_n, .fmod_s, .cin_s, .end_s, .det_mode, .cmd_rd, .cmd_rst,
                   .cmd_wr, .cmd_any, .addr_rst, .addr_inc, .ram_we, .out_latch, .ir_set,
                   .ir_code, .rd_en, .busy);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // monitor: count pulses, check strobe phase order
  always @(posedge clk) if (rst_n) begin
    latch_d1 <= out_latch; latch_d2 <= latch_d1;
    if (out_latch) n_latch++;
    if (ram_we)    begin n_we++;  check(latch_d1 && !out_latch, "WRITE follows LATCH"); end
    if (addr_inc)  begin n_inc++; check(latch_d2 && !ram_we, "INC follows WRITE"); end
    if (addr_rst)  n_rst++;
    if (ir_set && ir_code == OP_ADD)  n_set_add++;
    if (ir_set && ir_code == OP_SUB)  n_set_sub++;
    if (ir_set && ir_code == OP_ZERO) n_set_zero++;
  end

  task automatic clocks(int n); repeat (n) @(posedge clk); #1; endtask
  task automatic pulse_end(); end_s = 1; clocks(1); end_s = 0; endtask
  task automatic wait_idle(); while (busy) clocks(1); clocks(1); endtask
  task automatic zero();
    n_latch = 0; n_we = 0; n_inc = 0; n_rst = 0; n_set_add = 0; n_set_sub = 0; n_set_zero = 0;
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clocks(2); rst_n = 1; clocks(2);
    // integration: F rise resets with A+B
    cin_s = 1; clocks(1); zero();
    fmod_s = 1; clocks(3);
    check(n_rst == 1 && n_set_add == 1, "F rise: reset int with A+B");
    // one END = one strobe, 3 clocks + idle
    zero(); pulse_end(); wait_idle();
    check(n_latch == 1 && n_we == 1 && n_inc == 1, "END gives one strobe");
    // END during a strobe is queued
    zero(); pulse_end(); clocks(1); pulse_end(); wait_idle();
    check(n_latch == 2 && n_inc == 2, "queued END served");
    // F fall in integration mode does nothing
    zero(); fmod_s = 0; clocks(3);
    check(n_rst == 0 && n_set_sub == 0, "F fall ignored in integration mode");
    // detection: both edges
    det_mode = 1; zero();
    fmod_s = 1; clocks(3); fmod_s = 0; clocks(3);
    check(n_rst == 2 && n_set_add == 1 && n_set_sub == 1, "detection: reset det on both edges");
    // CIN low: F and END ignored
    cin_s = 0; clocks(1); zero();
    fmod_s = 1; clocks(2); pulse_end(); clocks(2); fmod_s = 0; clocks(3);
    check(n_rst == 0 && n_latch == 0, "CIN low disables F and END");
    // A0F9
    zero(); cmd_rst = 1; cmd_any = 1; clocks(1); cmd_rst = 0; cmd_any = 0; wait_idle();
    check(n_rst == 1 && n_set_add + n_set_sub + n_set_zero == 0, "A0F9 resets address only");
    // A0F0: code 0, strobe, read gate
    zero(); cmd_rd = 1; cmd_any = 1; clocks(1); cmd_rd = 0; cmd_any = 0;
    check(!rd_en, "read gate closed before latch");
    wait_idle();
    check(n_set_zero == 1 && n_latch == 1 && n_inc == 1, "A0F0 sets 0 and strobes");
    check(rd_en, "read gate open after A0F0");
    // test write: strobe, no code change, closes read gate
    zero(); cmd_wr = 1; cmd_any = 1; clocks(1); cmd_wr = 0; cmd_any = 0;
    check(!rd_en, "next command closes read gate");
    wait_idle();
    check(n_latch == 1 && n_set_add + n_set_sub + n_set_zero == 0, "test write strobes with current code");
    // latency: END at cycle 0 -> LATCH at cycle 1 (end_s already synchronised)
    cin_s = 1; clocks(2);
    end_s = 1; @(posedge clk); #1; end_s = 0;
    check(!out_latch, "no latch in the edge-detect clock");
    clocks(1); check(out_latch, "latch one clock after END is seen");
    wait_idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
