// dsi: one multichannel digital synchronous integrator module.
// Digitised samples of a multichannel detector (CCD pixels, filter channels)
// arrive one channel at a time as ADC code + END. Each END runs a writing
// strobe that adds the code to the buffer cell of that channel, so after N
// modulation periods cell k holds the sum of channel k's samples:
//   integration mode: F rise resets the address; the "Antenna" half-period
//     fills cells 0..K-1 and the "Equivalent" half fills K..2K-1;
//   detection mode:   both F edges reset the address; A+B in the "Antenna"
//     half and A-B in the "Equivalent" half leave sum(a-e) in cells 0..K-1.
// The computer reads the buffer over CAMAC: A0F9 resets the address, then
// each A0F0 returns one channel on R1-R16 and clears its cell, so the module
// is ready for the next integration. A0F16/A0F17 write test words and the
// ALU function for diagnostics.
// Units (as in the original's functional scheme): input logic, ALU,
// instruction register, address counter, 4096x16 buffer RAM, output register,
// output logic, control scheme, plus a CAMAC decoder and synchronisers for
// F, CIN and END (SYNC_STAGES clocks of latency) added by this design.
// Timing: a strobe takes 3 clocks plus at least 1 idle clock; A0F0 data is
// on camac_r from 3 clocks after the command until the next command to the
// module. busy is high while anything is pending or running.
module dsi
  import dsi_pkg::*;
#(
  parameter int unsigned DATA_W      = dsi_pkg::DSI_DATA_W,
  parameter int unsigned ADDR_W      = dsi_pkg::DSI_ADDR_W,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] adc_code,
  input  logic              end_conv,
  input  logic              fmod,
  input  logic              cin,
  input  logic              camac_n,
  input  camac_cmd_t        camac,
  output logic [DATA_W-1:0] camac_r,
  output logic              camac_q,
  output logic              camac_x,
  output logic              busy
);
  logic fmod_s, cin_s, end_s;
  logic cmd_rd, cmd_rst, cmd_wr, cmd_ld, cmd_any;
  logic addr_rst, addr_inc, ram_we, out_latch, ir_set, rd_en, det_mode;
  alu_op_t ir_code, op;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] b, al, ram_q, out_q;

  dsi_sync #(.STAGES(SYNC_STAGES)) u_sync_f   (.clk, .rst_n, .d(fmod),     .q(fmod_s));
  dsi_sync #(.STAGES(SYNC_STAGES)) u_sync_cin (.clk, .rst_n, .d(cin),      .q(cin_s));
  dsi_sync #(.STAGES(SYNC_STAGES)) u_sync_end (.clk, .rst_n, .d(end_conv), .q(end_s));

  dsi_camac_decoder u_dec (
    .n(camac_n), .cmd(camac), .cmd_rd, .cmd_rst, .cmd_wr, .cmd_ld, .cmd_any,
    .q(camac_q), .x(camac_x)
  );

  dsi_control u_ctl (
    .clk, .rst_n, .fmod_s, .cin_s, .end_s, .det_mode,
    .cmd_rd, .cmd_rst, .cmd_wr, .cmd_any,
    .addr_rst, .addr_inc, .ram_we, .out_latch, .ir_set, .ir_code, .rd_en, .busy
  );

  dsi_instr_reg #(.DATA_W(DATA_W)) u_ir (
    .clk, .rst_n, .ir_set, .ir_code, .ld(cmd_ld), .w(camac.w), .op, .det_mode
  );

  dsi_input_logic #(.DATA_W(DATA_W)) u_in (
    .clk, .rst_n, .adc_code, .cin(cin_s), .w(camac.w), .w_ld(cmd_wr), .b
  );

  dsi_addr_counter #(.ADDR_W(ADDR_W)) u_cnt (
    .clk, .rst_n, .clr(addr_rst), .inc(addr_inc), .addr
  );

  dsi_ram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_ram (
    .clk, .we(ram_we), .addr, .di(al), .do_q(ram_q)
  );

  dsi_out_reg #(.DATA_W(DATA_W)) u_oreg (
    .clk, .rst_n, .latch(out_latch), .d(ram_q), .q(out_q)
  );

  dsi_alu #(.DATA_W(DATA_W)) u_alu (.a(out_q), .b, .op, .al);

  dsi_output_logic #(.DATA_W(DATA_W)) u_out (.d(out_q), .rd_en, .r(camac_r));
endmodule
