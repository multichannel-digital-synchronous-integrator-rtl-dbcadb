// dsi_system: a pair of identical integrator modules, the configuration the
// original spectral complex uses so that no sample is lost while results
// are read out. Both modules see the same ADC code, END and F lines and the
// same CAMAC dataway; CIN reaches module 0 directly and module 1 inverted,
// so exactly one of them accepts ADC codes while the computer reads out and
// clears the other. Each module has its own CAMAC station line
// (camac_n[0], camac_n[1]); the read lines R1-R16 and the Q and X responses
// are ORed as on the dataway (a module not being read drives 0).
// Timing is that of dsi: the ADC code must stay valid from END until the
// strobe has run (SYNC_STAGES + 4 clocks), and END pulses must be at least
// 4 clocks apart per module.
module dsi_system
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
  input  logic [1:0]        camac_n,
  input  camac_cmd_t        camac,
  output logic [DATA_W-1:0] camac_r,
  output logic              camac_q,
  output logic              camac_x,
  output logic [1:0]        busy
);
  logic [DATA_W-1:0] r [2];
  logic [1:0] q, x, cin_m;

  assign cin_m = {~cin, cin};

  for (genvar m = 0; m < 2; m++) begin : g_mod
    dsi #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .SYNC_STAGES(SYNC_STAGES)) u_dsi (
      .clk, .rst_n, .adc_code, .end_conv, .fmod, .cin(cin_m[m]),
      .camac_n(camac_n[m]), .camac, .camac_r(r[m]), .camac_q(q[m]),
      .camac_x(x[m]), .busy(busy[m])
    );
  end

  assign camac_r = r[0] | r[1];
  assign camac_q = |q;
  assign camac_x = |x;
endmodule
