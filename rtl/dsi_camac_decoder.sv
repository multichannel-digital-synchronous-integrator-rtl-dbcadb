// dsi_camac_decoder: CAMAC command decoding of one integrator module.
// When the module's station line N is high and S1 strobes, sub-address 0 with
// function F0 (read and clear one channel), F9 (reset the address counter),
// F16 (test write of W through the ALU) or F17 (load the instruction
// register from W) gives a one-clock command pulse; Q and X answer these
// four commands combinationally. A0F0 and A0F9 are the original's commands;
// F16/F17 for the test functions and S1 being a one-clock pulse in the
// module clock are this design's choices.
module dsi_camac_decoder
  import dsi_pkg::*;
(
  input  logic       n,
  input  camac_cmd_t cmd,
  output logic       cmd_rd,
  output logic       cmd_rst,
  output logic       cmd_wr,
  output logic       cmd_ld,
  output logic       cmd_any,
  output logic       q,
  output logic       x
);
  logic sel;
  assign sel     = n && cmd.s1 && (cmd.a == 4'd0);
  assign cmd_rd  = sel && (cmd.f == CF_READ);
  assign cmd_rst = sel && (cmd.f == CF_RESET);
  assign cmd_wr  = sel && (cmd.f == CF_WRITE);
  assign cmd_ld  = sel && (cmd.f == CF_LOAD);
  assign cmd_any = n && cmd.s1;
  assign x       = cmd_rd | cmd_rst | cmd_wr | cmd_ld;
  assign q       = x;
endmodule
