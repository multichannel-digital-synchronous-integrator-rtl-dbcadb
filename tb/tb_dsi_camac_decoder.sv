// tb_dsi_camac_decoder: sweeps N, A, F and S1 and checks that exactly the
// accepted commands (A0 with F0, F9, F16, F17, station selected, S1 high)
// give their pulse and Q/X, and nothing else does.
module tb_dsi_camac_decoder;
  import dsi_pkg::*;
  logic n;
  camac_cmd_t cmd;
  logic cmd_rd, cmd_rst, cmd_wr, cmd_ld, cmd_any, q, x;
  int checks = 0, failures = 0;

  dsi_camac_decoder dut (.n, .cmd, .cmd_rd, .cmd_rst, .cmd_wr, .cmd_ld, .cmd_any, .q, .x);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic sel;
    logic [4:0] e;
    for (int nn = 0; nn < 2; nn++)
      for (int s = 0; s < 2; s++)
        for (int a = 0; a < 16; a++)
          for (int f = 0; f < 32; f++) begin
            n = nn[0]; cmd.s1 = s[0]; cmd.a = 4'(a); cmd.f = 5'(f); cmd.w = 16'($urandom);
            #1;
            sel = nn[0] && s[0] && (a == 0);
            e = {sel && f == 0, sel && f == 9, sel && f == 16, sel && f == 17, nn[0] && s[0]};
            checks++;
            if ({cmd_rd, cmd_rst, cmd_wr, cmd_ld, cmd_any} !== e ||
                x !== (|e[4:1]) || q !== (|e[4:1])) begin
              failures++; $display("FAIL n=%0d s1=%0d a=%0d f=%0d", nn, s, a, f);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
