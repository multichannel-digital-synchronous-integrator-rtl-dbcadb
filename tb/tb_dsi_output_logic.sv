// tb_dsi_output_logic: R lines must equal the output register while the
// read gate is high and be all zero otherwise.
module tb_dsi_output_logic;
  logic [15:0] d, r;
  logic rd_en;
  int checks = 0, failures = 0;

  dsi_output_logic dut (.d, .rd_en, .r);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      d = 16'($urandom); rd_en = i[0]; #1;
      checks++;
      if (r !== (rd_en ? d : 16'd0)) begin failures++; $display("FAIL d=%h en=%b r=%h", d, rd_en, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
