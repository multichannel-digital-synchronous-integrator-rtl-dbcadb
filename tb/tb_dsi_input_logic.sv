// tb_dsi_input_logic: with CIN high B must follow the ADC code; with CIN low
// it must be the word held from the last test-write pulse, whatever the W
// lines carry afterwards.
module tb_dsi_input_logic;
  logic clk = 0, rst_n = 0, cin = 0, w_ld = 0;
  logic [15:0] adc_code = 0, w = 0, b, held = 0;
  int checks = 0, failures = 0;

  dsi_input_logic dut (.clk, .rst_n, .adc_code, .cin, .w, .w_ld, .b);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      cin = $urandom % 2; w_ld = ($urandom % 4) == 0;
      adc_code = 16'($urandom); w = 16'($urandom);
      @(posedge clk); #1;
      if (w_ld) held = w;
      w_ld = 0; w = 16'($urandom); #1;
      checks++;
      if (b !== (cin ? adc_code : held)) begin
        failures++; $display("FAIL cin=%b b=%h adc=%h held=%h", cin, b, adc_code, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
