// Self-checking testbench of dac_driver: random valid/code traffic; the pins
// must show the code of the previous cycle when it was valid, else mid-scale,
// and mid-scale out of reset.
module tb_dac_driver;
  logic       clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [7:0] code = '0, pins;
  logic [7:0] expect_pins;
  int checks = 0, failures = 0;

  dac_driver dut (.clk, .rst_n, .valid, .code, .dac_pins(pins));

  always #5ns clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12ns;
    checks++;
    if (pins != 8'h80) begin failures++; $display("reset value %h", pins); end
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      valid = ($urandom_range(0, 3) != 0);
      code  = 8'($urandom);
      expect_pins = valid ? code : 8'h80;
      @(negedge clk);
      checks++;
      if (pins !== expect_pins) begin
        failures++;
        if (failures < 10) $display("pins %h expected %h", pins, expect_pins);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
