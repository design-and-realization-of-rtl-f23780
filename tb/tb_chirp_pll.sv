// Self-checking testbench of the PLL model: output period for 12/25 (24 MHz)
// and 3/25 (6 MHz) from a 50 MHz input, lock after 16 input edges, output held
// low and lock dropped in reset.
module tb_chirp_pll;
  logic clk50 = 1'b0, areset = 1'b1;
  logic c24, c6, l24, l6;
  int checks = 0, failures = 0;
  realtime t_prev24 = 0, t_prev6 = 0;
  int n24 = 0, n6 = 0;

  chirp_pll                  dut24 (.inclk0(clk50), .areset, .c0(c24), .locked(l24));
  chirp_pll #(.MULT(3))      dut6  (.inclk0(clk50), .areset, .c0(c6),  .locked(l6));

  always #10ns clk50 = ~clk50;

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge c24) if (!areset) begin
    if (n24 > 0) begin
      checks++;
      if ($realtime - t_prev24 < 41.66ns || $realtime - t_prev24 > 41.67ns) begin
        failures++; $display("24 MHz period %0t", $realtime - t_prev24);
      end
    end
    t_prev24 = $realtime; n24++;
  end

  always @(posedge c6) if (!areset) begin
    if (n6 > 0) begin
      checks++;
      if ($realtime - t_prev6 < 166.66ns || $realtime - t_prev6 > 166.67ns) begin
        failures++; $display("6 MHz period %0t", $realtime - t_prev6);
      end
    end
    t_prev6 = $realtime; n6++;
  end

  initial begin
    #200ns;
    checks++;
    if (c24 || c6 || l24 || l6) begin failures++; $display("activity in reset"); end
    @(negedge clk50) areset = 1'b0;
    repeat (15) @(posedge clk50);
    #1ns;
    checks++;
    if (l24) begin failures++; $display("locked too early"); end
    repeat (3) @(posedge clk50);
    #1ns;
    checks++;
    if (!(l24 && l6)) begin failures++; $display("not locked after 18 edges"); end
    #10us;
    checks++;
    if (n24 < 230 || n6 < 55) begin failures++; $display("edge counts %0d %0d", n24, n6); end
    areset = 1'b1;
    #1ns;
    checks++;
    if (l24 || c24) begin failures++; $display("reset did not stop the PLL"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
