// Self-checking testbench of prf_timer: checks the start-pulse period for the
// default interval (1000) and for a short one (5), the first pulse in the
// cycle `run` rises, and that `run` low suppresses the pulses.
module tb_prf_timer;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic start_d, start_s;
  int checks = 0, failures = 0;
  int cyc = 0, last_d = -1, last_s = -1, n_d = 0, n_s = 0;

  prf_timer                   dut_d (.clk, .rst_n, .run, .start(start_d));
  prf_timer #(.PRI_CYCLES(5)) dut_s (.clk, .rst_n, .run, .start(start_s));

  always #5ns clk = ~clk;

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sampled at the rising edge, where the pulse takes effect
  always @(posedge clk) begin
    cyc++;
    if (rst_n && run) begin
      if (start_d) begin
        checks++;
        if (last_d >= 0 && cyc - last_d != 1000) begin
          failures++; $display("default PRI: %0d cycles between starts", cyc - last_d);
        end
        last_d = cyc; n_d++;
      end
      if (start_s) begin
        checks++;
        if (last_s >= 0 && cyc - last_s != 5) begin
          failures++; $display("PRI 5: %0d cycles between starts", cyc - last_s);
        end
        last_s = cyc; n_s++;
      end
    end else if (start_d || start_s) begin
      checks++; failures++; $display("start while run low");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    #1ns run = 1'b1;
    #1ns;
    checks++;
    if (!(start_d && start_s)) begin failures++; $display("no start when run rises"); end
    repeat (5200) @(negedge clk);
    checks++;
    if (n_d != 6 || n_s < 1000) begin
      failures++; $display("pulse counts %0d / %0d", n_d, n_s);
    end
    #1ns run = 1'b0;
    last_d = -1; last_s = -1;
    repeat (50) @(negedge clk);
    #1ns run = 1'b1;
    repeat (2100) @(negedge clk);
    checks++;
    if (n_d != 9) begin failures++; $display("restart count %0d", n_d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
