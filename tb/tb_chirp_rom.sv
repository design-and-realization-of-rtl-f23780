// Self-checking testbench of chirp_rom: reads every address and compares with
// the closed-form chirp, checks the one-cycle read latency and the mid-scale
// value of the unused addresses 1000..1023. A second instance sweeps down
// (10 MHz to 0): its phase is pi * (n / 10 - n^2 / 10000).
module tb_chirp_rom;
  import chirp_ref_pkg::*;
  logic       clk = 1'b0;
  logic [9:0] addr = '0;
  logic [7:0] q;
  int checks = 0, failures = 0;
  int mins = 0, maxs = 0;

  logic [7:0] q_down;
  int down_bad = 0;

  chirp_rom dut (.clk, .addr, .q);
  chirp_rom #(.F0(10.0e6), .F1(0.0)) dut_down (.clk, .addr, .q(q_down));

  function automatic int down_code(int n);
    return int'($floor(127.5 * (1.0 + $cos(3.141592653589793 *
                 (real'(n) / 10.0 - real'(n) * real'(n) / 10000.0))) + 0.5));
  endfunction

  always #5ns clk = ~clk;

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1024; n++) begin
      @(negedge clk) addr = 10'(n);
      @(negedge clk);           // one clock edge later the data is there
      checks++;
      if (n < 1000) begin
        if (!code_ok(int'(q), n)) begin
          failures++;
          $display("addr %0d: q=%0d expected %0d", n, q, ref_code(n));
        end
        checks++;
        if (int'(q_down) - down_code(n) > 1 || down_code(n) - int'(q_down) > 1) begin
          failures++;
          if (down_bad++ < 5) $display("down-chirp addr %0d: q=%0d expected %0d", n, q_down, down_code(n));
        end
        if (q == 8'd0)   mins++;
        if (q == 8'd255) maxs++;
      end else if (q != 8'h80) begin
        failures++;
        $display("addr %0d beyond depth: q=%0d expected 128", n, q);
      end
    end
    // latency: q changes only at the edge after the address changes
    @(negedge clk) addr = 10'd100;   // code 0 (phase pi)
    @(negedge clk) addr = 10'd0;     // code 255
    #1ns;
    checks++;
    if (q != 8'd0) begin failures++; $display("latency: q=%0d before the edge", q); end
    @(negedge clk);
    checks++;
    if (q != 8'd255) begin failures++; $display("latency: q=%0d after the edge", q); end
    // the chirp swings over the full code range
    checks++;
    if (mins == 0 || maxs == 0) begin failures++; $display("full range not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
