// Self-checking testbench of addr_counter (DEPTH = 1000): a cycle model in
// the testbench predicts addr/active/last under directed and random start and
// run patterns; directed parts check that one start gives exactly 1000 active
// cycles with addresses 0..999 and that a start on the last address restarts
// without a gap.
module tb_addr_counter;
  logic       clk = 1'b0, rst_n = 1'b0, run = 1'b0, start = 1'b0;
  logic [9:0] addr;
  logic       active, last;
  int checks = 0, failures = 0;
  int m_addr = 0;
  bit m_active = 1'b0;
  int active_cycles = 0, seq_errors = 0, expect_n = 0;

  addr_counter dut (.clk, .rst_n, .run, .start, .addr, .active, .last);

  always #5ns clk = ~clk;

  initial begin
    #400us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated on the same edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (!run)                 begin m_addr <= 0; m_active <= 1'b0; end
      else if (start)           begin m_addr <= 0; m_active <= 1'b1; end
      else if (m_active && m_addr == 999) begin m_addr <= 0; m_active <= 1'b0; end
      else if (m_active)        m_addr <= m_addr + 1;
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (int'(addr) != m_addr || active != m_active ||
        last != (m_active && m_addr == 999)) begin
      failures++;
      if (failures < 10)
        $display("t=%0t addr=%0d/%0d active=%0d/%0d last=%0d", $time, addr, m_addr,
                 active, m_active, last);
    end
  end

  task automatic pulse_start();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run   = 1'b1;
    // one chirp: count the active cycles and the address sequence
    pulse_start();
    expect_n = 1;   // address 0 was shown inside pulse_start
    for (int c = 0; c < 1100; c++) begin
      @(negedge clk);
      if (active) begin
        active_cycles++;
        if (int'(addr) != expect_n) seq_errors++;
        expect_n++;
      end
    end
    checks++;
    if (active_cycles != 999 || seq_errors != 0) begin
      // 999: the first active cycle was consumed inside pulse_start
      failures++;
      $display("one chirp: %0d active cycles, %0d sequence errors", active_cycles, seq_errors);
    end
    // back-to-back: start asserted while the last address is shown
    pulse_start();
    do @(negedge clk); while (!last);
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    checks++;
    if (!(active && addr == 10'd0)) begin
      failures++;
      $display("no seamless restart after last: active=%0d addr=%0d", active, addr);
    end
    // run low stops at once
    repeat (20) @(negedge clk);
    run = 1'b0;
    @(negedge clk);
    checks++;
    if (active) begin failures++; $display("run low did not stop the counter"); end
    run = 1'b1;
    // random traffic against the model
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      start = ($urandom_range(0, 299) == 0);
      run   = ($urandom_range(0, 999) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
