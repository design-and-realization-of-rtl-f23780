// Self-checking testbench of chirp_fpga. Two instances run side by side:
// A with the default interval of 1000 samples (chirps back to back) and B
// with an interval of 1500 (a 500-sample idle gap). For each, the pins are
// predicted from the start pulses: sample n of the closed-form chirp appears
// 3 + n cycles after the start, the mid-scale code otherwise, and `busy`
// exactly while a sample is shown. Also checked: the chirp rate (one start
// per interval), that `run` low returns the pins to mid-scale, and that each
// mechanism (back-to-back restart, idle gap, stop) occurred.
module tb_chirp_fpga;
  import chirp_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [7:0] pins_a, pins_b;
  logic busy_a, busy_b, st_a, st_b;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit tracking = 1'b0;
  int b2b = 0, gaps = 0, stops = 0, starts_a = 0, starts_b = 0;

  chirp_fpga                     dut_a (.clk, .rst_n, .run, .dac_pins(pins_a), .busy(busy_a),
                                        .chirp_start(st_a));
  chirp_fpga #(.PRI_CYCLES(1500)) dut_b (.clk, .rst_n, .run, .dac_pins(pins_b), .busy(busy_b),
                                        .chirp_start(st_b));

  always #20.833ns clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected output given the latest and the previous start cycle.
  function automatic void expect_pins(int c, int s_new, int s_old, output int code, output bit b);
    int idx;
    idx = c - s_new - 3;
    if (idx < 0) idx = c - s_old - 3;
    if (idx >= 0 && idx < 1000) begin code = ref_code(idx); b = 1'b1; end
    else                        begin code = 128;           b = 1'b0; end
  endfunction

  int sa_new = -100000, sa_old = -100000, sb_new = -100000, sb_old = -100000;
  int prev_busy_a = 0, prev_busy_b = 0;

  always @(negedge clk) begin
    int ca, cb;
    bit ba, bb;
    if (tracking) begin
      expect_pins(cyc, sa_new, sa_old, ca, ba);
      expect_pins(cyc, sb_new, sb_old, cb, bb);
      checks += 2;
      if (!(busy_a == ba && (ba ? code_ok(int'(pins_a), cyc - (cyc - sa_new - 3 >= 0 ? sa_new : sa_old) - 3)
                                : pins_a == 8'h80))) begin
        failures++;
        if (failures < 10) $display("A cycle %0d: pins %0d busy %0d, expected %0d %0d",
                                    cyc, pins_a, busy_a, ca, ba);
      end
      if (!(busy_b == bb && (bb ? code_ok(int'(pins_b), cyc - (cyc - sb_new - 3 >= 0 ? sb_new : sb_old) - 3)
                                : pins_b == 8'h80))) begin
        failures++;
        if (failures < 10) $display("B cycle %0d: pins %0d busy %0d, expected %0d %0d",
                                    cyc, pins_b, busy_b, cb, bb);
      end
      // mechanisms: back-to-back (sample 999 followed by sample 0) and gaps
      if (prev_busy_a == 999 && busy_a && pins_a == 8'd255) b2b++;
      if (!busy_b && prev_busy_b != 0) gaps++;
      prev_busy_a = (busy_a ? cyc - (cyc - sa_new - 3 >= 0 ? sa_new : sa_old) - 3 : 0);
      prev_busy_b = busy_b ? 1 : 0;
    end
  end

  // Start pulses take effect at a rising edge; `cyc` counts rising edges, so
  // sample 0 is on the pins at the falling edge seen with cyc = start + 3.
  always @(posedge clk) begin
    if (st_a && tracking) begin sa_old = sa_new; sa_new = cyc; starts_a++; end
    if (st_b && tracking) begin sb_old = sb_new; sb_new = cyc; starts_b++; end
    cyc++;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    #1ns run = 1'b1;
    tracking = 1'b1;
    repeat (6200) @(negedge clk);
    // chirp rate: one start per interval
    checks++;
    if (starts_a != 7 || starts_b != 5) begin
      failures++; $display("starts %0d / %0d, expected 7 / 5", starts_a, starts_b);
    end
    // stop in mid-chirp
    #1ns run = 1'b0;
    tracking = 1'b0;
    stops++;
    repeat (2) @(negedge clk);
    checks++;
    if (pins_a != 8'h80 || pins_b != 8'h80 || busy_a || busy_b) begin
      failures++; $display("run low: pins %0d %0d", pins_a, pins_b);
    end
    // restart: the chirp begins again from sample 0
    sa_new = -100000; sa_old = -100000; sb_new = -100000; sb_old = -100000;
    repeat (10) @(negedge clk);
    #1ns run = 1'b1;
    tracking = 1'b1;
    repeat (1200) @(negedge clk);
    checks++;
    if (b2b == 0 || gaps == 0 || stops == 0) begin
      failures++; $display("mechanisms: back-to-back %0d, gaps %0d, stops %0d", b2b, gaps, stops);
    end
    $display("mechanisms: back-to-back %0d, gaps %0d, stops %0d", b2b, gaps, stops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
