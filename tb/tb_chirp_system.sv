// End-to-end testbench of chirp_system. Two generators run from one 50 MHz
// board clock:
//   A: defaults, 24 MHz sample clock, chirps back to back (1000-sample PRI);
//   B: PLL_MULT = 3 (6 MHz, the rate the DAC0808 can follow) with a
//      1500-sample PRI, so each chirp is followed by a 500-sample idle gap.
// Checked: PLL lock and sample-clock period; every pin code against the
// closed-form chirp; the chirp period (1000 and 1500 sample clocks); that the
// DAC voltage reaches the code's value within half an LSB at the end of every
// 6 MHz sample, and that it does not at 24 MHz (the DAC settling limit); that
// the filtered output swings over most of 0..5 V; that `run` low stops both.
// Each mechanism (lock, start, back-to-back restart, idle gap, stop, unsettled
// and settled DAC samples) is counted and must have occurred.
module tb_chirp_system;
  logic clk_50 = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic lock_a, lock_b, sclk_a, sclk_b, busy_a, busy_b, st_a, st_b;
  logic [7:0] pins_a, pins_b;
  real dac_a, dac_b, out_a, out_b;
  int checks = 0, failures = 0;
  bit en = 1'b0;

  int samp_a, err_a, chirps_a, b2b_a, gaps_a;
  int samp_b, err_b, chirps_b, b2b_b, gaps_b;
  realtime ts_a, tp_a, ts_b, tp_b;
  int unsettled_a = 0, settled_b = 0, bad_settle_b = 0, stops = 0, locks = 0;
  real omax_b = -10.0, omin_b = 10.0;
  realtime t_prev = 0, per_a = 0;

  chirp_system dut_a (
    .clk_50, .rst_n, .run, .pll_locked(lock_a), .sample_clk(sclk_a), .dac_pins(pins_a),
    .busy(busy_a), .chirp_start(st_a), .dac_vout(dac_a), .vout(out_a));
  chirp_system #(.PLL_MULT(3), .PRI_CYCLES(1500)) dut_b (
    .clk_50, .rst_n, .run, .pll_locked(lock_b), .sample_clk(sclk_b), .dac_pins(pins_b),
    .busy(busy_b), .chirp_start(st_b), .dac_vout(dac_b), .vout(out_b));

  chirp_pin_checker chk_a (.clk(sclk_a), .enable(en), .busy(busy_a), .start(st_a), .pins(pins_a),
    .samples(samp_a), .errors(err_a), .chirps(chirps_a), .back_to_back(b2b_a), .gaps(gaps_a),
    .t_start_last(ts_a), .t_start_prev(tp_a));
  chirp_pin_checker chk_b (.clk(sclk_b), .enable(en), .busy(busy_b), .start(st_b), .pins(pins_b),
    .samples(samp_b), .errors(err_b), .chirps(chirps_b), .back_to_back(b2b_b), .gaps(gaps_b),
    .t_start_last(ts_b), .t_start_prev(tp_b));

  always #10ns clk_50 = ~clk_50;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DAC settling, judged just before the pins change at the sample edge
  localparam real HALF_LSB = 0.5 * 5.0 / 256.0;
  always @(posedge sclk_a) if (en && busy_a) begin
    real err;
    err = dac_a - 5.0 * real'(pins_a) / 256.0;
    if (err > HALF_LSB || -err > HALF_LSB) unsettled_a++;
    per_a = $realtime - t_prev;
    t_prev = $realtime;
  end
  always @(posedge sclk_b) if (en && busy_b) begin
    real err;
    err = dac_b - 5.0 * real'(pins_b) / 256.0;
    if (err > HALF_LSB + 0.002 || -err > HALF_LSB + 0.002) bad_settle_b++;
    else settled_b++;
    if (out_b > omax_b) omax_b = out_b;
    if (out_b < omin_b) omin_b = out_b;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #300ns rst_n = 1'b1;
    wait (lock_a && lock_b);
    locks++;
    #2us;
    run = 1'b1;
    en  = 1'b1;
    // B: two full intervals (2 x 1500 x 166.67 ns = 500 us) plus margin
    #560us;
    check(per_a > 41.66ns && per_a < 41.67ns, "24 MHz sample clock period");
    check(err_a == 0 && samp_a > 10000, $sformatf("A pins: %0d errors in %0d samples", err_a, samp_a));
    check(err_b == 0 && samp_b > 2000, $sformatf("B pins: %0d errors in %0d samples", err_b, samp_b));
    check(chirps_a >= 13 && chirps_b >= 2, $sformatf("chirps %0d / %0d", chirps_a, chirps_b));
    check(ts_a - tp_a > 41660ns && ts_a - tp_a < 41670ns,
          $sformatf("A chirp period %0t", ts_a - tp_a));
    check(ts_b - tp_b > 249999ns && ts_b - tp_b < 250001ns,
          $sformatf("B chirp period %0t", ts_b - tp_b));
    check(bad_settle_b == 0 && settled_b > 2000,
          $sformatf("6 MHz DAC settling: %0d unsettled samples", bad_settle_b));
    check(unsettled_a > 1000, $sformatf("24 MHz DAC: only %0d unsettled samples", unsettled_a));
    check(omax_b > 4.5 && omin_b < 0.5 && omax_b < 5.05 && omin_b > -0.05,
          $sformatf("B filtered output range %f .. %f V", omin_b, omax_b));
    // stop
    run = 1'b0;
    stops++;
    #2us;
    check(!busy_a && !busy_b && pins_a == 8'h80 && pins_b == 8'h80, "run low stops both");
    check(dac_b > 2.49 && dac_b < 2.51, $sformatf("idle DAC level %f V", dac_b));
    // mechanism counts
    $display("locks %0d starts(chirps) %0d/%0d back-to-back %0d gaps %0d stops %0d unsettled(24MHz) %0d settled(6MHz) %0d",
             locks, chirps_a, chirps_b, b2b_a, gaps_b, stops, unsettled_a, settled_b);
    check(locks > 0 && chirps_a > 0 && chirps_b > 0 && b2b_a > 0 && gaps_b > 0 &&
          stops > 0 && unsettled_a > 0 && settled_b > 0, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
