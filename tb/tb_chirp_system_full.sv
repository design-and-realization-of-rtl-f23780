// Full-size testbench of chirp_system with every parameter at its default:
// 50 MHz board clock, 24 MHz sample clock, 1000-sample chirps back to back.
// Runs three complete chirps and checks every pin code against the closed-form
// chirp, the chirp period of 1000 sample clocks (41.67 us), the idle code
// before the start and after `run` falls, and that the DAC and filter
// outputs stay within 0..5 V.
module tb_chirp_system_full;
  logic clk_50 = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic lock, sclk, busy, st;
  logic [7:0] pins;
  real dac_v, out_v;
  int checks = 0, failures = 0;
  bit en = 1'b0;
  int samp, err, chirps, b2b, gaps;
  realtime ts, tp;
  real vmax = -10.0, vmin = 10.0;

  chirp_system dut (
    .clk_50, .rst_n, .run, .pll_locked(lock), .sample_clk(sclk), .dac_pins(pins),
    .busy, .chirp_start(st), .dac_vout(dac_v), .vout(out_v));

  chirp_pin_checker chk (.clk(sclk), .enable(en), .busy, .start(st), .pins,
    .samples(samp), .errors(err), .chirps, .back_to_back(b2b), .gaps,
    .t_start_last(ts), .t_start_prev(tp));

  always #10ns clk_50 = ~clk_50;

  always @(posedge sclk) if (en) begin
    if (out_v > vmax) vmax = out_v;
    if (out_v < vmin) vmin = out_v;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #300ns rst_n = 1'b1;
    wait (lock);
    #1us;
    check(pins == 8'h80 && !busy, "idle before run");
    run = 1'b1;
    en  = 1'b1;
    wait (chirps == 3);
    check(err == 0 && samp == 3000, $sformatf("%0d errors in %0d samples", err, samp));
    check(b2b == 2, $sformatf("%0d back-to-back restarts", b2b));
    check(ts - tp > 41660ns && ts - tp < 41670ns, $sformatf("chirp period %0t", ts - tp));
    check(vmax < 5.0 && vmin > -0.01 && vmax - vmin > 1.0,
          $sformatf("output range %f .. %f V", vmin, vmax));
    @(negedge sclk) run = 1'b0;
    en = 1'b0;
    repeat (3) @(negedge sclk);
    check(pins == 8'h80 && !busy, "idle after run falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
