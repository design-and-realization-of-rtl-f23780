// Testbench helper: follows the DAC pins of a chirp generator on its sample
// clock and compares them with the closed-form chirp. While `busy` is high the
// pins must step through samples 0..999 (wrapping to 0 for back-to-back
// chirps); while it is low they must hold mid-scale. Counts samples, mismatches,
// completed chirps, back-to-back restarts and idle gaps, and records the time
// of the last two start pulses.
module chirp_pin_checker (
  input  logic       clk,
  input  logic       enable,
  input  logic       busy,
  input  logic       start,
  input  logic [7:0] pins,
  output int         samples,
  output int         errors,
  output int         chirps,
  output int         back_to_back,
  output int         gaps,
  output realtime    t_start_last,
  output realtime    t_start_prev
);
  import chirp_ref_pkg::*;
  int  idx = 0;
  bit  was_busy = 1'b0;

  initial begin
    samples = 0; errors = 0; chirps = 0; back_to_back = 0; gaps = 0;
    t_start_last = 0; t_start_prev = 0;
  end

  always @(posedge clk) if (enable && start) begin
    t_start_prev = t_start_last;
    t_start_last = $realtime;
  end

  always @(negedge clk) begin
    if (!enable) begin
      was_busy = 1'b0;
    end else if (busy) begin
      if (!was_busy) idx = 0;
      else if (idx == 999) begin idx = 0; back_to_back++; end
      else idx++;
      samples++;
      if (!code_ok(int'(pins), idx)) begin
        errors++;
        if (errors < 6) $display("%m: sample %0d is %0d, expected %0d", idx, pins, ref_code(idx));
      end
      if (idx == 999) chirps++;
      was_busy = 1'b1;
    end else begin
      if (was_busy) gaps++;
      if (pins != 8'h80) begin
        errors++;
        if (errors < 6) $display("%m: idle pins %0d", pins);
      end
      was_busy = 1'b0;
    end
  end
endmodule
