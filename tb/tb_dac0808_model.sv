// Self-checking testbench of the DAC module model: the settled output for the
// sixteen design points of the DAC transfer table (0 V ... 4.98 V, 19.53 mV
// per LSB), and the settling of a full-scale step: within half an LSB after
// 150 ns, but not after one 24 MHz sample period (41.7 ns).
module tb_dac0808_model;
  logic [7:0] a = '0;
  real vout;
  int checks = 0, failures = 0;

  // input code, design output in volts
  typedef struct { logic [7:0] code; real volts; } point_t;
  point_t pts [16] = '{
    '{8'b00000000, 0.0},     '{8'b00000001, 0.01953}, '{8'b00000011, 0.05859},
    '{8'b00000111, 0.13671}, '{8'b00001111, 0.29296}, '{8'b00011111, 0.60546},
    '{8'b00111111, 1.23},    '{8'b01111111, 2.48},    '{8'b10000000, 2.5},
    '{8'b10000001, 2.519},   '{8'b10000011, 2.558},   '{8'b10000111, 2.636},
    '{8'b10001111, 2.792},   '{8'b10011111, 3.1},     '{8'b10111111, 3.73},
    '{8'b11111111, 4.98}};

  dac0808_model dut (.a, .vout);

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (pts[i]) begin
      a = pts[i].code;
      #400ns;
      checks++;
      if (vout - pts[i].volts > 0.01 || pts[i].volts - vout > 0.01) begin
        failures++;
        $display("code %b: %f V, design %f V", pts[i].code, vout, pts[i].volts);
      end
    end
    // full-scale step settling
    a = 8'h00;
    #1us;
    a = 8'hFF;
    #41.7ns;
    checks++;
    if (4.98 - vout < 0.5 * 5.0 / 256.0) begin
      failures++; $display("settled within one 24 MHz period: %f V", vout);
    end
    #(150ns - 41.7ns);
    checks++;
    if (4.98 - vout > 0.5 * 5.0 / 256.0 + 0.001) begin
      failures++; $display("not settled after 150 ns: %f V", vout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
