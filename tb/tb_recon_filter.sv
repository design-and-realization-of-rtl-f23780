// Self-checking testbench of the reconstruction filter model (10 MHz
// first-order low-pass): unit step response at one time constant
// (1/(2*pi*10 MHz) = 15.9 ns, 63.2 %) and at ten (settled), and the
// attenuation of a 24 MHz square wave against a 1 MHz one.
module tb_recon_filter;
  real vin = 0.0, vout;
  real vmax, vmin;
  int checks = 0, failures = 0;

  recon_filter dut (.vin, .vout);

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic square(input realtime half, input int cycles, output real pp);
    real hi, lo;
    hi = -1.0; lo = 2.0;
    for (int c = 0; c < cycles; c++) begin
      vin = 1.0; #(half);
      if (c > cycles / 2 && vout > hi) hi = vout;
      vin = 0.0; #(half);
      if (c > cycles / 2 && vout < lo) lo = vout;
    end
    pp = hi - lo;
  endtask

  initial begin
    #100ns;
    vin = 1.0;
    #15.915ns;
    checks++;
    if (vout < 0.622 || vout > 0.642) begin failures++; $display("one tau: %f", vout); end
    #143.2ns;
    checks++;
    if (vout < 0.999) begin failures++; $display("ten tau: %f", vout); end
    vin = 0.0;
    #500ns;
    square(20.833ns, 200, vmax);   // 24 MHz
    square(500ns, 10, vmin);       // 1 MHz
    checks++;
    // first order, half period h: the square swing is tanh(h / (2 RC)) of the input
    if (vmax < $tanh(20.833 / 31.831) - 0.02 || vmax > $tanh(20.833 / 31.831) + 0.02 ||
        vmin < 0.99) begin
      failures++; $display("square p-p 24 MHz %f, 1 MHz %f", vmax, vmin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
