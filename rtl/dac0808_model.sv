// Behavioural model of the DAC module (not synthesizable): a DAC0808 8-bit
// current-output DAC followed by a TL081 op-amp current-to-voltage stage.
//
// Transfer function: vout = VREF * code / 2^BITS, i.e. 0 V for 00000000,
// 19.53 mV per LSB, 2.5 V at 10000000 and 4.98 V at 11111111 with VREF = 5 V.
// `a[BITS-1]` is input A1 (the MSB), `a[0]` is A8 (the LSB).
// Dynamics: the output approaches the target exponentially, with a time
// constant chosen so that a full-scale step settles to half an LSB in
// SETTLE_NS (150 ns for the DAC0808). Samples shorter than that do not settle,
// which is what limits the usable sampling rate to about 1/150 ns = 6.67 MHz.
// The model advances in steps of STEP_NS.
// The transfer function, the 0-5 V range and the 150 ns settling time follow
// the document; the first-order settling shape is this model's own.
module dac0808_model #(
  parameter int unsigned BITS      = 8,
  parameter real         VREF      = 5.0,
  parameter real         SETTLE_NS = 150.0,
  parameter real         STEP_NS   = 0.5
) (
  input  logic [BITS-1:0] a,
  output real             vout
);
  localparam real TAU_NS = SETTLE_NS / $ln(real'(2 ** (BITS + 1)));
  localparam real ALPHA  = 1.0 - $exp(-STEP_NS / TAU_NS);

  real target;

  initial vout = 0.0;

  always begin
    #(STEP_NS * 1ns);
    target = VREF * real'(a) / real'(2 ** BITS);
    vout   = vout + (target - vout) * ALPHA;
  end
endmodule
