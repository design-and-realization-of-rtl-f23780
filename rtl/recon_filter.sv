// Behavioural model of the reconstruction filter (not synthesizable).
//
// A first-order RC low-pass filter with cutoff FC_HZ that smooths the DAC
// staircase into a continuous chirp and attenuates the images around the
// sampling rate. Discretised exactly for a first-order section:
//   vout += (vin - vout) * (1 - exp(-STEP / RC)),  RC = 1 / (2*pi*FC_HZ).
// DC gain is 1. The model advances in steps of STEP_NS.
// The block's place after the DAC follows the block diagram; its order and
// cutoff are not specified there and are this model's own choice (cutoff at
// the 10 MHz chirp bandwidth).
module recon_filter #(
  parameter real FC_HZ   = 10.0e6,
  parameter real STEP_NS = 0.5
) (
  input  real vin,
  output real vout
);
  localparam real PI_R  = 3.141592653589793;
  localparam real RC_NS = 1.0e9 / (2.0 * PI_R * FC_HZ);
  localparam real ALPHA = 1.0 - $exp(-STEP_NS / RC_NS);

  initial vout = 0.0;

  always begin
    #(STEP_NS * 1ns);
    vout = vout + (vin - vout) * ALPHA;
  end
endmodule
