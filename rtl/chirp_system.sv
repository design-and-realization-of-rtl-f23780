// Memory-based SAR chirp generator: the complete signal chain.
//
// Clock source (the 50 MHz board clock, input `clk_50`) -> PLL -> sample clock
// for the FPGA logic (PRF timer, binary counter, chirp ROM, DAC driver) -> 8
// GPIO pins -> DAC module (DAC0808 + TL081, 0-5 V) -> reconstruction filter ->
// analog chirp output `vout`. The PLL, DAC and filter are behavioural models,
// so this top simulates but only `chirp_fpga` is synthesizable; on hardware
// the PLL is the FPGA's own and the DAC and filter are board parts.
//
// Interface: `rst_n` (board reset, active low) and `run` (enable) are inputs;
// the GPIO pins, `busy` and the PLL lock are brought out for observation,
// with the DAC voltage `dac_vout` and the filtered output `vout` in volts.
// Timing: one 1000-sample chirp every PRI_CYCLES sample clocks; with the
// defaults (24 MHz, PRI_CYCLES = 1000) the chirps repeat back to back every
// 41.67 us. PLL_MULT = 3 selects the 6 MHz rate used with the DAC0808.
// The chain follows the document's block diagram; the clock ratios, reset
// scheme and analog models are this design's own choices.
module chirp_system
  import chirp_pkg::*;
#(
  parameter int unsigned PLL_MULT   = 12,
  parameter int unsigned PLL_DIV    = 25,
  parameter int unsigned DEPTH      = chirp_pkg::SAMPLES,
  parameter int unsigned PRI_CYCLES = chirp_pkg::SAMPLES
) (
  input  logic       clk_50,
  input  logic       rst_n,
  input  logic       run,
  output logic       pll_locked,
  output logic       sample_clk,
  output logic [7:0] dac_pins,
  output logic       busy,
  output logic       chirp_start,
  output real        dac_vout,
  output real        vout
);
  chirp_pll #(.IN_PERIOD_NS(20.0), .MULT(PLL_MULT), .DIV(PLL_DIV)) u_pll (
    .inclk0(clk_50), .areset(!rst_n), .c0(sample_clk), .locked(pll_locked)
  );

  chirp_fpga #(.DEPTH(DEPTH), .WIDTH(8), .PRI_CYCLES(PRI_CYCLES)) u_fpga (
    .clk(sample_clk), .rst_n(rst_n && pll_locked), .run, .dac_pins, .busy, .chirp_start
  );

  dac0808_model #(.BITS(8), .VREF(chirp_pkg::DAC_VREF_V),
                  .SETTLE_NS(chirp_pkg::DAC_SETTLE_NS)) u_dac (
    .a(dac_pins), .vout(dac_vout)
  );

  recon_filter u_filter (.vin(dac_vout), .vout);
endmodule
