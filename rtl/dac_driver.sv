// DAC driver.
//
// Output register between the ROM and the 8 GPIO pins that feed the DAC0808.
// While a chirp sample is valid it passes the ROM code; otherwise it holds the
// idle code (mid-scale by default), so the analog output rests at the zero of
// the bipolar chirp between pulses. The code is unsigned straight binary, the
// format the DAC0808 takes. `dac_pins[7]` goes to DAC input A1 (the MSB) and
// `dac_pins[0]` to A8 (the LSB).
//
// Timing: one register stage; the pins change only on the clock edge, so the
// DAC sees one stable code per sample period.
// The block's place between ROM and DAC follows the block diagram; the idle
// code and the pin order are this design's own choice, the latter matching
// the DAC0808 input naming (A1 = MSB).
module dac_driver #(
  parameter int unsigned         WIDTH = 8,
  parameter logic [WIDTH-1:0]    IDLE  = WIDTH'(1) << (WIDTH - 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic [WIDTH-1:0] code,
  output logic [WIDTH-1:0] dac_pins
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dac_pins <= IDLE;
    else if (valid)  dac_pins <= code;
    else             dac_pins <= IDLE;
  end
endmodule
