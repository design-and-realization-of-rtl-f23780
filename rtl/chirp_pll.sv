// Behavioural model of the FPGA PLL (not synthesizable; the FPGA vendor's PLL
// takes its place in hardware).
//
// Produces the sample clock c0 = inclk0 * MULT / DIV. The default 12/25 turns
// the 50 MHz board clock into the 24 MHz design sampling rate; 3/25 gives the
// 6 MHz rate used with the DAC0808. The model does not track the input phase:
// it derives the output period from IN_PERIOD_NS and runs a free oscillator
// while `areset` is low. `locked` rises after LOCK_CYCLES rising edges of
// inclk0 out of reset and falls with `areset`. c0 is held low in reset.
// Port names follow the usual FPGA PLL wrapper (inclk0, areset, c0, locked).
// The PLL's place in the clock path follows the block diagram; the ratios,
// the lock delay and the model itself are this design's own.
module chirp_pll #(
  parameter real         IN_PERIOD_NS = 20.0,   // 50 MHz board clock
  parameter int unsigned MULT         = 12,
  parameter int unsigned DIV          = 25,
  parameter int unsigned LOCK_CYCLES  = 16
) (
  input  logic inclk0,
  input  logic areset,
  output logic c0,
  output logic locked
);
  localparam real HALF_NS = IN_PERIOD_NS * real'(DIV) / (2.0 * real'(MULT));

  int unsigned edges;

  initial begin
    c0     = 1'b0;
    locked = 1'b0;
    edges  = 0;
  end

  always @(posedge inclk0 or posedge areset) begin
    if (areset) begin
      edges  <= 0;
      locked <= 1'b0;
    end else if (edges < LOCK_CYCLES) begin
      edges  <= edges + 1;
    end else begin
      locked <= 1'b1;
    end
  end

  always begin
    if (areset) begin
      c0 = 1'b0;
      @(negedge areset);
    end
    #(HALF_NS * 1ns);
    c0 = areset ? 1'b0 : ~c0;
  end
endmodule
