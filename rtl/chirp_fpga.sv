// FPGA logic of the memory-based chirp generator.
//
// The PRF timer launches a chirp at the start of every pulse repetition
// interval; the binary counter then steps the ROM address through 0..DEPTH-1,
// one sample per clock; the ROM returns each 8-bit chirp sample one clock later
// and the DAC driver registers it onto the GPIO pins of the DAC. Between chirps
// the pins hold the idle (mid-scale) code.
//
// Clock and reset: `clk` is the sample clock from the PLL (24 MHz in the
// design, 6 MHz with the DAC0808). `rst_n` is asynchronous, active low, and is
// released synchronously through a two-flop synchroniser; the top ties it to
// the board reset ANDed with the PLL lock.
//
// Timing: with `run` high, the first chirp starts in the cycle `run` rises
// (`start` pulse); sample 0 reaches the pins three clock edges later (counter,
// ROM, driver registers) and the chirp occupies DEPTH consecutive clock cycles
// on the pins. `busy` is high, aligned with the pins, during those cycles.
// The chain PRF -> counter -> ROM -> DAC driver follows the block diagram of
// the document; the register stages and the reset scheme are this design's own.
module chirp_fpga
  import chirp_pkg::*;
#(
  parameter int unsigned DEPTH      = chirp_pkg::SAMPLES,
  parameter int unsigned WIDTH      = chirp_pkg::SAMPLE_BITS,
  parameter int unsigned PRI_CYCLES = chirp_pkg::SAMPLES,
  parameter real         F0         = chirp_pkg::F0_HZ,
  parameter real         F1         = chirp_pkg::F1_HZ,
  parameter real         DURATION   = chirp_pkg::DURATION_S,
  parameter logic [WIDTH-1:0] IDLE  = chirp_pkg::IDLE_CODE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  output logic [WIDTH-1:0] dac_pins,
  output logic             busy,
  output logic             chirp_start
);
  localparam int unsigned AW = $clog2(DEPTH);

  // Reset synchroniser: asynchronous assertion, synchronous release.
  logic [1:0] rst_sync;
  logic       srst_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rst_sync <= '0;
    else        rst_sync <= {rst_sync[0], 1'b1};
  end
  assign srst_n = rst_sync[1];

  logic          start;
  logic [AW-1:0] addr;
  logic          active;
  logic          last;
  logic [WIDTH-1:0] sample;
  logic          sample_valid;   // `active` delayed to line up with the ROM output

  prf_timer #(.PRI_CYCLES(PRI_CYCLES)) u_prf (
    .clk, .rst_n(srst_n), .run, .start
  );

  addr_counter #(.DEPTH(DEPTH), .AW(AW)) u_counter (
    .clk, .rst_n(srst_n), .run, .start, .addr, .active, .last
  );

  chirp_rom #(
    .DEPTH(DEPTH), .WIDTH(WIDTH), .AW(AW), .F0(F0), .F1(F1), .DURATION(DURATION)
  ) u_rom (
    .clk, .addr, .q(sample)
  );

  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      sample_valid <= 1'b0;
      busy         <= 1'b0;
    end else begin
      sample_valid <= active && run;
      busy         <= sample_valid && run;
    end
  end

  dac_driver #(.WIDTH(WIDTH), .IDLE(IDLE)) u_driver (
    .clk, .rst_n(srst_n), .valid(sample_valid && run), .code(sample), .dac_pins
  );

  assign chirp_start = start;
endmodule
