// Pulse repetition frequency (PRF) timer.
//
// Counts sample-clock cycles modulo PRI_CYCLES (the pulse repetition interval
// in samples) and raises `start` for one cycle at the beginning of every
// interval, which launches one chirp. With PRI_CYCLES equal to the chirp length
// the chirps follow each other back to back, so the counter simply loops over
// the ROM; a longer interval leaves an idle gap after each chirp.
//
// Interface: `run` low holds the timer at the start of an interval; the first
// `start` comes in the cycle `run` is high, then one every PRI_CYCLES cycles.
// `start` is decoded from the registered count (no extra latency).
// The block's role in front of the counter follows the block diagram; the
// interval length and the counting scheme are this design's own choice.
module prf_timer #(
  parameter int unsigned PRI_CYCLES = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic start
);
  localparam int unsigned W = (PRI_CYCLES > 1) ? $clog2(PRI_CYCLES) : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            cnt <= '0;
    else if (!run)                         cnt <= '0;
    else if (cnt == W'(PRI_CYCLES - 1))    cnt <= '0;
    else                                   cnt <= cnt + 1'b1;
  end

  assign start = run && (cnt == '0);

  initial assert (PRI_CYCLES >= 1) else $error("PRI_CYCLES must be at least 1");
endmodule
