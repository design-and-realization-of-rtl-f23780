// Binary address counter.
//
// After a `start` pulse it counts 0, 1, ..., DEPTH-1 on successive clock
// cycles, presenting each count as the ROM address with `active` high, and
// then stops and waits at address 0. A `start` that arrives while the last
// address is shown restarts the count at 0 in the next cycle, so chirps can be
// replayed without a gap; a `start` in mid-count restarts the chirp. `run` low
// stops the counter at once (the "ordered to stop" case).
//
// Interface: `addr` and `active` are registered; address 0 appears in the
// cycle after `start`. `last` marks the cycle showing address DEPTH-1.
// Counting 0..999 per chirp follows the document; start/stop control is this
// design's own choice.
module addr_counter #(
  parameter int unsigned DEPTH = 1000,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          start,
  output logic [AW-1:0] addr,
  output logic          active,
  output logic          last
);
  assign last = active && (addr == AW'(DEPTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr   <= '0;
      active <= 1'b0;
    end else if (!run) begin
      addr   <= '0;
      active <= 1'b0;
    end else if (start) begin
      addr   <= '0;
      active <= 1'b1;
    end else if (last) begin
      addr   <= '0;
      active <= 1'b0;
    end else if (active) begin
      addr   <= addr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (1 << AW) >= DEPTH) else $error("AW too small for DEPTH");
endmodule
