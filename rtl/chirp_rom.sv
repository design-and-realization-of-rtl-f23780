// Chirp sample ROM.
//
// Holds DEPTH unsigned WIDTH-bit samples of one linear-FM chirp,
//   code[n] = round((2^WIDTH - 1) * (1 + cos(2*pi*(k*t_n + F0)*t_n)) / 2),
//   t_n = DURATION * n / DEPTH,  k = (F1 - F0) / DURATION,
// which with the default figures reduces to
//   code[n] = round(127.5 * (1 + cos(pi * n^2 / 10000))).
// The table is computed at elaboration from these parameters, so a different
// chirp only needs new parameter values. The read is synchronous (block-RAM
// style): `q` shows the sample of the address presented one clock earlier.
// Addresses at or above DEPTH read as mid-scale.
// The chirp equation, the 1000-sample length, the 8-bit quantisation and the
// unsigned 0..full-scale form follow the document; the exact scaling and
// rounding of the codes are this design's own choice.
module chirp_rom
  import chirp_pkg::*;
#(
  parameter int unsigned DEPTH    = chirp_pkg::SAMPLES,
  parameter int unsigned WIDTH    = chirp_pkg::SAMPLE_BITS,
  parameter int unsigned AW       = $clog2(DEPTH),
  parameter real         F0       = chirp_pkg::F0_HZ,
  parameter real         F1       = chirp_pkg::F1_HZ,
  parameter real         DURATION = chirp_pkg::DURATION_S
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] q
);
  typedef logic [WIDTH-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned n = 0; n < DEPTH; n++)
      t[n] = WIDTH'(chirp_sample(n, DEPTH, WIDTH, F0, F1, DURATION));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk)
    q <= (32'(addr) < DEPTH) ? TABLE[addr] : WIDTH'(1) << (WIDTH - 1);
endmodule
