// coeff_rom: coefficient memory of the ICDF lookup unit.
//
// One word per subsection holds the pair {c0, c1} of the linear polynomial
// that approximates the ICDF on that subsection, c0 in the upper C0_W bits and
// c1 in the lower C1_W bits, both two's complement. Words are ordered by
// section address (octave, part 0 first, then part 1) and, inside a section,
// by the k subsection bits. The read is synchronous (one cycle, block-RAM
// style, with an enable). The contents are loaded from INIT_FILE with
// $readmemh; the default file holds the standard normal distribution with
// 54 + 4 octaves and 8 subsections per octave: for each subsection the
// degree-1 Chebyshev approximation of the ICDF, c0 = its value at the
// subsection start times 2^41, c1 = its rise over the subsection times 2^24
// (the README gives the full construction). The storage is an array with a
// synchronous read, so it maps onto one block RAM (464 x 69 bits). Word
// layout, scaling and read latency are this implementation's choices; that
// the coefficients sit in one ROM addressed by {section, subsection} follows
// the design.
module coeff_rom #(
  parameter int unsigned DEPTH     = (nurng_pkg::N_OCT0 + nurng_pkg::N_OCT1) * (2 ** nurng_pkg::K),
  parameter int unsigned AW        = $clog2(DEPTH),
  parameter int unsigned C0_W      = nurng_pkg::C0_W,
  parameter int unsigned C1_W      = nurng_pkg::C1_W,
  parameter string       INIT_FILE = "rtl/icdf_normal.hex"
) (
  input  logic                   clk,
  input  logic                   en_i,
  input  logic [AW-1:0]          addr_i,
  output logic signed [C0_W-1:0] c0_o,
  output logic signed [C1_W-1:0] c1_o
);

  logic [C0_W+C1_W-1:0] mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) begin
    if (en_i) begin
      {c0_o, c1_o} <= mem[addr_i];
    end
  end

endmodule
