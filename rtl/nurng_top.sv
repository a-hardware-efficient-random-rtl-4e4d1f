// nurng_top: nonuniform random number generator by floating point inversion.
//
// A uniform M-bit vector per cycle enters the floating point converter, which
// turns it into {symmetry, part, exponent, mantissa}; the ICDF lookup unit
// then maps that number through a piecewise linear approximation of the
// inverse CDF held in its coefficient ROM. The uniform source itself is
// outside this module: its vector and valid flag are the inputs.
// Interface: rn_i/rn_valid_i in; y_o (signed fixed point, COEF_FRAC fractional
// bits for the shipped tables) qualified by y_valid_o out. fp_stall_o is high
// while the converter waits for a further input vector.
// Timing: 1 cycle in the converter plus 3 in the lookup unit; a number built
// from n input vectors leaves 4 cycles after its last vector. In the steady
// state one output per input vector, except for the rare extra vectors an
// all-zero exponent part costs. The composition follows the design; the
// latencies are this implementation's choice.
module nurng_top #(
  parameter int unsigned M        = nurng_pkg::M,
  parameter int unsigned MANT_BW  = nurng_pkg::MANT_BW,
  parameter int unsigned MAX_EXP  = nurng_pkg::MAX_EXP,
  parameter int unsigned K        = nurng_pkg::K,
  parameter int unsigned N_OCT0   = nurng_pkg::N_OCT0,
  parameter int unsigned N_OCT1   = nurng_pkg::N_OCT1,
  parameter int unsigned C0_W     = nurng_pkg::C0_W,
  parameter int unsigned C1_W     = nurng_pkg::C1_W,
  parameter int unsigned OUT_W    = nurng_pkg::OUT_W,
  parameter string       ROM_FILE = "rtl/icdf_normal.hex"
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [M-1:0]            rn_i,
  input  logic                    rn_valid_i,
  output logic                    fp_stall_o,
  output logic                    y_valid_o,
  output logic signed [OUT_W-1:0] y_o
);

  localparam int unsigned EXP_BW = nurng_pkg::exp_width(MAX_EXP);

  logic               fp_symm, fp_part, fp_valid;
  logic [EXP_BW-1:0]  fp_exp;
  logic [MANT_BW-1:0] fp_mant;

  fp_converter #(
    .M(M), .MANT_BW(MANT_BW), .MAX_EXP(MAX_EXP), .EXP_BW(EXP_BW)
  ) u_conv (
    .clk         (clk),
    .rst_n       (rst_n),
    .rn_i        (rn_i),
    .rn_valid_i  (rn_valid_i),
    .symm_o      (fp_symm),
    .part_o      (fp_part),
    .exp_o       (fp_exp),
    .mant_o      (fp_mant),
    .data_valid_o(fp_valid),
    .stall_o     (fp_stall_o)
  );

  icdf_lookup #(
    .MANT_BW(MANT_BW), .K(K), .EXP_BW(EXP_BW), .N_OCT0(N_OCT0), .N_OCT1(N_OCT1),
    .C0_W(C0_W), .C1_W(C1_W), .OUT_W(OUT_W), .ROM_FILE(ROM_FILE)
  ) u_icdf (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid_i(fp_valid),
    .symm_i (fp_symm),
    .part_i (fp_part),
    .exp_i  (fp_exp),
    .mant_i (fp_mant),
    .valid_o(y_valid_o),
    .y_o    (y_o)
  );

endmodule
