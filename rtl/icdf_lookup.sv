// icdf_lookup: ICDF lookup unit (LUT evaluator) with two parts per half.
//
// The floating point number selects one subsection of the encoded half of the
// inverse CDF and the unit evaluates the linear polynomial stored for it:
//   section  = exponent            in part 0,
//              exponent + N_OCT0   in part 1   (offset mux and adder),
//   address  = {section, k upper mantissa bits},
//   y        = c0 + c1 * (remaining MANT_BW-k mantissa bits),
//   output   = symm ? -y : y       (the symmetry bit multiplies by -1).
// Only one half of a symmetric ICDF is stored; the symmetry bit mirrors it.
// Part 0 holds N_OCT0 octaves that grow towards its upper border, part 1
// N_OCT1 octaves that shrink towards its upper border; the offset in ROM
// words is 2^k * N_OCT0.
// The address generation, the coefficient ROM, the MAC and the sign stage
// follow the design. Two points are this implementation's own: the exponent
// is saturated to the last octave of the selected part (N_OCT0-1 or N_OCT1-1),
// so the deepest octave of each part also takes every larger exponent and the
// ROM needs no unused words; and the pipeline has three registered stages
// (ROM read, MAC, sign), so valid_o follows valid_i after 3 cycles. The
// pipeline always advances; valid_i marks which cycles carry a number, so the
// stalls of the converter pass through as bubbles.
module icdf_lookup #(
  parameter int unsigned MANT_BW   = nurng_pkg::MANT_BW,
  parameter int unsigned K         = nurng_pkg::K,
  parameter int unsigned EXP_BW    = nurng_pkg::exp_width(nurng_pkg::MAX_EXP),
  parameter int unsigned N_OCT0    = nurng_pkg::N_OCT0,
  parameter int unsigned N_OCT1    = nurng_pkg::N_OCT1,
  parameter int unsigned C0_W      = nurng_pkg::C0_W,
  parameter int unsigned C1_W      = nurng_pkg::C1_W,
  parameter int unsigned OUT_W     = nurng_pkg::OUT_W,
  parameter string       ROM_FILE  = "rtl/icdf_normal.hex"
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid_i,
  input  logic                    symm_i,
  input  logic                    part_i,
  input  logic [EXP_BW-1:0]       exp_i,
  input  logic [MANT_BW-1:0]      mant_i,
  output logic                    valid_o,
  output logic signed [OUT_W-1:0] y_o
);

  localparam int unsigned T_W    = MANT_BW - K;
  localparam int unsigned N_SEC  = N_OCT0 + N_OCT1;
  localparam int unsigned SEC_W  = $clog2(N_SEC);
  localparam int unsigned DEPTH  = N_SEC * (2 ** K);
  localparam int unsigned AW     = SEC_W + K;
  localparam int unsigned ACC_W  = ((C0_W > C1_W + T_W + 1) ? C0_W : C1_W + T_W + 1) + 1;
  localparam int unsigned CMP_W  = (EXP_BW > SEC_W) ? EXP_BW : SEC_W;

  // ---- stage 0: section and subsection address --------------------------
  logic [CMP_W-1:0] exp_w, exp_sat;
  logic [SEC_W-1:0] offset, section;
  logic [AW-1:0]    addr;

  always_comb begin
    exp_w = CMP_W'(exp_i);
    if (part_i) exp_sat = (exp_w > CMP_W'(N_OCT1 - 1)) ? CMP_W'(N_OCT1 - 1) : exp_w;
    else        exp_sat = (exp_w > CMP_W'(N_OCT0 - 1)) ? CMP_W'(N_OCT0 - 1) : exp_w;
    offset  = part_i ? SEC_W'(N_OCT0) : '0;
    section = SEC_W'(exp_sat) + offset;
    addr    = {section, mant_i[MANT_BW-1 -: K]};
  end

  // ---- stage 1: coefficient read ------------------------------------------
  logic signed [C0_W-1:0] c0;
  logic signed [C1_W-1:0] c1;
  logic [T_W-1:0]         t_q;
  logic                   symm_q1, valid_q1;

  coeff_rom #(
    .DEPTH(DEPTH), .AW(AW), .C0_W(C0_W), .C1_W(C1_W), .INIT_FILE(ROM_FILE)
  ) u_rom (
    .clk   (clk),
    .en_i  (1'b1),
    .addr_i(addr),
    .c0_o  (c0),
    .c1_o  (c1)
  );

  always_ff @(posedge clk) begin
    t_q     <= mant_i[T_W-1:0];
    symm_q1 <= symm_i;
  end

  // ---- stage 2: multiply-accumulate ---------------------------------------
  logic signed [ACC_W-1:0] acc;
  logic                    symm_q2, valid_q2;

  mac_unit #(.C0_W(C0_W), .C1_W(C1_W), .T_W(T_W), .ACC_W(ACC_W)) u_mac (
    .clk  (clk),
    .en_i (1'b1),
    .c0_i (c0),
    .c1_i (c1),
    .t_i  (t_q),
    .acc_o(acc)
  );

  always_ff @(posedge clk) symm_q2 <= symm_q1;

  // ---- stage 3: symmetry ------------------------------------------------------
  always_ff @(posedge clk) begin
    y_o <= symm_q2 ? -OUT_W'(acc) : OUT_W'(acc);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q1 <= 1'b0;
      valid_q2 <= 1'b0;
      valid_o  <= 1'b0;
    end else begin
      valid_q1 <= valid_i;
      valid_q2 <= valid_q1;
      valid_o  <= valid_q2;
    end
  end

endmodule
