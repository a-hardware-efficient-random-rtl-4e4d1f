// fp_converter: uniform bit vector to floating point random number.
//
// Each M-bit input vector is read, MSB to LSB, as a symmetry bit, a part bit,
// an exponent part of M-MANT_BW-2 bits and a mantissa part of MANT_BW bits.
// The symmetry bit, the part bit and the mantissa are taken over unchanged
// from the first vector of a number; the exponent is the number of leading
// zeros of the exponent part. If the exponent part is all zero, the count so
// far is kept in the exponent register and the next input vector is consumed
// to continue counting, until a one is found or the count reaches MAX_EXP;
// the exponent is then min(count, MAX_EXP). While a number needs further
// input vectors the output is stalled (data_valid_o stays low).
// The field layout, the accumulate-through-the-exponent-register loop (a mux
// choosing 0 or the stored exponent, plus an adder with the leading-zero
// count) and the saturation at MAX_EXP follow the design description; the
// input valid flag and the synchronous active-low reset are this
// implementation's choices.
//
// Interface: one vector is consumed in every cycle with rn_valid_i high.
// Timing: a number whose first vector's exponent part is nonzero appears one
// cycle after that vector with data_valid_o high for one cycle; a number that
// needs n vectors appears one cycle after the n-th. Outputs hold between
// valid pulses and are meaningful only while data_valid_o is high.
module fp_converter #(
  parameter int unsigned M       = nurng_pkg::M,
  parameter int unsigned MANT_BW = nurng_pkg::MANT_BW,
  parameter int unsigned MAX_EXP = nurng_pkg::MAX_EXP,
  parameter int unsigned EXP_BW  = nurng_pkg::exp_width(MAX_EXP)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [M-1:0]       rn_i,         // uniform input vector
  input  logic               rn_valid_i,   // rn_i holds a fresh vector, consume it
  output logic               symm_o,       // symmetry bit
  output logic               part_o,       // part bit
  output logic [EXP_BW-1:0]  exp_o,        // exponent = leading zeros, <= MAX_EXP
  output logic [MANT_BW-1:0] mant_o,       // mantissa (hidden leading 1)
  output logic               data_valid_o, // a complete number is on the outputs
  output logic               stall_o       // a number is waiting for another vector
);

  localparam int unsigned EP_W  = nurng_pkg::exp_part_width(M, MANT_BW);
  localparam int unsigned LZ_W  = $clog2(EP_W + 1);
  localparam int unsigned SUM_W = $clog2(MAX_EXP + EP_W + 1);

  // Field split of the input vector.
  logic             in_symm, in_part;
  logic [EP_W-1:0]  in_exp_part;
  logic [MANT_BW-1:0] in_mant;
  assign in_symm     = rn_i[M-1];
  assign in_part     = rn_i[M-2];
  assign in_exp_part = rn_i[MANT_BW +: EP_W];
  assign in_mant     = rn_i[MANT_BW-1:0];

  logic [LZ_W-1:0] lz;
  logic            lz_all_zero;

  lzc #(.W(EP_W), .CW(LZ_W)) u_lzc (
    .in_i      (in_exp_part),
    .cnt_o     (lz),
    .all_zero_o(lz_all_zero)
  );

  // Control: cont_q is set while the number under construction needs more
  // input vectors. The mux picks 0 for a new number or the stored exponent
  // for a continued one.
  logic              cont_q;
  logic [SUM_W-1:0]  exp_base, exp_sum;
  logic              done;
  logic [EXP_BW-1:0] exp_next;

  always_comb begin
    exp_base = cont_q ? SUM_W'(exp_o) : '0;
    exp_sum  = exp_base + SUM_W'(lz);
    done     = !lz_all_zero || (exp_sum >= SUM_W'(MAX_EXP));
    exp_next = (exp_sum >= SUM_W'(MAX_EXP)) ? EXP_BW'(MAX_EXP) : EXP_BW'(exp_sum);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cont_q       <= 1'b0;
      data_valid_o <= 1'b0;
      symm_o       <= 1'b0;
      part_o       <= 1'b0;
      exp_o        <= '0;
      mant_o       <= '0;
    end else if (rn_valid_i) begin
      if (!cont_q) begin
        symm_o <= in_symm;
        part_o <= in_part;
        mant_o <= in_mant;
      end
      exp_o        <= exp_next;
      cont_q       <= !done;
      data_valid_o <= done;
    end else begin
      data_valid_o <= 1'b0;
    end
  end

  assign stall_o = cont_q;

  // The exponent of a delivered number never exceeds MAX_EXP.
  a_exp_range: assert property (@(posedge clk) disable iff (!rst_n)
    data_valid_o |-> (exp_o <= EXP_BW'(MAX_EXP)));

endmodule
