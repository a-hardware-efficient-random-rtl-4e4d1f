// mac_unit: multiply-accumulate stage of the ICDF lookup unit.
//
// Computes acc = c0 + c1 * t, where t is the unsigned remainder of the
// mantissa below the k subsection bits (the position inside the subsection)
// and c0, c1 are the signed coefficients of the subsection. With the default
// widths (23-bit c1, 17-bit t, 46-bit c0) the operation maps onto one
// 25x18 multiplier with a 48-bit adder. c0 is stored scaled so that it lines
// up with the integer product, so no shifter is needed. The product and the
// sum are computed in one registered stage (latency 1, enable en_i); the
// structure (multiplier feeding an adder with c0) follows the design, the
// single pipeline register is this implementation's choice.
module mac_unit #(
  parameter int unsigned C0_W  = nurng_pkg::C0_W,
  parameter int unsigned C1_W  = nurng_pkg::C1_W,
  parameter int unsigned T_W   = nurng_pkg::MANT_BW - nurng_pkg::K,
  parameter int unsigned ACC_W = ((C0_W > C1_W + T_W + 1) ? C0_W : C1_W + T_W + 1) + 1
) (
  input  logic                    clk,
  input  logic                    en_i,
  input  logic signed [C0_W-1:0]  c0_i,
  input  logic signed [C1_W-1:0]  c1_i,
  input  logic        [T_W-1:0]   t_i,
  output logic signed [ACC_W-1:0] acc_o
);

  logic signed [C1_W+T_W:0] prod;   // signed c1 times unsigned t
  assign prod = c1_i * $signed({1'b0, t_i});

  always_ff @(posedge clk) begin
    if (en_i) begin
      acc_o <= ACC_W'(c0_i) + ACC_W'(prod);
    end
  end

endmodule
