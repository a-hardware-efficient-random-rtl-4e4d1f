// nurng_uniform_tb: frequency tests of the uniform floating point numbers made
// by the converter, at its default configuration (32-bit input vectors,
// 20-bit mantissa) and at the wide configuration used for testing the
// floating point numbers at full fixed point equivalence (43-bit input
// vectors, 31-bit mantissa, same 10-bit exponent part).
//
// 2^20 floating point numbers are generated by each converter from random
// input vectors. Each is read back as a uniform value in (0, 1): part 0 with
// exponent e and mantissa fraction f stands for 2^-(e+3) * (1 + f), part 1
// for 0.5 - 2^-(e+2) + 2^-(e+3) * f, and the symmetry bit mirrors the value
// to 1 - x. For each converter:
//  - the leading 12 bits of these values are counted in 4096 categories and
//    a chi-square statistic (4095 degrees of freedom) must stay below
//    4095 + 5 * sqrt(2 * 4095);
//  - the lowest 8 mantissa bits are counted in 256 categories, with the
//    limit 255 + 5 * sqrt(2 * 255);
//  - the share of numbers with exponent 0, 1 and 2 must be close to 1/2,
//    1/4 and 1/8, and numbers built from more than one input vector must
//    occur.
module nurng_uniform_tb;
  import nurng_ref_pkg::*;

  localparam int N = 1 << 20;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [42:0] rn;
  logic [1:0]  symm, part, dv, stall;
  logic [5:0]  expo [2];
  logic [19:0] mant20;
  logic [30:0] mant31;

  fp_converter dut (
    .clk(clk), .rst_n(rst_n), .rn_i(rn[31:0]), .rn_valid_i(1'b1),
    .symm_o(symm[0]), .part_o(part[0]), .exp_o(expo[0]), .mant_o(mant20),
    .data_valid_o(dv[0]), .stall_o(stall[0]));

  fp_converter #(.M(43), .MANT_BW(31)) dut_wide (
    .clk(clk), .rst_n(rst_n), .rn_i(rn), .rn_valid_i(1'b1),
    .symm_o(symm[1]), .part_o(part[1]), .exp_o(expo[1]), .mant_o(mant31),
    .data_valid_o(dv[1]), .stall_o(stall[1]));

  int checks = 0, failures = 0;
  int hist[2][4096];
  int low[2][256];
  int n[2], n_exp[2][3], n_stall[2];

  initial begin
    repeat (N + N / 8) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) rn = 43'({$urandom, $urandom});

  function automatic void tally(int c, logic s, logic p, int e, real f, int lo);
    real x, u;
    int b;
    x = p ? 0.5 - pow2(-(e + 2)) + pow2(-(e + 3)) * f
          : pow2(-(e + 3)) * (1.0 + f);
    u = s ? 1.0 - x : x;
    b = int'($floor(u * 4096.0));
    if (b > 4095) b = 4095;
    hist[c][b]++;
    low[c][lo]++;
    if (e < 3) n_exp[c][e]++;
    n[c]++;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 2; c++) if (stall[c]) n_stall[c]++;
      if (dv[0] && n[0] < N)
        tally(0, symm[0], part[0], int'(expo[0]), real'(mant20) / pow2(20), int'(mant20[7:0]));
      if (dv[1] && n[1] < N)
        tally(1, symm[1], part[1], int'(expo[1]), real'(mant31) / pow2(31), int'(mant31[7:0]));
    end
  end

  initial begin
    real chi2, expct, lim;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (n[0] == N && n[1] == N);
    for (int c = 0; c < 2; c++) begin
      expct = real'(N) / 4096.0;
      chi2 = 0.0;
      for (int i = 0; i < 4096; i++) chi2 += (hist[c][i] - expct) ** 2 / expct;
      lim = 4095.0 + 5.0 * $sqrt(2.0 * 4095.0);
      $display("%0d-bit mantissa: 12-bit chi2=%f (limit %f)", (c == 1) ? 31 : 20, chi2, lim);
      checks++; if (chi2 > lim) begin failures++; $display("12-bit frequency test failed"); end
      expct = real'(N) / 256.0;
      chi2 = 0.0;
      for (int i = 0; i < 256; i++) chi2 += (low[c][i] - expct) ** 2 / expct;
      lim = 255.0 + 5.0 * $sqrt(2.0 * 255.0);
      $display("%0d-bit mantissa: low 8 mantissa bits chi2=%f (limit %f)", (c == 1) ? 31 : 20, chi2, lim);
      checks++; if (chi2 > lim) begin failures++; $display("low mantissa bit test failed"); end
      $display("exponent 0/1/2 shares %f %f %f, stall cycles=%0d",
               real'(n_exp[c][0]) / N, real'(n_exp[c][1]) / N, real'(n_exp[c][2]) / N, n_stall[c]);
      for (int e = 0; e < 3; e++) begin
        real share, want;
        share = real'(n_exp[c][e]) / N;
        want  = pow2(-(e + 1));
        checks++;
        if (share - want > 0.005 || want - share > 0.005) begin
          failures++;
          $display("exponent %0d share %f, expected %f", e, share, want);
        end
      end
      checks++; if (n_stall[c] == 0) begin failures++; $display("no multi-vector number"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
