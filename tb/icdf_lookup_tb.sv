// icdf_lookup_tb: drives the ICDF lookup unit at its default configuration
// (normal table, 54 + 4 octaves, k = 3) with random floating point numbers:
// both symmetry values, both parts, every exponent 0..54 (so both parts'
// exponent saturation is hit) and gaps in valid. Every output must arrive
// in the third cycle after its input (three register stages) and
//  - equal, bit for bit, c0 + c1*t (negated for symmetry 1) computed here
//    from the table words at the address formed from part, exponent and the
//    upper 3 mantissa bits, and
//  - lie within 3.834e-4 of an independent approximation of the normal ICDF at
//    the uniform value the number stands for.
module icdf_lookup_tb;
  import nurng_ref_pkg::*;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic valid_i, symm, part, valid_o;
  logic [5:0]  expo;
  logic [19:0] mant;
  logic signed [47:0] y;
  int checks = 0, failures = 0;
  int n_part[2], n_symm[2], n_sat[2];

  icdf_lookup dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .symm_i(symm), .part_i(part),
    .exp_i(expo), .mant_i(mant), .valid_o(valid_o), .y_o(y));

  logic [68:0] table_w [464];
  initial $readmemh("rtl/icdf_normal.hex", table_w);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results per cycle of input
  bit     exp_v[$];
  longint exp_y[$];
  real    exp_r[$];

  initial begin
    int e_sat, a, lat_v;
    longint c0, c1, t, yy;
    real f, r;
    rst_n = 0; valid_i = 0; symm = 0; part = 0; expo = '0; mant = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 4) != 0);
      symm    = 1'($urandom);
      part    = 1'($urandom);
      expo    = 6'($urandom_range(0, 54));
      mant    = 20'($urandom);
      e_sat   = part ? ((expo > 3) ? 3 : int'(expo)) : ((expo > 53) ? 53 : int'(expo));
      a       = (part ? 54 + e_sat : e_sat) * 8 + int'(mant[19:17]);
      c0      = longint'($signed(table_w[a][68:23]));
      c1      = longint'($signed(table_w[a][22:0]));
      t       = longint'(mant[16:0]);
      yy      = c0 + c1 * t;
      if (symm) yy = -yy;
      f       = real'(mant) / pow2(20);
      r       = norm_icdf(x_of(part, e_sat, f, 4));
      if (symm) r = -r;
      exp_v.push_back(valid_i);
      exp_y.push_back(yy);
      exp_r.push_back(r);
      if (valid_i) begin
        n_part[part]++; n_symm[symm]++;
        if ((part && expo >= 3) || (!part && expo >= 53)) n_sat[part]++;
      end
      @(posedge clk); #1;
      if (exp_v.size() > 2) begin
        lat_v = exp_v.pop_front();
        yy    = exp_y.pop_front();
        r     = exp_r.pop_front();
        checks++;
        if (valid_o !== 1'(lat_v)) begin
          failures++;
          $display("cycle %0d: valid_o=%b expected %0d", cyc, valid_o, lat_v);
        end else if (lat_v) begin
          checks++;
          if (longint'(y) != yy) begin
            failures++;
            $display("cycle %0d: y=%0d expected %0d", cyc, y, yy);
          end
          checks++;
          if (real'(y) / pow2(41) - r > 3.834e-4 || r - real'(y) / pow2(41) > 3.834e-4) begin
            failures++;
            $display("cycle %0d: y=%f reference %f", cyc, real'(y) / pow2(41), r);
          end
        end
      end
    end
    $display("part0=%0d part1=%0d symm0=%0d symm1=%0d sat0=%0d sat1=%0d",
             n_part[0], n_part[1], n_symm[0], n_symm[1], n_sat[0], n_sat[1]);
    checks++;
    if (n_part[0] == 0 || n_part[1] == 0 || n_symm[0] == 0 || n_symm[1] == 0 ||
        n_sat[0] == 0 || n_sat[1] == 0) begin
      failures++;
      $display("a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
