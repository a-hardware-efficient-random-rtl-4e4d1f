// nurng_dist_tb: approximation error of the complete generator for the two
// point-symmetric distributions, standard normal and Laplace (location 0,
// scale 1), each with the default segmentation (54 + 4 octaves, 8 subsections).
//
// Two default-sized generators run side by side on the same input vectors,
// one with the shipped normal table and one with tb/icdf_laplace.hex
// (39 fractional bits, since the Laplace tail reaches about -38). The vectors
// are built so that every exponent 0..54 is equally likely: the exponent is
// chosen first, and e/10 vectors with an all-zero exponent part are followed
// by one with e mod 10 leading zeros. Symmetry, part and mantissa are random.
// For every output the absolute error against the exact ICDF of the uniform
// value that the floating point number stands for is measured. The largest
// error must stay below 3.834e-4 (normal) and 9.014e-4 (Laplace), the maximum
// errors that linear fits of this segmentation are known to reach.
module nurng_dist_tb;
  import nurng_ref_pkg::*;

  localparam int N_NUM = 60000;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [31:0] rn;
  logic rn_valid;
  logic stall_n, stall_l, v_n, v_l;
  logic signed [47:0] y_n, y_l;

  nurng_top dut_norm (
    .clk(clk), .rst_n(rst_n), .rn_i(rn), .rn_valid_i(rn_valid),
    .fp_stall_o(stall_n), .y_valid_o(v_n), .y_o(y_n));

  nurng_top #(.ROM_FILE("tb/icdf_laplace.hex")) dut_lap (
    .clk(clk), .rst_n(rst_n), .rn_i(rn), .rn_valid_i(rn_valid),
    .fp_stall_o(stall_l), .y_valid_o(v_l), .y_o(y_l));

  int checks = 0, failures = 0;
  int n_out = 0;
  int oct_hits[2][55];
  real max_err_n = 0.0, max_err_l = 0.0;

  // expected numbers in output order
  bit q_symm[$], q_part[$];
  int q_exp[$];
  bit [19:0] q_mant[$];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n && v_n) begin
      bit s, p;
      int e, e_sat;
      bit [19:0] m;
      real x, rn_ref, rl_ref, yn, yl;
      checks++;
      if (q_symm.size() == 0 || v_l !== 1'b1) begin
        failures++;
        $display("unexpected output");
      end else begin
        s = q_symm.pop_front(); p = q_part.pop_front();
        e = q_exp.pop_front();  m = q_mant.pop_front();
        e_sat  = p ? ((e > 3) ? 3 : e) : ((e > 53) ? 53 : e);
        x      = x_of(p, e_sat, real'(m) / pow2(20), 4);
        rn_ref = norm_icdf(x);
        rl_ref = $ln(2.0 * x);
        if (s) begin rn_ref = -rn_ref; rl_ref = -rl_ref; end
        yn = real'(y_n) / pow2(41);
        yl = real'(y_l) / pow2(39);
        if (yn - rn_ref > max_err_n) max_err_n = yn - rn_ref;
        if (rn_ref - yn > max_err_n) max_err_n = rn_ref - yn;
        if (yl - rl_ref > max_err_l) max_err_l = yl - rl_ref;
        if (rl_ref - yl > max_err_l) max_err_l = rl_ref - yl;
        oct_hits[p][e]++;
        n_out++;
      end
    end
  end

  task automatic send(logic [31:0] v);
    @(negedge clk);
    rn = v;
    rn_valid = 1'b1;
  endtask

  initial begin
    int e, r, missing;
    bit s, p;
    bit [19:0] m;
    logic [9:0] ep;
    rst_n = 0; rn = '0; rn_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < N_NUM; n++) begin
      e = $urandom_range(0, 54);
      s = 1'($urandom); p = 1'($urandom); m = 20'($urandom);
      q_symm.push_back(s); q_part.push_back(p); q_exp.push_back(e); q_mant.push_back(m);
      r = e;
      // first vector carries symmetry, part and mantissa
      while (1) begin
        if (r >= 10) begin
          ep = '0;
        end else begin
          ep = 10'($urandom) | 10'(1 << (9 - r));
          ep = ep & ~(10'h3FF << (10 - r));
        end
        if (r == e) send({s, p, ep, m});
        else        send({1'($urandom), 1'($urandom), ep, 20'($urandom)});
        if (r < 10) break;
        r -= 10;
      end
    end
    @(negedge clk) rn_valid = 1'b0;
    repeat (10) @(negedge clk);
    missing = 0;
    for (int pp = 0; pp < 2; pp++)
      for (int ee = 0; ee <= 54; ee++)
        if (oct_hits[pp][ee] == 0) missing++;
    $display("numbers out=%0d, exponent/part combinations never hit=%0d", n_out, missing);
    $display("largest absolute error: normal %e (bound 3.834e-4), Laplace %e (bound 9.014e-4)",
             max_err_n, max_err_l);
    checks++; if (n_out != N_NUM || q_symm.size() != 0) begin failures++; $display("numbers lost"); end
    checks++; if (missing != 0) begin failures++; $display("not every exponent was reached"); end
    checks++; if (max_err_n > 3.834e-4) begin failures++; $display("normal error above bound"); end
    checks++; if (max_err_l > 9.014e-4) begin failures++; $display("Laplace error above bound"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
