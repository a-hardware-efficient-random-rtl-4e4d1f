// nurng_top_tb: end-to-end test of the generator with every parameter at its
// default (32-bit input vectors, normal distribution table).
//
// Phase 1 (directed, 20000 cycles) forces zero exponent parts, single ones
// (the converter consumes a second vector and stalls) and runs of six or more
// (the exponent saturates at max_exp 54, which also selects the deepest
// part-0 octave), with gaps in the input valid flag.
// Phase 2 draws 2^20 numbers from plain random vectors, again with input gaps.
// Throughout, a behavioural model of the floating point generation loop
// predicts every output: it must appear 4 cycles after the last input vector
// of its number, equal bit for bit the linear evaluation of the table word,
// and lie within 3.834e-4 of an independent normal ICDF approximation at the
// uniform value the number stands for. Phase 2 also checks the sample's mean,
// variance, tail counts beyond 3 and 4 sigma, a chi-square test with 100
// equiprobable categories, and that one number leaves per input vector
// except for the rare extra vectors.
module nurng_top_tb;
  import nurng_ref_pkg::*;

  localparam int MAX = 54;
  localparam int N_DRAW = 1 << 20;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [31:0] rn;
  logic rn_valid, stall, y_valid;
  logic signed [47:0] y;

  nurng_top dut (
    .clk(clk), .rst_n(rst_n), .rn_i(rn), .rn_valid_i(rn_valid),
    .fp_stall_o(stall), .y_valid_o(y_valid), .y_o(y));

  logic [68:0] table_w [464];
  initial $readmemh("rtl/icdf_normal.hex", table_w);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_multi = 0, n_sat_max = 0, n_gap = 0, n_part[2], n_symm[2], n_oct_sat[2];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // converter model state
  bit m_cont = 0;
  int m_acc = 0, m_vectors = 0;
  bit m_symm, m_part;
  bit [19:0] m_mant;

  // per-cycle expectations
  bit     q_v[$];
  longint q_y[$];
  real    q_r[$];

  // statistics
  bit     stats_on = 0;
  longint n_stat = 0, n_tail3 = 0, n_tail4 = 0, n_consumed = 0;
  real    sum = 0, sum2 = 0;
  int     hist[100];
  real    bounds[99];

  task automatic step(bit force_zero);
    bit v;
    int lz, s, e, e_sat, a;
    longint c0, c1, yy;
    real r;
    @(negedge clk);
    rn       = $urandom;
    rn_valid = ($urandom_range(0, 9) != 0);
    if (force_zero) rn[29:20] = '0;
    v = 0; yy = 0; r = 0;
    if (rn_valid) begin
      if (stats_on) n_consumed++;
      if (!m_cont) begin
        m_symm = rn[31]; m_part = rn[30]; m_mant = rn[19:0]; m_vectors = 0;
      end
      m_vectors++;
      lz = lz_ref(longint'(rn[29:20]), 10);
      s  = (m_cont ? m_acc : 0) + lz;
      if (rn[29:20] != 0 || s >= MAX) begin
        v      = 1;
        m_cont = 0;
        e      = (s > MAX) ? MAX : s;
        e_sat  = m_part ? ((e > 3) ? 3 : e) : ((e > 53) ? 53 : e);
        a      = ((m_part ? 54 : 0) + e_sat) * 8 + int'(m_mant[19:17]);
        c0     = longint'($signed(table_w[a][68:23]));
        c1     = longint'($signed(table_w[a][22:0]));
        yy     = c0 + c1 * longint'(m_mant[16:0]);
        r      = norm_icdf(x_of(m_part, e_sat, real'(m_mant) / pow2(20), 4));
        if (m_symm) begin yy = -yy; r = -r; end
        if (m_vectors > 1) n_multi++;
        if (e == MAX) n_sat_max++;
        n_part[m_part]++; n_symm[m_symm]++;
        if ((m_part && e >= 3) || (!m_part && e >= 53)) n_oct_sat[m_part]++;
      end else begin
        m_cont = 1;
        m_acc  = s;
      end
    end else begin
      n_gap++;
    end
    q_v.push_back(v); q_y.push_back(yy); q_r.push_back(r);
    @(posedge clk); #1;
    checks++;
    if (stall !== m_cont) begin
      failures++;
      $display("stall=%b expected %b", stall, m_cont);
    end
    if (q_v.size() > 3) begin
      v  = q_v.pop_front();
      yy = q_y.pop_front();
      r  = q_r.pop_front();
      checks++;
      if (y_valid !== v) begin
        failures++;
        $display("y_valid=%b expected %b", y_valid, v);
      end else if (v) begin
        real yr;
        yr = real'(y) / pow2(41);
        checks++;
        if (longint'(y) != yy) begin
          failures++;
          $display("y=%0d expected %0d", y, yy);
        end
        checks++;
        if (yr - r > 3.834e-4 || r - yr > 3.834e-4) begin
          failures++;
          $display("y=%f reference %f", yr, r);
        end
        if (stats_on) begin
          int lo, hi, mid;
          n_stat++;
          sum  += yr;
          sum2 += yr * yr;
          if (yr > 3.0 || yr < -3.0) n_tail3++;
          if (yr > 4.0 || yr < -4.0) n_tail4++;
          lo = 0; hi = 99;   // bin = number of bounds below yr
          while (lo < hi) begin
            mid = (lo + hi) / 2;
            if (bounds[mid] < yr) lo = mid + 1; else hi = mid;
          end
          hist[lo]++;
        end
      end
    end
  endtask

  initial begin
    real mean, var_s, chi2, e3, e4;
    for (int i = 0; i < 99; i++) bounds[i] = norm_icdf((i + 1) / 100.0);
    rst_n = 0; rn = '0; rn_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // phase 1: directed
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(0, 99) == 0) begin
        int run;
        run = $urandom_range(6, 8);
        while (run > 0) begin
          step(1);
          if (rn_valid) run--;
        end
      end else begin
        step($urandom_range(0, 7) == 0);
      end
    end
    repeat (6) step(0);
    $display("directed: multi-vector=%0d max_exp=%0d gaps=%0d part0=%0d part1=%0d symm0=%0d symm1=%0d octave-sat0=%0d octave-sat1=%0d",
             n_multi, n_sat_max, n_gap, n_part[0], n_part[1], n_symm[0], n_symm[1], n_oct_sat[0], n_oct_sat[1]);
    checks++;
    if (n_multi == 0 || n_sat_max == 0 || n_gap == 0 || n_part[0] == 0 || n_part[1] == 0 ||
        n_symm[0] == 0 || n_symm[1] == 0 || n_oct_sat[0] == 0 || n_oct_sat[1] == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end

    // phase 2: random draw
    stats_on = 1;
    n_multi = 0;
    while (n_stat < N_DRAW) step(0);
    mean  = sum / real'(n_stat);
    var_s = sum2 / real'(n_stat) - mean * mean;
    chi2  = 0;
    for (int i = 0; i < 100; i++)
      chi2 += (hist[i] - n_stat / 100.0) ** 2 / (n_stat / 100.0);
    e3 = 0.0026998 * n_stat;
    e4 = 6.334e-5 * n_stat;
    $display("draw of %0d: mean=%f variance=%f beyond3=%0d (%0.0f expected) beyond4=%0d (%0.0f expected) chi2(99 dof)=%f",
             n_stat, mean, var_s, n_tail3, e3, n_tail4, e4, chi2);
    $display("vectors consumed=%0d numbers=%0d extra vectors=%0d", n_consumed, n_stat, n_multi);
    checks++; if (mean > 0.005 || mean < -0.005) begin failures++; $display("mean off"); end
    checks++; if (var_s > 1.007 || var_s < 0.993) begin failures++; $display("variance off"); end
    checks++; if (n_tail3 > e3 + 5.0 * $sqrt(e3) || n_tail3 < e3 - 5.0 * $sqrt(e3)) begin failures++; $display("3-sigma tail off"); end
    checks++; if (n_tail4 > e4 + 5.0 * $sqrt(e4) || n_tail4 < e4 - 5.0 * $sqrt(e4)) begin failures++; $display("4-sigma tail off"); end
    checks++; if (chi2 > 148.2) begin failures++; $display("chi-square above the 0.1%% critical value"); end
    checks++; if (n_multi == 0) begin failures++; $display("no natural stall in the draw"); end
    checks++; if (real'(n_stat) < 0.995 * real'(n_consumed)) begin failures++; $display("throughput below one number per vector"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
