// fp_converter_tb: drives the converter at its default configuration (32-bit
// vectors, 20-bit mantissa, max_exp 54) with random vectors, gaps in the input
// valid flag, vectors whose 10-bit exponent part is zero (one extra vector
// consumed) and runs of zero exponent parts long enough to reach max_exp. A
// behavioural model of the generation loop predicts every output cycle by
// cycle: data_valid one cycle after the last vector of a number, and the
// symmetry bit, part bit and mantissa of its first vector.
module fp_converter_tb;
  import nurng_ref_pkg::*;

  localparam int MAX = 54;
  localparam int EPW = 10;

  logic clk = 0, rst_n;
  logic [31:0] rn;
  logic rn_valid;
  logic symm, part, dv, stall;
  logic [5:0] expo;
  logic [19:0] mant;
  int checks = 0, failures = 0;
  int n_numbers = 0, n_multi = 0, n_sat = 0, n_gaps = 0;

  always #5 clk = ~clk;

  fp_converter dut (
    .clk(clk), .rst_n(rst_n), .rn_i(rn), .rn_valid_i(rn_valid),
    .symm_o(symm), .part_o(part), .exp_o(expo), .mant_o(mant),
    .data_valid_o(dv), .stall_o(stall)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  bit m_cont = 0;
  int m_acc = 0, m_vectors = 0;
  bit m_symm, m_part;
  bit [19:0] m_mant;

  initial begin
    int zero_run = 0;
    bit e_valid;
    int e_exp, lz, sum;
    rst_n = 0; rn = '0; rn_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 50000; cyc++) begin
      @(negedge clk);
      rn       = $urandom;
      rn_valid = ($urandom_range(0, 9) != 0);
      if (zero_run == 0 && $urandom_range(0, 299) == 0) zero_run = $urandom_range(5, 7);
      if (zero_run > 0) begin
        rn[29:20] = '0;
        if (rn_valid) zero_run--;
      end else if ($urandom_range(0, 7) == 0) begin
        rn[29:20] = '0;
      end
      // model
      e_valid = 0;
      if (rn_valid) begin
        if (!m_cont) begin
          m_symm = rn[31]; m_part = rn[30]; m_mant = rn[19:0];
          m_vectors = 0;
        end
        m_vectors++;
        lz  = lz_ref(longint'(rn[29:20]), EPW);
        sum = (m_cont ? m_acc : 0) + lz;
        if (rn[29:20] != 0 || sum >= MAX) begin
          e_valid = 1;
          e_exp   = (sum > MAX) ? MAX : sum;
          m_cont  = 0;
        end else begin
          m_cont = 1;
          m_acc  = sum;
        end
      end else begin
        n_gaps++;
      end
      @(posedge clk); #1;
      checks++;
      if (dv !== e_valid || stall !== m_cont) begin
        failures++;
        $display("cycle %0d: data_valid=%b expected %b, stall=%b expected %b", cyc, dv, e_valid, stall, m_cont);
      end else if (e_valid) begin
        n_numbers++;
        if (m_vectors > 1) n_multi++;
        if (e_exp == MAX) n_sat++;
        checks++;
        if (symm !== m_symm || part !== m_part || mant !== m_mant || int'(expo) != e_exp) begin
          failures++;
          $display("cycle %0d: got s=%b p=%b e=%0d m=%h, expected s=%b p=%b e=%0d m=%h",
                   cyc, symm, part, expo, mant, m_symm, m_part, e_exp, m_mant);
        end
      end
    end
    $display("numbers=%0d multi-vector=%0d saturated=%0d input gaps=%0d", n_numbers, n_multi, n_sat, n_gaps);
    checks++;
    if (n_multi == 0 || n_sat == 0 || n_gaps == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
