// coeff_rom_tb: checks the coefficient memory two ways.
//  1. A 16-word instance loaded with a pattern file (word i = {i*37+5, ~i},
//     8 bits each) is read at random addresses with random enables; data must
//     appear one cycle after the address and hold while the enable is low.
//  2. The default instance (the standard normal table) is read completely and
//     every subsection's line c0 + c1*t (41 fractional bits, t = 0 .. 2^17)
//     is compared with an independent approximation of the normal ICDF at
//     the subsection's start, quarter points, middle and end; it must stay
//     within 3.834e-4, the error bound of a linear fit of this size.
module coeff_rom_tb;
  import nurng_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // pattern instance
  logic       en_p;
  logic [3:0] addr_p;
  logic signed [7:0] c0_p, c1_p;
  coeff_rom #(.DEPTH(16), .AW(4), .C0_W(8), .C1_W(8), .INIT_FILE("tb/coeff_rom_tb.hex")) dut_p (
    .clk(clk), .en_i(en_p), .addr_i(addr_p), .c0_o(c0_p), .c1_o(c1_p));

  // default (normal distribution) instance
  logic       en_n;
  logic [8:0] addr_n;
  logic signed [45:0] c0_n;
  logic signed [22:0] c1_n;
  coeff_rom dut_n (.clk(clk), .en_i(en_n), .addr_i(addr_n), .c0_o(c0_n), .c1_o(c1_n));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e0, e1;
    real scale, yl, rl, tol, worst;
    bit part;
    int e, j;
    en_n = 0; addr_n = '0;
    // 1. pattern
    e0 = '0; e1 = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en_p   = ($urandom_range(0, 3) != 0);
      addr_p = 4'($urandom);
      if (en_p) begin
        e0 = 8'(int'(addr_p) * 37 + 5);
        e1 = ~{4'b0, addr_p};
      end
      @(posedge clk); #1;
      if (i > 0 || en_p) begin
        checks++;
        if (c0_p !== e0 || c1_p !== e1) begin
          failures++;
          $display("pattern addr=%0d en=%b got %h %h expected %h %h", addr_p, en_p, c0_p, c1_p, e0, e1);
        end
      end
    end
    // 2. normal table
    scale = pow2(41);
    tol   = 3.834e-4;
    worst = 0.0;
    for (int a = 0; a < 464; a++) begin
      @(negedge clk);
      en_n = 1; addr_n = 9'(a);
      @(posedge clk); #1;
      j    = a % 8;
      part = (a / 8) >= 54;
      e    = part ? (a / 8) - 54 : (a / 8);
      for (int q = 0; q <= 4; q++) begin
        yl = (real'(c0_n) + real'(c1_n) * (q * pow2(15))) / scale;
        rl = (part && e == 3 && j == 7 && q == 4) ? 0.0
             : norm_icdf(x_of(part, e, (j + q / 4.0) / 8.0, 4));
        if (yl - rl > worst) worst = yl - rl;
        if (rl - yl > worst) worst = rl - yl;
        checks++;
        if (yl - rl > tol || rl - yl > tol) begin
          failures++;
          $display("table addr=%0d part=%0d octave=%0d sub=%0d point %0d/4: %f, reference %f",
                   a, part, e, j, q, yl, rl);
        end
      end
    end
    $display("largest deviation of the normal table from the ICDF: %e", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
