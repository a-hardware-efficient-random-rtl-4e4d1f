// mac_unit_tb: random and corner operands at the default widths (46-bit c0,
// 23-bit c1, 17-bit t); checks c0 + c1*t one cycle after the operands and
// that a low enable holds the result.
module mac_unit_tb;
  logic clk = 0, en;
  logic signed [45:0] c0;
  logic signed [22:0] c1;
  logic [16:0] t;
  logic signed [46:0] acc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac_unit dut (.clk(clk), .en_i(en), .c0_i(c0), .c1_i(c1), .t_i(t), .acc_o(acc));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v, held;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1'b1;
      case (i % 5)
        0: begin c0 = 46'sh1FFF_FFFF_FFFF; c1 = 23'sh3FFFFF; t = '1; end  // largest
        1: begin c0 = -46'sh2000_0000_0000; c1 = -23'sh400000; t = '1; end // most negative
        default: begin
          c0 = {$urandom, $urandom} ;
          c1 = 23'($urandom);
          t  = 17'($urandom);
        end
      endcase
      exp_v = longint'(c0) + longint'(c1) * longint'({1'b0, t});
      @(posedge clk); #1;
      checks++;
      if (longint'(acc) != exp_v) begin
        failures++;
        $display("c0=%0d c1=%0d t=%0d acc=%0d exp=%0d", c0, c1, t, acc, exp_v);
      end
      // hold check
      if (i % 50 == 0) begin
        held = longint'(acc);
        @(negedge clk); en = 1'b0; c0 = ~c0;
        @(posedge clk); #1;
        checks++;
        if (longint'(acc) != held) begin failures++; $display("enable low did not hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
