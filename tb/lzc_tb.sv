// lzc_tb: exhaustive check of the leading-zero counter at the default width
// (10, the exponent part of a 32-bit vector) and at an odd width (7), against
// a bit-by-bit scan.
module lzc_tb;
  import nurng_ref_pkg::*;

  logic [9:0] in10;  logic [3:0] cnt10; logic z10;
  logic [6:0] in7;   logic [2:0] cnt7;  logic z7;
  int checks = 0, failures = 0;

  lzc dut10 (.in_i(in10), .cnt_o(cnt10), .all_zero_o(z10));
  lzc #(.W(7)) dut7 (.in_i(in7), .cnt_o(cnt7), .all_zero_o(z7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      in10 = 10'(v);
      in7  = 7'(v);
      #1;
      checks++;
      if (int'(cnt10) != lz_ref(longint'(v), 10) || z10 != (v == 0)) begin
        failures++;
        $display("W=10 in=%b cnt=%0d zero=%b", in10, cnt10, z10);
      end
      if (v < 128) begin
        checks++;
        if (int'(cnt7) != lz_ref(longint'(v), 7) || z7 != (v == 0)) begin
          failures++;
          $display("W=7 in=%b cnt=%0d zero=%b", in7, cnt7, z7);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
