// lzc: leading-zero counter built as a binary comparator tree.
//
// The input is padded at its LSB end with ones up to the next power of two P
// and then reduced level by level. A leaf is one bit (count 1 if it is zero).
// A node of level l merges its upper and lower child: if the upper child
// (2^(l-1) bits) is all zero the count is 2^(l-1) plus the lower child's
// count, otherwise it is the upper child's count. After log2(P) levels the
// root holds the number of leading zeros; the padding ones make an all-zero
// input count exactly W. Counting starts at the MSB (in_i[W-1]).
// The tree structure follows the design's description of the leading-zero
// counter as a comparator tree; padding and merge rule are this
// implementation's choices. Purely combinational.
module lzc #(
  parameter int unsigned W  = 10,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  in_i,
  output logic [CW-1:0] cnt_o,
  output logic          all_zero_o
);

  localparam int unsigned L = (W < 2) ? 1 : $clog2(W);  // tree levels
  localparam int unsigned P = 1 << L;                    // padded width

  logic [P-1:0] padded;
  logic [L:0]   cnt  [L+1][P];
  logic         zero [L+1][P];

  if (P > W) begin : g_pad
    assign padded = {in_i, {(P - W){1'b1}}};
  end else begin : g_nopad
    assign padded = in_i;
  end

  always_comb begin
    for (int unsigned l = 0; l <= L; l++) begin
      for (int unsigned i = 0; i < P; i++) begin
        cnt[l][i]  = '0;
        zero[l][i] = 1'b0;
      end
    end
    for (int unsigned i = 0; i < P; i++) begin
      zero[0][i] = ~padded[i];
      cnt[0][i]  = padded[i] ? '0 : (L + 1)'(1);
    end
    for (int unsigned l = 1; l <= L; l++) begin
      for (int unsigned i = 0; i < (P >> l); i++) begin
        zero[l][i] = zero[l-1][2*i+1] & zero[l-1][2*i];
        cnt[l][i]  = zero[l-1][2*i+1] ? (L + 1)'((1 << (l - 1)) + cnt[l-1][2*i])
                                      : cnt[l-1][2*i+1];
      end
    end
  end

  assign cnt_o      = CW'(cnt[L][0]);
  assign all_zero_o = ~|in_i;

endmodule
