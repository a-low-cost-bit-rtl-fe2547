// gray_comparator: the comparison circuit of the Gray-code BER BIST. It tells
// whether two successive Gray codes, X (current) and X-1 (previous), are at a
// code distance of at most one, using only bitwise logic and no adder.
//
// All three parts work on d = X xor (X-1) and run in parallel:
//   part A  same_o     d is all zero: the codes are identical.
//   part B  one_diff_o exactly one bit of d is set: for every bit position k,
//                      "bit k set and all others clear" is formed, and the
//                      results are ORed.
//   part C  dist_one_o the single differing bit lies where the verification
//                      code of X has a one. The verification code is the XOR
//                      of the two bit changes that lead from X to its lower
//                      and to its upper neighbour, so a one-bit change at any
//                      other position jumps to a code that is not adjacent.
// The verification code follows the closed form of the design (G1 = MSB,
// G_N = LSB):
//   V_N = 1,  V_{N-1} = G_N,  V_{k} = G_{k+1} & ~G_{k+2} & ... & ~G_N.
// Here bit index 0 is the LSB, so verif_o[0] = 1 and
// verif_o[k] = cur_i[k-1] & ~cur_i[k-2] & ... & ~cur_i[0].
//
// Purely combinational. Ports: cur_i, prev_i (N bits each), same_o,
// one_diff_o, dist_one_o, verif_o (N bits, for observation).
module gray_comparator #(
  parameter int unsigned N = bist_pkg::ADC_BITS
) (
  input  logic [N-1:0] cur_i,
  input  logic [N-1:0] prev_i,
  output logic         same_o,
  output logic         one_diff_o,
  output logic         dist_one_o,
  output logic [N-1:0] verif_o
);

  logic [N-1:0] diff;
  logic [N-1:0] single_at;

  assign diff = cur_i ^ prev_i;

  // Part A.
  assign same_o = (diff == '0);

  // Part B: one term per bit position.
  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      single_at[k] = diff[k];
      for (int j = 0; j < int'(N); j++) begin
        if (j != k) single_at[k] = single_at[k] & ~diff[j];
      end
    end
  end
  assign one_diff_o = |single_at;

  // Verification code from the current code alone.
  always_comb begin
    verif_o[0] = 1'b1;
    for (int k = 1; k < int'(N); k++) begin
      verif_o[k] = cur_i[k-1];
      for (int j = 0; j < k - 1; j++) begin
        verif_o[k] = verif_o[k] & ~cur_i[j];
      end
    end
  end

  // Part C: no differing bit outside the verification code.
  assign dist_one_o = ((diff & ~verif_o) == '0);

endmodule
