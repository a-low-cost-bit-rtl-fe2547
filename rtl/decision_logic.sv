// decision_logic: turns the three results of the comparison circuit into a
// one-cycle error pulse.
//
// Following the flow of the design: identical codes (part A) are no error;
// otherwise a difference in more than one bit (part B false) is an error,
// and a one-bit difference is an error unless part C finds it to be a step
// of one code. The pulse err_o is qualified by check_i, which is high in the
// one clock cycle after a new pair of codes has been loaded, so each sampled
// pair is judged exactly once whatever the division ratio; this qualifier
// is this design's addition, the three rules are the original ones.
//
// Purely combinational: err_o = check_i & ~same & (~one_diff | ~dist_one).
module decision_logic (
  input  logic check_i,
  input  logic same_i,
  input  logic one_diff_i,
  input  logic dist_one_i,
  output logic err_o
);

  assign err_o = check_i & ~same_i & (~one_diff_i | ~dist_one_i);

endmodule
