// ber_bist: the Gray-code bit-error-rate BIST circuit.
//
// Every sampled ADC code is compared with the one sampled before it. A pair
// whose code distance exceeds one counts as a bit error. Because the codes
// are Gray coded, the distance test needs no adder (see gray_comparator).
//
// Data path, all on the ADC clock clk:
//   clock_divider   one-cycle sample enable at fs/2**div_sel_i
//   code_registers  code X and code X-1, loaded on the enable
//   gray_comparator parts A, B and C on X xor (X-1) and on X
//   decision_logic  error pulse, one per judged pair
//   error_counter   B-bit error record with sticky overflow (end of test)
//   parallel_to_serial  header 1011 + record, one bit per clock on ser_o
//
// Timing: a code presented on code_i in an enabled cycle is judged in the
// next clock cycle (err_o, one cycle wide) against the code of the previous
// enabled cycle; the error is counted at the edge that ends that cycle,
// and shows in the record of the next frame copied after it. The first pair after reset is
// judged only once both registers hold real samples.
//
// Ports: clk, rst (asynchronous, active high, the BIST's reset pin),
// div_sel_i, code_i (Gray code, G1 = MSB), ser_o (serial output pin),
// err_o (evaluation output), count_o, end_o (counter overflowed, test over),
// frame_start_o.
module ber_bist #(
  parameter int unsigned  N            = bist_pkg::ADC_BITS,
  parameter int unsigned  B            = bist_pkg::REC_BITS,
  parameter logic [B-1:0] HEADER       = bist_pkg::HEADER,
  parameter int unsigned  MAX_LOG2_DIV = bist_pkg::MAX_LOG2_DIV,
  parameter int unsigned  SEL_BITS     = bist_pkg::DIV_SEL_BITS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SEL_BITS-1:0] div_sel_i,
  input  logic [N-1:0]        code_i,
  output logic                ser_o,
  output logic                err_o,
  output logic [B-1:0]        count_o,
  output logic                end_o,
  output logic                frame_start_o
);

  logic         sample_en;
  logic         check_q;
  logic [N-1:0] cur, prev;
  logic         valid;
  logic         same, one_diff, dist_one;
  logic [N-1:0] verif;

  clock_divider #(.MAX_LOG2_DIV(MAX_LOG2_DIV), .SEL_BITS(SEL_BITS)) u_div (
    .clk, .rst, .div_sel_i, .sample_en_o(sample_en)
  );

  code_registers #(.N(N)) u_regs (
    .clk, .rst, .sample_en_i(sample_en), .code_i,
    .cur_o(cur), .prev_o(prev), .valid_o(valid)
  );

  // A new pair sits in the registers in the cycle after an enabled edge.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) check_q <= 1'b0;
    else     check_q <= sample_en;
  end

  gray_comparator #(.N(N)) u_cmp (
    .cur_i(cur), .prev_i(prev),
    .same_o(same), .one_diff_o(one_diff), .dist_one_o(dist_one),
    .verif_o(verif)
  );

  decision_logic u_dec (
    .check_i(check_q & valid), .same_i(same), .one_diff_i(one_diff),
    .dist_one_i(dist_one), .err_o
  );

  error_counter #(.B(B)) u_cnt (
    .clk, .rst, .inc_i(err_o), .count_o, .end_o
  );

  parallel_to_serial #(.B(B), .HEADER(HEADER)) u_p2s (
    .clk, .rst, .count_i(count_o), .ser_o, .frame_start_o
  );

  // The verification code is only used inside the comparison.
  logic unused_ok;
  assign unused_ok = ^verif;

endmodule
