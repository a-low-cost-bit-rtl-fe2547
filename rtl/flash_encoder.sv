// flash_encoder: digital back end of an N-bit flash ADC. It turns the
// 2**N-1 comparator outputs (a thermometer code) into an N-bit Gray code and
// registers it on the sampling clock.
//
// Adjacent comparator outputs are combined into a one-hot word that marks
// the top of the thermometer column: hot[k] = t[k-1] & ~t[k] for k in
// 1..2**N-2, hot[2**N-1] = t[2**N-2], with all comparators low meaning code
// 0. A ROM whose row k holds the Gray code of k, k xor (k >> 1), is read by
// ORing the rows of all hot lines. A clean thermometer code gives exactly
// one hot line. A bubble in the column gives several hot lines, and the ORed
// Gray rows then form a wrong code; the BER BIST is there to catch such
// errors.
//
// Timing: the Gray code appears on gray_o one clock after the comparator
// outputs on therm_i. rst clears the output register.
module flash_encoder #(
  parameter int unsigned N = bist_pkg::ADC_BITS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [2**N-2:0]    therm_i,
  output logic [N-1:0]       gray_o
);

  localparam int unsigned LEVELS = 2 ** N;

  logic [LEVELS-1:1] hot;
  logic [N-1:0]      gray_d;

  always_comb begin
    hot[1] = therm_i[0] & ~therm_i[1];
    for (int k = 2; k < int'(LEVELS) - 1; k++) begin
      hot[k] = therm_i[k-1] & ~therm_i[k];
    end
    hot[LEVELS-1] = therm_i[LEVELS-2];
  end

  // ROM read as a wired OR of the selected rows.
  always_comb begin
    gray_d = '0;
    for (int k = 1; k < int'(LEVELS); k++) begin
      if (hot[k]) gray_d = gray_d | N'(k ^ (k >> 1));
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) gray_o <= '0;
    else     gray_o <= gray_d;
  end

endmodule
