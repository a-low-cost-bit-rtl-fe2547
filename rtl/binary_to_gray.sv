// binary_to_gray: converts an N-bit binary ADC output to reflected Gray code,
// so that a binary-coded converter (pipelined, SAR) can use the Gray-code BER
// BIST.
//
// The most significant bit passes straight through, and every other Gray bit
// is the XOR of a binary bit and its more significant neighbour, as in the
// 5-bit converter of the design. Purely combinational, no latency.
//
// Ports: bin_i (N bits, MSB first = B1), gray_o (N bits, MSB = G1).
module binary_to_gray #(
  parameter int unsigned N = bist_pkg::ADC_BITS
) (
  input  logic [N-1:0] bin_i,
  output logic [N-1:0] gray_o
);

  always_comb begin
    gray_o[N-1] = bin_i[N-1];
    for (int k = N - 2; k >= 0; k--) begin
      gray_o[k] = bin_i[k+1] ^ bin_i[k];
    end
  end

endmodule
