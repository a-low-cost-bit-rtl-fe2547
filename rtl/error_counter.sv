// error_counter: counts the error pulses of the BIST (the "recoder" that
// turns the error pulse into a B-bit error record).
//
// It is a chain of B half adders and B flip-flops: the error pulse enters
// the least significant half adder and each carry feeds the next. The carry
// out of the last stage marks an overflow. The test then ends: the overflow
// flag end_o is set and held, and the count stays at all ones, so that the
// record cannot wrap back to a small value. Only reset clears both. The
// half-adder chain and the end of test on overflow follow the original
// circuit; freezing the count at all ones is this design's choice.
//
// Timing: a pulse on inc_i is counted at the next rising clock edge.
module error_counter #(
  parameter int unsigned B = bist_pkg::REC_BITS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         inc_i,
  output logic [B-1:0] count_o,
  output logic         end_o
);

  logic [B:0]   carry;
  logic [B-1:0] sum;

  // Half-adder chain.
  assign carry[0] = inc_i;
  for (genvar k = 0; k < B; k++) begin : g_ha
    assign sum[k]     = count_o[k] ^ carry[k];
    assign carry[k+1] = count_o[k] & carry[k];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count_o <= '0;
      end_o   <= 1'b0;
    end else if (!end_o) begin
      if (carry[B]) end_o   <= 1'b1;
      else          count_o <= sum;
    end
  end

endmodule
