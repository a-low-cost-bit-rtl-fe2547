// code_registers: the two register sets of the BIST, which hold two
// successive Gray-coded ADC outputs.
//
// Stage one captures the ADC code (code X), stage two keeps the code
// captured before it (code X-1). Both load only when sample_en_i is high,
// so at a division ratio d they hold samples that were d ADC clocks apart.
// valid_o rises once both stages have been loaded since reset, so that the
// first comparison is not made against the reset value (this design's
// addition; the two register stages are the original structure).
//
// Timing: a code on code_i in a cycle with sample_en_i appears on cur_o one
// clock later, and on prev_o at the next enabled cycle after that.
module code_registers #(
  parameter int unsigned N = bist_pkg::ADC_BITS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sample_en_i,
  input  logic [N-1:0] code_i,
  output logic [N-1:0] cur_o,
  output logic [N-1:0] prev_o,
  output logic         valid_o
);

  logic [1:0] fill_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cur_o  <= '0;
      prev_o <= '0;
      fill_q <= '0;
    end else if (sample_en_i) begin
      cur_o  <= code_i;
      prev_o <= cur_o;
      fill_q <= {fill_q[0], 1'b1};
    end
  end

  assign valid_o = fill_q[1];

endmodule
