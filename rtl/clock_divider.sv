// clock_divider: programmable divider that sets the rate at which the BIST
// samples the ADC output.
//
// The BIST may look at every ADC sample or only at every d-th one, with
// d = 2**div_sel (1, 2, 4, 8 or 16 at the default MAX_LOG2_DIV = 4). Taking
// every d-th sample lowers the effective sampling rate to fs/d, which lets
// the BER test use input frequencies near m*fs/d.
//
// Instead of a divided clock, this design produces a one-cycle enable pulse
// (sample_en_o) at the divided rate; every register of the BIST stays on the
// ADC clock and uses this enable. A free-running counter of MAX_LOG2_DIV bits
// is compared, in its low div_sel bits, with zero. After reset the first
// pulse comes in the first cycle, then one every d cycles. A div_sel above
// MAX_LOG2_DIV is treated as MAX_LOG2_DIV.
module clock_divider #(
  parameter int unsigned MAX_LOG2_DIV = bist_pkg::MAX_LOG2_DIV,
  parameter int unsigned SEL_BITS     = bist_pkg::DIV_SEL_BITS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SEL_BITS-1:0] div_sel_i,
  output logic                sample_en_o
);

  localparam int unsigned CW = (MAX_LOG2_DIV > 0) ? MAX_LOG2_DIV : 1;

  logic [CW-1:0] cnt_q;
  logic [CW-1:0] mask;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) cnt_q <= '0;
    else     cnt_q <= cnt_q + 1'b1;
  end

  // Mask of the counter bits that must be zero: the low div_sel bits.
  always_comb begin
    mask = '0;
    for (int k = 0; k < int'(CW); k++) begin
      if (k < int'(div_sel_i) && k < int'(MAX_LOG2_DIV)) mask[k] = 1'b1;
    end
  end

  assign sample_en_o = ((cnt_q & mask) == '0);

endmodule
