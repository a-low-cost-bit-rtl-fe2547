// bist_pkg: constants shared by the Gray-code BER BIST and the flash-ADC
// back end.
//
// The numbers are those of the silicon prototype the design follows: a 5-bit
// flash ADC, a serial frame made of a 4-bit header "1011" followed by a 4-bit
// error record, and clock division ratios up to 16 (the prototype was measured
// with the result captured at fs/8 and fs/16). The width of the division
// select is this design's own choice.
package bist_pkg;

  // ADC resolution N (bits of the Gray code).
  localparam int unsigned ADC_BITS     = 5;
  // Width B of the header and of the error record in the serial frame.
  localparam int unsigned REC_BITS     = 4;
  // Header sent ahead of every error record, first bit first.
  localparam logic [REC_BITS-1:0] HEADER = 4'b1011;
  // Largest division ratio is 2**MAX_LOG2_DIV (fs/16).
  localparam int unsigned MAX_LOG2_DIV = 4;
  // Width of the division select: ratio = 2**div_sel.
  localparam int unsigned DIV_SEL_BITS = 3;

  // Phase of the serial frame: header bits first, then the record.
  typedef enum logic {
    PH_HEADER = 1'b0,
    PH_RECORD = 1'b1
  } frame_phase_e;

endpackage
