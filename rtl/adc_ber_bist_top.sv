// adc_ber_bist_top: the Gray-code bit-error-rate BIST together with the
// digital back end of the 5-bit flash ADC it was built to test.
//
// The comparator outputs of the flash ADC (therm_i, a thermometer code; the
// resistor ladder and the comparators are analog and stay outside) are
// encoded to Gray code in flash_encoder and fed to the BIST. For a
// binary-coded ADC, such as a pipelined or SAR converter, the BIST can
// instead take a binary code on bin_i, converted to Gray code by
// binary_to_gray; use_bin_i selects that source. The selection input is this
// design's own way of showing both front ends in one top.
//
// Off chip the BIST needs only its reset pin (rst) and the serial output
// ser_o. The other outputs (evaluation pulse, error record, overflow flag,
// frame start, encoded ADC code) are brought out for observation.
//
// Reset: rst clears everything at once, but the BIST leaves reset one clock
// after the flash encoder, so that the first code it samples is a real
// conversion and not the encoder's reset value (a choice of this design).
//
// Timing: either source adds one clock (the encoder's output register, or a
// register after the binary-to-Gray converter) before the BIST; see ber_bist
// for the rest.
module adc_ber_bist_top #(
  parameter int unsigned  N            = bist_pkg::ADC_BITS,
  parameter int unsigned  B            = bist_pkg::REC_BITS,
  parameter logic [B-1:0] HEADER       = bist_pkg::HEADER,
  parameter int unsigned  MAX_LOG2_DIV = bist_pkg::MAX_LOG2_DIV,
  parameter int unsigned  SEL_BITS     = bist_pkg::DIV_SEL_BITS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SEL_BITS-1:0] div_sel_i,
  input  logic [2**N-2:0]     therm_i,
  input  logic [N-1:0]        bin_i,
  input  logic                use_bin_i,
  output logic [N-1:0]        adc_gray_o,
  output logic                ser_o,
  output logic                err_o,
  output logic [B-1:0]        count_o,
  output logic                end_o,
  output logic                frame_start_o
);

  logic [N-1:0] flash_gray;
  logic [N-1:0] bin_gray;
  logic [N-1:0] bin_gray_q;
  logic         bist_rst_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) bist_rst_q <= 1'b1;
    else     bist_rst_q <= 1'b0;
  end

  flash_encoder #(.N(N)) u_enc (
    .clk, .rst, .therm_i, .gray_o(flash_gray)
  );

  binary_to_gray #(.N(N)) u_b2g (
    .bin_i, .gray_o(bin_gray)
  );

  // The converted binary code is registered like the flash encoder output,
  // so both sources reach the BIST with the same one-clock latency.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) bin_gray_q <= '0;
    else     bin_gray_q <= bin_gray;
  end

  assign adc_gray_o = use_bin_i ? bin_gray_q : flash_gray;

  ber_bist #(
    .N(N), .B(B), .HEADER(HEADER),
    .MAX_LOG2_DIV(MAX_LOG2_DIV), .SEL_BITS(SEL_BITS)
  ) u_bist (
    .clk, .rst(bist_rst_q), .div_sel_i, .code_i(adc_gray_o),
    .ser_o, .err_o, .count_o, .end_o, .frame_start_o
  );

endmodule
