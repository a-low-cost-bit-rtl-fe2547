// parallel_to_serial: sends the error record off chip on one pin, as a
// repeating frame of 2*B bits: the B-bit header (1011 by default) and then
// the B-bit error record, each most significant bit first, one bit per
// clock cycle.
//
// A frame-phase counter runs from 0 to 2*B-1. Its upper part selects header
// or record (the slowest select of the design's output multiplexer), its
// lower bits select the bit within the field. The header marks where each
// record starts, so the stream can be read on an oscilloscope without any
// other framing signal. The record is copied from the error counter into a
// holding register on the last header bit, so the B record bits of one frame
// always belong to one count; the record shown thus changes at most once
// every 2*B cycles (8 cycles at the default B = 4). The frame format is the
// original one; the phase counter and the holding register are this
// design's way of producing it.
//
// Ports: count_i (the live error count), ser_o (serial output, a function of
// registers only), frame_start_o (high in the first header bit of a frame).
// After reset the first header bit is on ser_o in the first cycle.
module parallel_to_serial #(
  parameter int unsigned        B      = bist_pkg::REC_BITS,
  parameter logic [B-1:0]       HEADER = bist_pkg::HEADER
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [B-1:0] count_i,
  output logic         ser_o,
  output logic         frame_start_o
);

  import bist_pkg::frame_phase_e;
  import bist_pkg::PH_HEADER;
  import bist_pkg::PH_RECORD;

  localparam int unsigned PW = $clog2(2 * B);

  logic [PW-1:0] phase_q;
  logic [B-1:0]  rec_q;
  frame_phase_e  field;
  localparam int unsigned BW = (B > 1) ? $clog2(B) : 1;

  logic [BW-1:0] bit_idx;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase_q <= '0;
      rec_q   <= '0;
    end else begin
      phase_q <= (phase_q == PW'(2 * B - 1)) ? '0 : phase_q + 1'b1;
      if (phase_q == PW'(B - 1)) rec_q <= count_i;
    end
  end

  always_comb begin
    if (phase_q < PW'(B)) begin
      field   = PH_HEADER;
      bit_idx = BW'(B - 1 - int'(phase_q));
    end else begin
      field   = PH_RECORD;
      bit_idx = BW'(2 * B - 1 - int'(phase_q));
    end
    ser_o = (field == PH_HEADER) ? HEADER[bit_idx] : rec_q[bit_idx];
  end

  assign frame_start_o = (phase_q == '0);

endmodule
