// qpsk_demod: QPSK hard-decision demapper, one complex symbol in, two serial
// bits out.
//
// The decision is the sign of each axis: a negative in-phase value gives a 1
// for the first bit, a negative quadrature value a 1 for the second bit,
// which inverts the mapping of qpsk_mod.  Only the sign is used, so the
// amplitude and any positive scaling of the received sample do not matter.
// Demodulating QPSK after the FFT is the design's; the decision rule, the
// serial output and the framing are this implementation's choices.
//
// Interface: a symbol on input_x is taken when enable and sink_r are high;
// symbols must be at least two cycles apart.  output_y carries the first bit
// in the cycle after the symbol and the second bit one cycle later, each
// with source_r high; source_s marks the first bit of a frame (symbol with
// sink_s), source_t the last (symbol with sink_t).  reset is synchronous,
// active high.
module qpsk_demod
  import ofdm_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  iq_t  input_x,
  input  logic enable,
  input  logic sink_r,
  input  logic sink_s,
  input  logic sink_t,
  output logic output_y,
  output logic source_r,
  output logic source_s,
  output logic source_t
);

  logic pend, pend_bit, pend_eop;
  logic take;

  assign take = enable && sink_r;

  always_ff @(posedge clk) begin
    if (reset) begin
      pend     <= 1'b0;
      pend_bit <= 1'b0;
      pend_eop <= 1'b0;
      output_y <= 1'b0;
      source_r <= 1'b0;
      source_s <= 1'b0;
      source_t <= 1'b0;
    end else begin
      source_r <= 1'b0;
      source_s <= 1'b0;
      source_t <= 1'b0;
      if (take) begin
        output_y <= input_x.i[IQ_W-1];
        source_r <= 1'b1;
        source_s <= sink_s;
        pend     <= 1'b1;
        pend_bit <= input_x.q[IQ_W-1];
        pend_eop <= sink_t;
      end else if (pend) begin
        output_y <= pend_bit;
        source_r <= 1'b1;
        source_t <= pend_eop;
        pend     <= 1'b0;
      end
    end
  end

  // Symbols closer than two cycles would overwrite the pending second bit.
  a_symbol_spacing: assert property (@(posedge clk) disable iff (reset)
    take |=> !take);

endmodule
