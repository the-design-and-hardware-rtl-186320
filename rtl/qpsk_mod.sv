// qpsk_mod: QPSK mapper, serial bits in, one complex symbol per two bits out.
//
// Bits arrive one per cycle on input_x.  The first bit of each pair selects
// the sign of the in-phase component and the second the sign of the
// quadrature component (0 -> +QPSK_AMP, 1 -> -QPSK_AMP), which is a Gray
// mapping: neighbouring constellation points differ in one bit.  The port
// names clk, reset, input_x, enable, sink_r/s/t, output_y and source_r/s/t
// follow the design's QPSK symbol; the bit-to-point mapping, amplitude and
// framing are this implementation's choices.
//
// Interface: a bit is taken when enable and sink_r are high.  sink_s marks
// the first bit of a frame (restarts the pairing), sink_t the last.
// output_y is registered: source_r pulses in the cycle after the second bit
// of a pair, with source_s / source_t marking the first / last symbol of a
// frame.  reset is synchronous and active high.
module qpsk_mod
  import ofdm_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic input_x,
  input  logic enable,
  input  logic sink_r,
  input  logic sink_s,
  input  logic sink_t,
  output iq_t  output_y,
  output logic source_r,
  output logic source_s,
  output logic source_t
);

  logic half;       // first bit of the pair is held
  logic b0, sop0;
  logic take;

  assign take = enable && sink_r;

  function automatic logic signed [IQ_W-1:0] axis(input logic b);
    return b ? -QPSK_AMP : QPSK_AMP;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      half     <= 1'b0;
      b0       <= 1'b0;
      sop0     <= 1'b0;
      output_y <= '0;
      source_r <= 1'b0;
      source_s <= 1'b0;
      source_t <= 1'b0;
    end else begin
      source_r <= 1'b0;
      source_s <= 1'b0;
      source_t <= 1'b0;
      if (take) begin
        if (!half || sink_s) begin
          b0   <= input_x;
          sop0 <= sink_s;
          half <= 1'b1;
        end else begin
          output_y.i <= axis(b0);
          output_y.q <= axis(input_x);
          source_r   <= 1'b1;
          source_s   <= sop0;
          source_t   <= sink_t;
          half       <= 1'b0;
        end
      end
    end
  end

endmodule
