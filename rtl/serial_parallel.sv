// serial_parallel: bit-serial to byte-parallel converter (receive side).
//
// Every cycle with en high the word register shifts left by one place: the
// new bit cin enters as the least significant bit and the most significant
// bit is dropped, so cout always shows the last W received bits with the
// oldest one in the MSB.  This behaviour and the port names clk, en, rst,
// cin and cout are the design's; the width defaults to its 8 bits.
//
// Added by this implementation: a bit counter that raises cout_vld for one
// cycle when a complete word has been shifted in (cout then holds it, first
// bit in the MSB), and framing.  sop_in marks the first bit of a frame; it
// restarts the bit count, and cout_sop flags the word that began with it.
// rst is a synchronous, active-high reset.  Latency: cout_vld rises in the
// cycle after the W-th bit was presented.
module serial_parallel #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         cin,
  input  logic         sop_in,
  output logic [W-1:0] cout,
  output logic         cout_vld,
  output logic         cout_sop
);

  logic [$clog2(W)-1:0] cnt;
  logic                 word_sop;
  logic [$clog2(W)-1:0] pos;

  assign pos = sop_in ? '0 : cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cout     <= '0;
      cnt      <= '0;
      word_sop <= 1'b0;
      cout_vld <= 1'b0;
      cout_sop <= 1'b0;
    end else begin
      cout_vld <= 1'b0;
      cout_sop <= 1'b0;
      if (en) begin
        cout <= {cout[W-2:0], cin};
        if (pos == '0) word_sop <= sop_in;
        if (pos == $bits(pos)'(W - 1)) begin
          cnt      <= '0;
          cout_vld <= 1'b1;
          cout_sop <= (pos == '0) ? sop_in : word_sop;
        end else begin
          cnt <= pos + 1'b1;
        end
      end
    end
  end

endmodule
