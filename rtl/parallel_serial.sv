// parallel_serial: byte-parallel to bit-serial converter (transmit side).
//
// A W-bit word is loaded into a register and then shifted left, one bit per
// cycle with en high, so the word leaves MSB first on cout.  The shift-left,
// MSB-first behaviour and the 8-bit width follow the design; the valid/ready
// handshake and the frame markers are this implementation's own.
//
// Interface: din is taken when load and ready are both high.  ready is high
// when the register is empty, or when its last bit leaves in this cycle, so
// a continuous stream of words leaves without gaps (one bit per cycle).
// cout is valid while cout_vld is high; cout_sop marks the first bit of a
// word loaded with sop_in, cout_eop the last bit of a word loaded with
// eop_in.  rst is synchronous and active high.
module parallel_serial #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] din,
  input  logic         load,
  input  logic         sop_in,
  input  logic         eop_in,
  output logic         ready,
  output logic         cout,
  output logic         cout_vld,
  output logic         cout_sop,
  output logic         cout_eop
);

  logic [W-1:0]       sh;
  logic [$clog2(W):0] left;   // bits still to send
  logic               w_sop, w_eop;

  assign ready    = (left == '0) || (en && left == 1);
  assign cout     = sh[W-1];
  assign cout_vld = en && (left != '0);
  assign cout_sop = cout_vld && w_sop && (left == ($bits(left))'(W));
  assign cout_eop = cout_vld && w_eop && (left == 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      sh    <= '0;
      left  <= '0;
      w_sop <= 1'b0;
      w_eop <= 1'b0;
    end else if (load && ready) begin
      sh    <= din;
      left  <= ($bits(left))'(W);
      w_sop <= sop_in;
      w_eop <= eop_in;
    end else if (en && left != '0) begin
      sh   <= {sh[W-2:0], 1'b0};
      left <= left - 1'b1;
    end
  end

endmodule
