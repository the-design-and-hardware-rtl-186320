// deinterleaver: inverse of the ROWS x COLS block interleaver (receive side).
//
// The interleaver writes a frame row by row into a ROWS x COLS matrix and
// reads it column by column.  Undoing that is the same operation on the
// transposed matrix: write row by row into COLS x ROWS, read column by column.
// This module is therefore the interleaver core with its geometry swapped; the
// design gives the de-interleaver as "the opposite method", the mapping is
// worked out here.  There is no backpressure on the receive side, so the
// output is always taken (one word per cycle at most, one frame of latency).
// Ports and framing are those of the interleaver: sink_r / sink_s / sink_t
// are valid / first / last on the input, source_cnt / source_cnt1 /
// source_cnt2 the same on the output.  reset is synchronous, active high.
module deinterleaver #(
  parameter int unsigned W    = 8,
  parameter int unsigned ROWS = 6,   // rows of the transmit-side matrix
  parameter int unsigned COLS = 6    // columns of the transmit-side matrix
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] x,
  input  logic         sink_r,
  input  logic         sink_s,
  input  logic         sink_t,
  output logic [W-1:0] y,
  output logic         source_cnt,
  output logic         source_cnt1,
  output logic         source_cnt2,
  output logic         overflow
);

  logic sink_ready;

  interleaver #(.W(W), .ROWS(COLS), .COLS(ROWS)) u_core (
    .clk, .reset, .x, .sink_r, .sink_s, .sink_t, .sink_ready,
    .y, .source_cnt, .source_cnt1, .source_cnt2, .source_ready(1'b1)
  );

  // A word that arrives while both banks are still full would be lost.
  assign overflow = sink_r && !sink_ready;

endmodule
