// interleaver: block interleaver with a ROWS x COLS matrix of W-bit words.
//
// Words are written into the matrix row by row and read out column by column,
// so that two words that were neighbours on the way in leave ROWS places
// apart, which spreads a burst of channel errors over many rows.  The
// row-in/column-out rule, the 6 x 6 matrix (36 words) and the 8-bit word
// follow the design, as do the port names clk, reset, x, y, sink_r, sink_s,
// sink_t, source_cnt, source_cnt1 and source_cnt2.
//
// Implementation choices: the matrix is double buffered (two banks of
// ROWS*COLS words), so one frame is written while the previous one is read
// and a continuous stream is carried with one frame of latency.  sink_r
// qualifies x, sink_s marks the first word of a frame and restarts the write
// address, sink_t marks the last one (checked only).  sink_ready is low while
// both banks hold unread frames.  On the output, source_cnt is the valid
// flag, source_cnt1 the first and source_cnt2 the last word of a frame;
// source_ready is the downstream ready (tie high if unused).  reset is
// synchronous and active high.
module interleaver #(
  parameter int unsigned W    = 8,
  parameter int unsigned ROWS = 6,
  parameter int unsigned COLS = 6
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] x,
  input  logic         sink_r,
  input  logic         sink_s,
  input  logic         sink_t,
  output logic         sink_ready,
  output logic [W-1:0] y,
  output logic         source_cnt,
  output logic         source_cnt1,
  output logic         source_cnt2,
  input  logic         source_ready
);

  localparam int unsigned F  = ROWS * COLS;
  localparam int unsigned AW = $clog2(F);

  logic [W-1:0]          mem [2][F];
  logic [1:0]            full;
  logic                  wbank, rbank;
  logic [AW-1:0]         wcnt, waddr;
  logic [$clog2(ROWS)-1:0] rrow;
  logic [$clog2(COLS)-1:0] rcol;
  logic [AW-1:0]         raddr;
  logic                  wr, rd, out_free;

  assign sink_ready = !full[wbank];
  assign wr         = sink_r && sink_ready;
  assign waddr      = sink_s ? '0 : wcnt;

  assign out_free   = !source_cnt || source_ready;
  assign rd         = full[rbank] && out_free;
  assign raddr      = AW'(rrow * COLS + rcol);

  always_ff @(posedge clk) begin
    if (wr) mem[wbank][waddr] <= x;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      full        <= '0;
      wbank       <= 1'b0;
      rbank       <= 1'b0;
      wcnt        <= '0;
      rrow        <= '0;
      rcol        <= '0;
      y           <= '0;
      source_cnt  <= 1'b0;
      source_cnt1 <= 1'b0;
      source_cnt2 <= 1'b0;
    end else begin
      // write side
      if (wr) begin
        if (waddr == AW'(F - 1)) begin
          full[wbank] <= 1'b1;
          wbank       <= !wbank;
          wcnt        <= '0;
        end else begin
          wcnt <= waddr + 1'b1;
        end
      end
      // read side
      if (rd) begin
        y           <= mem[rbank][raddr];
        source_cnt  <= 1'b1;
        source_cnt1 <= (rrow == '0) && (rcol == '0);
        source_cnt2 <= (rrow == ($bits(rrow))'(ROWS - 1)) && (rcol == ($bits(rcol))'(COLS - 1));
        if (rrow == ($bits(rrow))'(ROWS - 1)) begin
          rrow <= '0;
          if (rcol == ($bits(rcol))'(COLS - 1)) begin
            rcol        <= '0;
            full[rbank] <= 1'b0;
            rbank       <= !rbank;
          end else begin
            rcol <= rcol + 1'b1;
          end
        end else begin
          rrow <= rrow + 1'b1;
        end
      end else if (source_ready) begin
        source_cnt  <= 1'b0;
        source_cnt1 <= 1'b0;
        source_cnt2 <= 1'b0;
      end
    end
  end

  // The frame end marker, when given, must fall on the last matrix position.
  a_eop_position: assert property (@(posedge clk) disable iff (reset)
    (wr && sink_t) |-> (waddr == AW'(F - 1)));

endmodule
