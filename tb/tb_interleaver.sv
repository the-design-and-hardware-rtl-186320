// tb_interleaver: sends numbered frames (words 1..36, 37..72, ...) with random
// input gaps and random output backpressure, and checks that every frame
// leaves column by column: output k of a frame is input (k % ROWS) * COLS +
// k / ROWS.  Frame markers, full-rate streaming (one word per cycle with no
// gaps once the first frame is stored) and a sink_s realignment are checked.
module tb_interleaver;
  localparam int W = 8, ROWS = 6, COLS = 6, F = ROWS * COLS;
  localparam int FRAMES = 60;
  logic clk = 0, reset = 1;
  logic [W-1:0] x = 0, y;
  logic sink_r = 0, sink_s = 0, sink_t = 0, sink_ready;
  logic source_cnt, source_cnt1, source_cnt2, source_ready = 1;
  int checks = 0, failures = 0;

  interleaver #(.W(W), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] inq[$];
  bit gaps = 1;

  task automatic send(input logic [W-1:0] v, input bit s, input bit t);
    @(negedge clk);
    x = v; sink_r = 1; sink_s = s; sink_t = t;
    while (!sink_ready) @(negedge clk);
    @(posedge clk);
    #1 sink_r = 0; sink_s = 0; sink_t = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    // a broken partial frame first, then a realigning sink_s
    for (int i = 0; i < 5; i++) send(8'hEE, 0, 0);
    for (int f = 0; f < FRAMES; f++) begin
      if (f == FRAMES / 2) gaps = 0;
      for (int i = 0; i < F; i++) begin
        logic [W-1:0] v;
        v = W'(f * F + i + 1);
        inq.push_back(v);
        send(v, i == 0, i == F - 1);
        if (gaps && ($urandom % 4) == 0) repeat ($urandom % 5) @(posedge clk);
      end
    end
  end

  always @(posedge clk) source_ready <= gaps ? (($urandom % 3) != 0) : 1'b1;

  int k = 0, nout = 0, frame = 0, streak = 0, best_streak = 0;
  always @(posedge clk) begin
    if (!reset && source_cnt && source_ready) begin
      logic [W-1:0] e;
      e = inq[frame * F + (k % ROWS) * COLS + k / ROWS];
      checks++;
      if (y !== e || source_cnt1 !== (k == 0) || source_cnt2 !== (k == F - 1)) begin
        failures++;
        if (failures < 10) $display("frame %0d k %0d: y=%0d exp=%0d sop=%b eop=%b", frame, k, y, e, source_cnt1, source_cnt2);
      end
      streak++;
      if (streak > best_streak) best_streak = streak;
      k++;
      if (k == F) begin k = 0; frame++; end
      if (frame == FRAMES) begin
        checks++;
        // the second half streams without gaps: whole frames back to back
        if (best_streak < 5 * F) begin failures++; $display("longest run %0d", best_streak); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end else if (!reset) streak = 0;
  end
endmodule
