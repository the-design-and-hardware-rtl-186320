// tb_deinterleaver: interleaves numbered frames in the testbench (row in,
// column out of a ROWS x COLS matrix) and checks that the deinterleaver
// restores the original order.  Two instances run side by side: the 6 x 6
// default and a 3 x 5 matrix, where rows and columns cannot be confused.
module tb_deinterleaver;
  localparam int W = 8;
  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;
  int done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
  end

  always @(posedge clk) if (done == 2) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_inst
    localparam int ROWS = (g == 0) ? 6 : 3;
    localparam int COLS = (g == 0) ? 6 : 5;
    localparam int F = ROWS * COLS;
    localparam int FRAMES = 40;
    logic [W-1:0] x = 0, y;
    logic sink_r = 0, sink_s = 0, sink_t = 0;
    logic source_cnt, source_cnt1, source_cnt2, overflow;

    deinterleaver #(.W(W), .ROWS(ROWS), .COLS(COLS)) dut (.*);

    initial begin
      @(negedge reset);
      for (int f = 0; f < FRAMES; f++) begin
        for (int k = 0; k < F; k++) begin
          @(negedge clk);
          // transmit order: output k of the interleaver
          x = W'(f * F + (k % ROWS) * COLS + k / ROWS);
          sink_r = 1; sink_s = (k == 0); sink_t = (k == F - 1);
          if (f >= FRAMES / 2 && ($urandom % 3) == 0) begin
            @(negedge clk); sink_r = 0; sink_s = 0; sink_t = 0;
          end
        end
      end
      @(negedge clk); sink_r = 0; sink_s = 0; sink_t = 0;
    end

    int n = 0;
    always @(posedge clk) begin
      if (!reset && overflow) begin failures++; $display("overflow"); end
      if (!reset && source_cnt) begin
        checks++;
        if (y !== W'(n) || source_cnt1 !== (n % F == 0) || source_cnt2 !== (n % F == F - 1)) begin
          failures++;
          if (failures < 10) $display("inst %0d: y=%0d exp=%0d", g, y, n % 256);
        end
        n++;
        if (n == FRAMES * F) done++;
      end
    end
  end
endmodule
