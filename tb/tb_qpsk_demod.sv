// tb_qpsk_demod: sends noisy QPSK symbols (random amplitude and sign on each
// axis, values near zero included) at random spacings of two or more cycles
// and checks the two output bits of each: 1 where the axis is negative, I
// first then Q, with the frame flags on the right bits and the first bit one
// cycle after the symbol.
module tb_qpsk_demod;
  import ofdm_pkg::*;
  logic clk = 0, reset = 1;
  iq_t input_x = '0;
  logic enable = 1, sink_r = 0, sink_s = 0, sink_t = 0;
  logic output_y, source_r, source_s, source_t;
  int checks = 0, failures = 0;

  qpsk_demod dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected bits {sop, eop, bit, cycle}
  typedef struct { bit s; bit t; bit b; int cyc; } eb_t;
  eb_t expq[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    for (int n = 0; n < 3000; n++) begin
      eb_t e0, e1;
      @(negedge clk);
      input_x.i = IQ_W'($signed($urandom % 20001) - 10000);
      input_x.q = IQ_W'($signed($urandom % 20001) - 10000);
      sink_r = 1; sink_s = ($urandom % 9) == 0; sink_t = ($urandom % 9) == 0;
      e0 = '{sink_s, 1'b0, input_x.i < 0, cyc + 1};
      e1 = '{1'b0, sink_t, input_x.q < 0, cyc + 2};
      expq.push_back(e0);
      expq.push_back(e1);
      @(negedge clk); sink_r = 0; sink_s = 0; sink_t = 0;
      // a disabled input must be ignored
      enable = 0; sink_r = 1'($urandom % 2);
      @(negedge clk); enable = 1; sink_r = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d bits missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset && source_r) begin
    eb_t e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected bit"); end
    else begin
      e = expq.pop_front();
      if (output_y !== e.b || source_s !== e.s || source_t !== e.t || cyc != e.cyc + 1) begin
        failures++;
        if (failures < 10) $display("bit %b exp %b cyc %0d exp %0d", output_y, e.b, cyc, e.cyc + 1);
      end
    end
  end
endmodule
