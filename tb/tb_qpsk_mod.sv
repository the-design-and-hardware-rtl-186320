// tb_qpsk_mod: feeds random bits with random enable/valid gaps and frame
// markers and checks each output symbol against the mapping worked out in
// the testbench: first bit of a pair -> I, second -> Q, 0 -> +8192,
// 1 -> -8192.  A sink_s in the middle of a pair must restart the pairing.
module tb_qpsk_mod;
  import ofdm_pkg::*;
  logic clk = 0, reset = 1;
  logic input_x = 0, enable = 0, sink_r = 0, sink_s = 0, sink_t = 0;
  iq_t output_y;
  logic source_r, source_s, source_t;
  int checks = 0, failures = 0;

  qpsk_mod dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected symbols {sop, eop, i, q}
  logic [2*IQ_W+1:0] expq[$];
  int half = 0;
  bit b0, s0;

  function automatic logic signed [IQ_W-1:0] ax(input bit b);
    return b ? -16'sd8192 : 16'sd8192;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      input_x = 1'($urandom);
      enable  = ($urandom % 8) != 0;
      sink_r  = ($urandom % 4) != 0;
      sink_s  = ($urandom % 50) == 0;
      sink_t  = ($urandom % 7) == 0;
      if (enable && sink_r) begin
        if (half == 0 || sink_s) begin b0 = input_x; s0 = sink_s; half = 1; end
        else begin expq.push_back({s0, sink_t, ax(b0), ax(input_x)}); half = 0; end
      end
    end
    @(negedge clk); sink_r = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d symbols missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset && source_r) begin
    logic [2*IQ_W+1:0] e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected symbol"); end
    else begin
      e = expq.pop_front();
      if ({source_s, source_t, output_y.i, output_y.q} !== e) begin
        failures++;
        if (failures < 10) $display("got %h exp %h", {source_s, source_t, output_y.i, output_y.q}, e);
      end
    end
  end
endmodule
