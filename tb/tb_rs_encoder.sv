// tb_rs_encoder: encodes random messages with random input gaps and random
// output backpressure and compares every output byte with a reference
// codeword computed in the testbench by polynomial long division.  Also
// checks the codeword markers and that a sink_s mid-codeword restarts it.
module tb_rs_encoder;
  import ofdm_pkg::*;
  import tb_gf_pkg::*;
  localparam int N = 12, K = 8, CWS = 300;
  logic clk = 0, reset = 1;
  gf_t x_in = 0, y_out;
  logic sink_r = 0, sink_s = 0, sink_ready;
  logic source_r, source_s, source_t, source_ready = 1;
  int checks = 0, failures = 0;

  rs_encoder #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned expq[$];

  task automatic send(input byte unsigned v, input bit s);
    @(negedge clk);
    x_in = v; sink_r = 1; sink_s = s;
    while (!sink_ready) @(negedge clk);
    @(posedge clk);
    #1 sink_r = 0; sink_s = 0;
  endtask

  initial begin
    tb_gf_init();
    repeat (3) @(posedge clk);
    reset = 0;
    // three bytes of an abandoned codeword, then a proper start
    for (int i = 0; i < 3; i++) send(8'h55, i == 0);
    for (int c = 0; c < CWS; c++) begin
      byte unsigned msg[$], cw[$];
      msg = {};
      for (int i = 0; i < K; i++) msg.push_back(byte'($urandom));
      rs_encode(N, K, msg, cw);
      foreach (cw[i]) expq.push_back(cw[i]);
      for (int i = 0; i < K; i++) begin
        send(msg[i], i == 0);
        if (($urandom % 4) == 0) repeat ($urandom % 4) @(posedge clk);
      end
    end
  end

  always @(posedge clk) source_ready <= ($urandom % 4) != 0;

  int n = 0, skip = 3;
  always @(posedge clk) if (!reset && source_r && source_ready) begin
    if (skip > 0) skip--;   // the abandoned bytes
    else begin
      byte unsigned e;
      e = expq.pop_front();
      checks++;
      if (y_out !== e || source_s !== (n % N == 0) || source_t !== (n % N == N - 1)) begin
        failures++;
        if (failures < 10) $display("byte %0d: got %h exp %h", n, y_out, e);
      end
      n++;
      if (n == CWS * N) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
