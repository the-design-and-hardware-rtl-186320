// tb_rs_decoder: builds reference codewords in the testbench, adds 0 .. T+2
// random byte errors and sends them back to back or with gaps.  For up to T
// errors the output must equal the sent codeword and source_en must be
// high; for more errors source_en high is accepted only if the output is a
// valid codeword (a miscorrection that no decoder can detect).  Codewords
// sent with sink_en low must come out unchanged.  The latency from the last
// input byte to the first output byte (3 cycles) is checked.
module tb_rs_decoder;
  import ofdm_pkg::*;
  import tb_gf_pkg::*;
  localparam int N = 12, K = 8, T = (N - K) / 2, CWS = 600;
  logic clk = 0, reset = 1;
  gf_t x_in = 0, y_out;
  logic sink_r = 0, sink_s = 0, sink_t = 0, sink_en = 1;
  logic source_r, source_s, source_t, source_en;
  int checks = 0, failures = 0;
  int n_corrected = 0, n_detected = 0, n_bypass = 0, n_clean = 0;

  rs_decoder #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { byte unsigned sent[$]; byte unsigned rcvd[$]; int nerr; bit en; int last_cyc; } cw_t;
  cw_t cwq[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    tb_gf_init();
    repeat (3) @(posedge clk);
    reset = 0;
    for (int c = 0; c < CWS; c++) begin
      cw_t w;
      byte unsigned msg[$];
      int pos[$];
      msg = {};
      pos = {};
      for (int i = 0; i < K; i++) msg.push_back(byte'($urandom));
      rs_encode(N, K, msg, w.sent);
      w.rcvd = w.sent;
      w.nerr = (c < 20) ? (c % (T + 1)) : ($urandom % (T + 3));
      while (pos.size() < w.nerr) begin
        int p; bit dup;
        p = $urandom % N; dup = 0;
        foreach (pos[j]) if (pos[j] == p) dup = 1;
        if (!dup) pos.push_back(p);
      end
      foreach (pos[j]) w.rcvd[pos[j]] ^= byte'(($urandom % 255) + 1);
      w.en = ($urandom % 8) != 0;
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        x_in = w.rcvd[i]; sink_r = 1; sink_s = (i == 0); sink_t = (i == N - 1); sink_en = w.en;
        if (i == N - 1) w.last_cyc = cyc;
        if (c >= CWS / 2 && ($urandom % 5) == 0) begin
          @(negedge clk); sink_r = 0; sink_s = 0; sink_t = 0;
        end
      end
      cwq.push_back(w);
    end
    @(negedge clk); sink_r = 0; sink_s = 0; sink_t = 0;
  end

  int k = 0;
  byte unsigned got[$];
  always @(posedge clk) if (!reset && source_r) begin
    cw_t w;
    w = cwq[0];
    if (k == 0) begin
      checks++;
      if (!source_s || cyc != w.last_cyc + 4) begin
        failures++; $display("start: sop=%b latency %0d", source_s, cyc - w.last_cyc - 1);
      end
    end
    got.push_back(y_out);
    k++;
    if (k == N) begin
      checks++;
      if (!source_t) begin failures++; $display("no eop"); end
      if (!w.en) begin
        n_bypass++;
        if (got != w.rcvd) begin failures++; $display("bypass changed data"); end
        if (w.nerr <= T && source_en !== 1'b1) begin failures++; $display("bypass status"); end
      end else if (w.nerr <= T) begin
        if (w.nerr == 0) n_clean++; else n_corrected++;
        if (got != w.sent || source_en !== 1'b1) begin
          failures++;
          if (failures < 10) $display("cw with %0d errors not corrected (ok=%b) got %p sent %p", w.nerr, source_en, got, w.sent);
        end
      end else begin
        if (source_en === 1'b0) n_detected++;
        else if (!rs_is_codeword(N, K, got)) begin
          failures++; $display("claimed success but output is not a codeword");
        end
      end
      void'(cwq.pop_front());
      got = {};
      k = 0;
      if (cwq.size() == 0 && !sink_r) begin
        checks++;
        if (n_corrected == 0 || n_detected == 0 || n_bypass == 0 || n_clean == 0) failures++;
        $display("clean=%0d corrected=%0d detected=%0d bypass=%0d", n_clean, n_corrected, n_detected, n_bypass);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
