// tb_ofdm_link: the receive chain fed by a real FFT.
//
// The transmit chain of ofdm_system produces QPSK symbols; the testbench
// places each group of 48 on the subcarriers of a 64-point OFDM symbol
// (carriers 1..24 and 40..63, DC and the band edges empty), takes the
// inverse DFT, adds Gaussian noise to the time samples, takes the forward
// DFT, rounds each used carrier to the 16-bit I/Q format and gives it to the
// receive chain.  One 36-byte frame (144 symbols) fills exactly three OFDM
// symbols.  The FFT size and the carrier plan are the testbench's choice;
// the IFFT/FFT are behavioural (real arithmetic), standing in for the FFT
// core that is not part of the RTL.
//
// The testbench makes its own hard decisions on the FFT output to know how
// many bytes of each codeword arrive wrong.  Codewords with at most T wrong
// bytes must come out exactly right with rx_ok high; codewords with more must
// be flagged or decode into a valid codeword.  The noise level gives symbol
// errors in a fraction of the frames, and the test fails unless some
// codewords needed correction.
module tb_ofdm_link;
  import ofdm_pkg::*;
  import tb_gf_pkg::*;
  localparam int N = 12, K = 8, T = 2, ROWS = 6, COLS = 6, F = ROWS * COLS;
  localparam int CPF = F / N, SPF = F * 4;
  localparam int NFFT = 64, NUSED = 48;
  localparam int FRAMES = 40;
  localparam real PI = 3.14159265358979;
  localparam real NOISE = 0.33;   // noise std. dev. per time sample, re/im, relative to 1.0 carrier amplitude

  logic clk = 0, reset = 1;
  logic [7:0] tx_data = 0;
  logic tx_valid = 0, tx_sop = 0, tx_ready;
  iq_t  tx_sym, rx_sym = '0;
  logic tx_sym_valid, tx_sym_sop, tx_sym_eop;
  logic rx_sym_valid = 0, rx_sym_sop = 0, rx_sym_eop = 0;
  logic rx_correct_en = 1;
  logic [7:0] rx_data;
  logic rx_valid, rx_sop, rx_eop, rx_ok, rx_overflow;
  int checks = 0, failures = 0;

  ofdm_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned ref_cw [FRAMES][F];
  byte unsigned err_cw [FRAMES][F];

  initial begin
    tb_gf_init();
    for (int f = 0; f < FRAMES; f++)
      for (int c = 0; c < CPF; c++) begin
        byte unsigned msg[$], cw[$];
        msg = {};
        for (int i = 0; i < K; i++) msg.push_back(byte'($urandom));
        rs_encode(N, K, msg, cw);
        for (int i = 0; i < N; i++) begin
          ref_cw[f][c*N + i] = cw[i];
          err_cw[f][c*N + i] = 0;
        end
      end
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    for (int f = 0; f < FRAMES; f++)
      for (int c = 0; c < CPF; c++)
        for (int i = 0; i < K; i++) begin
          @(negedge clk);
          tx_data = ref_cw[f][c*N + i]; tx_valid = 1; tx_sop = (i == 0);
          while (!tx_ready) @(negedge clk);
          @(posedge clk);
          #1 tx_valid = 0; tx_sop = 0;
        end
  end

  // ------------------------------------------------ OFDM channel model
  function automatic int carrier(int u);   // used carrier u -> FFT bin
    return (u < NUSED / 2) ? u + 1 : u - NUSED / 2 + NFFT - NUSED / 2;
  endfunction

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  // one OFDM symbol: carriers in (+-1 per axis), carriers out (scaled)
  task automatic ofdm_channel(input real xi[NUSED], input real xq[NUSED],
                              output real yi[NUSED], output real yq[NUSED]);
    real ti[NFFT], tq[NFFT], fi[NFFT], fq[NFFT];
    for (int k = 0; k < NFFT; k++) begin fi[k] = 0.0; fq[k] = 0.0; end
    for (int u = 0; u < NUSED; u++) begin fi[carrier(u)] = xi[u]; fq[carrier(u)] = xq[u]; end
    // inverse DFT, unitary scaling
    for (int n = 0; n < NFFT; n++) begin
      ti[n] = 0.0; tq[n] = 0.0;
      for (int k = 0; k < NFFT; k++) begin
        real a;
        a = 2.0 * PI * k * n / NFFT;
        ti[n] += fi[k] * $cos(a) - fq[k] * $sin(a);
        tq[n] += fi[k] * $sin(a) + fq[k] * $cos(a);
      end
      ti[n] = ti[n] / $sqrt(NFFT) + NOISE * gauss();
      tq[n] = tq[n] / $sqrt(NFFT) + NOISE * gauss();
    end
    // forward DFT
    for (int u = 0; u < NUSED; u++) begin
      int k;
      k = carrier(u);
      yi[u] = 0.0; yq[u] = 0.0;
      for (int n = 0; n < NFFT; n++) begin
        real a;
        a = -2.0 * PI * k * n / NFFT;
        yi[u] += ti[n] * $cos(a) - tq[n] * $sin(a);
        yq[u] += ti[n] * $sin(a) + tq[n] * $cos(a);
      end
      yi[u] = yi[u] / $sqrt(NFFT);
      yq[u] = yq[u] / $sqrt(NFFT);
    end
  endtask

  function automatic logic signed [IQ_W-1:0] quant(real v);
    real s;
    s = v * 8192.0;
    if (s > 32767.0) s = 32767.0;
    if (s < -32768.0) s = -32768.0;
    return IQ_W'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5));
  endfunction

  // collect transmitted symbols, check them, run the channel, queue results
  real  ci[NUSED], cq[NUSED];
  iq_t  rxq[$];
  int   tx_f = 0, tx_s = 0, nsym_err = 0;
  always @(posedge clk) if (!reset && tx_sym_valid && tx_f < FRAMES) begin
    int k, sh;
    byte unsigned b;
    k  = tx_s / 4;
    sh = 7 - 2 * (tx_s % 4);
    b  = ref_cw[tx_f][(k % ROWS) * COLS + k / ROWS];
    checks++;
    if (tx_sym.i !== (b[sh] ? -QPSK_AMP : QPSK_AMP) || tx_sym.q !== (b[sh-1] ? -QPSK_AMP : QPSK_AMP)) begin
      failures++; $display("tx symbol wrong, frame %0d symbol %0d", tx_f, tx_s);
    end
    ci[tx_s % NUSED] = real'(tx_sym.i) / 8192.0;
    cq[tx_s % NUSED] = real'(tx_sym.q) / 8192.0;
    if (tx_s % NUSED == NUSED - 1) begin
      real yi[NUSED], yq[NUSED];
      ofdm_channel(ci, cq, yi, yq);
      for (int u = 0; u < NUSED; u++) begin
        iq_t v;
        int s, kk, ss;
        bit ei, eq;
        v.i = quant(yi[u]);
        v.q = quant(yq[u]);
        rxq.push_back(v);
        // the testbench's own decision
        s  = tx_s - (NUSED - 1) + u;
        kk = s / 4;
        ss = 7 - 2 * (s % 4);
        ei = (v.i < 0) != (ci[u] < 0.0);
        eq = (v.q < 0) != (cq[u] < 0.0);
        if (ei || eq) nsym_err++;
        err_cw[tx_f][(kk % ROWS) * COLS + kk / ROWS] ^= byte'((int'(ei) << ss) | (int'(eq) << (ss - 1)));
      end
    end
    tx_s++;
    if (tx_s == SPF) begin tx_s = 0; tx_f++; end
  end

  // receive-side feeder: one symbol every 2 cycles, frame start marked
  int fed = 0;
  always @(posedge clk) begin
    rx_sym_valid <= 1'b0;
    rx_sym_sop   <= 1'b0;
    rx_sym_eop   <= 1'b0;
    if (!reset && !rx_sym_valid && rxq.size() != 0) begin
      rx_sym       <= rxq.pop_front();
      rx_sym_valid <= 1'b1;
      rx_sym_sop   <= (fed % SPF == 0);
      rx_sym_eop   <= (fed % SPF == SPF - 1);
      fed++;
    end
  end

  // ------------------------------------------------------ rx check
  int rx_cw = 0, rx_k = 0, n_corrected = 0, n_clean = 0, n_flagged = 0;
  byte unsigned got[$];
  always @(posedge clk) if (!reset && rx_valid) begin
    got.push_back(rx_data);
    rx_k++;
    if (rx_k == N) begin
      int f, c, nerr;
      byte unsigned sent[$];
      f = rx_cw / CPF;
      c = rx_cw % CPF;
      nerr = 0;
      sent = {};
      for (int i = 0; i < N; i++) begin
        sent.push_back(ref_cw[f][c*N + i]);
        if (err_cw[f][c*N + i] != 0) nerr++;
      end
      checks++;
      if (nerr <= T) begin
        if (nerr == 0) n_clean++; else n_corrected++;
        if (got != sent || !rx_ok) begin
          failures++; $display("frame %0d cw %0d: %0d errors not corrected", f, c, nerr);
        end
      end else if (!rx_ok) n_flagged++;
      else if (!rs_is_codeword(N, K, got)) begin
        failures++; $display("frame %0d cw %0d: bad output marked good", f, c);
      end
      got = {};
      rx_k = 0;
      rx_cw++;
      if (rx_cw == FRAMES * CPF) begin
        $display("symbol errors=%0d of %0d; codewords clean=%0d corrected=%0d flagged=%0d",
                 nsym_err, FRAMES * SPF, n_clean, n_corrected, n_flagged);
        checks++;
        if (n_corrected == 0) begin failures++; $display("no codeword needed correction"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
