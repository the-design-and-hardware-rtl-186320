// tb_ofdm_system: end-to-end test of the transmit and receive chains at the
// default sizes (RS(12,8), 6 x 6 interleaver).
//
// Messages go into the transmit chain; every transmitted QPSK symbol is
// compared with one predicted by the testbench's own encoder, interleaver
// and mapper.  The symbols are then looped back to the receive chain through
// a channel model in place of the IFFT/FFT pair: each symbol gets additive
// noise that keeps its quadrant, and in chosen frames a burst of symbols is
// corrupted (one or both axes inverted).  Frame modes, one per frame in turn:
//   0 noise only
//   1 burst of 1..21 symbols (at most 6 bytes: corrected thanks to the
//     interleaver, which puts at most 2 bytes into each codeword)
//   2 burst of 21 symbols
//   3 burst of 64 symbols: too many errors, must be flagged (rx_ok low) or
//     decoded into a valid codeword
//   4 burst of 1..21 symbols with correction switched off: the errors must
//     come out unchanged
// Before the first frame the receiver gets stray symbols with no frame
// start, as if switched on mid-stream; the first frame start must realign
// it.  Each received codeword is compared with the reference.  The test also
// counts stray symbols, transmit backpressure, corrected codewords, flagged codewords,
// bypassed codewords and bursts longer than T bytes that were corrected, and
// fails if any of them never happened.
module tb_ofdm_system;
  import ofdm_pkg::*;
  import tb_gf_pkg::*;
  localparam int N = 12, K = 8, T = 2, ROWS = 6, COLS = 6, F = ROWS * COLS;
  localparam int CPF = F / N;          // codewords per frame
  localparam int SPF = F * 4;          // symbols per frame
  localparam int FRAMES = 60;
  localparam logic signed [IQ_W-1:0] AMP = 16'sd8192;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference data, codeword order: frame f, byte r*COLS + c
  byte unsigned ref_cw [FRAMES][F];
  byte unsigned err_cw [FRAMES][F];
  int           mode   [FRAMES];
  int           burst_len[FRAMES], burst_at[FRAMES];

  initial begin
    tb_gf_init();
    for (int f = 0; f < FRAMES; f++) begin
      mode[f] = f % 5;
      burst_len[f] = (mode[f] == 2) ? 21 : (mode[f] == 3) ? 64 : 1 + ($urandom % 21);
      if (mode[f] == 0) burst_len[f] = 0;
      burst_at[f] = $urandom % (SPF - burst_len[f] + 1);
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
  end

  // transmit byte k of a frame (column-wise read of the matrix)
  function automatic byte unsigned tx_byte(int f, int k);
    return ref_cw[f][(k % ROWS) * COLS + k / ROWS];
  endfunction

  // ---------------------------------------------------------- tx driver
  int n_backpressure = 0;
  always @(posedge clk) if (!reset && tx_valid && !tx_ready) n_backpressure++;

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
          if (f % 3 == 1 && ($urandom % 4) == 0) repeat ($urandom % 30) @(posedge clk);
        end
  end

  // ------------------------------------------- tx check and channel model
  int tx_f = 0, tx_s = 0;
  function automatic logic signed [IQ_W-1:0] noisy(input logic signed [IQ_W-1:0] v, input bit flip);
    logic signed [IQ_W-1:0] n;
    n = IQ_W'($signed($urandom % 16000) - 7999);     // |noise| < AMP
    return flip ? -(v + n) : (v + n);
  endfunction

  // before the first frame, the receiver sees stray symbols with no frame
  // start (a receiver switched on mid-stream); they must be discarded
  int n_stray = 0;
  always @(posedge clk) begin
    rx_sym_valid <= 1'b0;
    rx_sym_sop   <= 1'b0;
    rx_sym_eop   <= 1'b0;
    if (!reset && tx_f == 0 && tx_s == 0 && !tx_sym_valid && n_stray < 37 && !rx_sym_valid) begin
      rx_sym.i     <= IQ_W'($signed($urandom % 20000) - 10000);
      rx_sym.q     <= IQ_W'($signed($urandom % 20000) - 10000);
      rx_sym_valid <= 1'b1;
      n_stray++;
    end
    if (!reset && tx_sym_valid && tx_f < FRAMES) begin
      byte unsigned b;
      bit bi, bq, fi, fq;
      int k, sh;
      k  = tx_s / 4;
      sh = 7 - 2 * (tx_s % 4);
      b  = tx_byte(tx_f, k);
      bi = b[sh];
      bq = b[sh-1];
      checks++;
      if (tx_sym.i !== (bi ? -AMP : AMP) || tx_sym.q !== (bq ? -AMP : AMP) ||
          tx_sym_sop !== (tx_s == 0) || tx_sym_eop !== (tx_s == SPF - 1)) begin
        failures++;
        if (failures < 10) $display("tx frame %0d symbol %0d: got %0d/%0d exp bits %b%b", tx_f, tx_s, tx_sym.i, tx_sym.q, bi, bq);
      end
      fi = 0; fq = 0;
      if (tx_s >= burst_at[tx_f] && tx_s < burst_at[tx_f] + burst_len[tx_f]) begin
        case ($urandom % 3)
          0: fi = 1;
          1: fq = 1;
          default: begin fi = 1; fq = 1; end
        endcase
      end
      err_cw[tx_f][(k % ROWS) * COLS + k / ROWS] ^= byte'((int'(fi) << sh) | (int'(fq) << (sh - 1)));
      rx_sym.i     <= noisy(tx_sym.i, fi);
      rx_sym.q     <= noisy(tx_sym.q, fq);
      rx_sym_valid <= 1'b1;
      rx_sym_sop   <= tx_sym_sop;
      rx_sym_eop   <= tx_sym_eop;
      // correction switch, set mid-frame (earlier frames are decoded by then)
      if (tx_s == SPF / 2) rx_correct_en <= (mode[tx_f] != 4);
      tx_s++;
      if (tx_s == SPF) begin tx_s = 0; tx_f++; end
    end
  end

  // ---------------------------------------------------------- rx check
  int rx_cw = 0, rx_k = 0;
  int n_corrected = 0, n_flagged = 0, n_bypass = 0, n_spread = 0, n_clean = 0;
  byte unsigned got[$];
  bit frame_ok = 1;
  int frame_err_bytes = 0;

  always @(posedge clk) begin
    if (!reset && rx_overflow) begin failures++; $display("rx overflow"); end
    if (!reset && rx_valid) begin
      got.push_back(rx_data);
      checks++;
      if (rx_sop !== (rx_k == 0) || rx_eop !== (rx_k == N - 1)) begin
        failures++; $display("rx markers wrong at codeword %0d byte %0d", rx_cw, rx_k);
      end
      rx_k++;
      if (rx_k == N) begin
        int f, c, nerr;
        byte unsigned sent[$], rcvd[$];
        f = rx_cw / CPF;
        c = rx_cw % CPF;
        nerr = 0;
        sent = {}; rcvd = {};
        for (int i = 0; i < N; i++) begin
          sent.push_back(ref_cw[f][c*N + i]);
          rcvd.push_back(ref_cw[f][c*N + i] ^ err_cw[f][c*N + i]);
          if (err_cw[f][c*N + i] != 0) nerr++;
        end
        if (c == 0) begin frame_ok = 1; frame_err_bytes = 0; end
        frame_err_bytes += nerr;
        checks++;
        if (mode[f] == 4) begin
          n_bypass++;
          if (got != rcvd || (nerr <= T && !rx_ok)) begin
            failures++; $display("frame %0d cw %0d: bypass output wrong", f, c);
          end
        end else if (nerr <= T) begin
          if (nerr == 0) n_clean++; else n_corrected++;
          if (got != sent || !rx_ok) begin
            failures++; frame_ok = 0;
            $display("frame %0d cw %0d: %0d errors not corrected", f, c, nerr);
          end
        end else begin
          frame_ok = 0;
          if (!rx_ok) n_flagged++;
          else if (!rs_is_codeword(N, K, got)) begin
            failures++; $display("frame %0d cw %0d: bad output marked good", f, c);
          end
        end
        if (c == CPF - 1 && mode[f] != 4 && frame_ok && frame_err_bytes > T) n_spread++;
        got = {};
        rx_k = 0;
        rx_cw++;
        if (rx_cw == FRAMES * CPF) begin
          $display("clean=%0d corrected=%0d flagged=%0d bypass=%0d burst_spread=%0d tx_backpressure=%0d stray_symbols=%0d",
                   n_clean, n_corrected, n_flagged, n_bypass, n_spread, n_backpressure, n_stray);
          checks++;
          if (n_clean == 0 || n_corrected == 0 || n_flagged == 0 || n_bypass == 0 ||
              n_spread == 0 || n_backpressure == 0 || n_stray == 0) begin
            failures++; $display("a mechanism was never exercised");
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
