// ofdm_system: byte-stream baseband of an OFDM link, transmit and receive
// chains side by side, with the (I)FFT left outside.
//
// Transmit:  bytes -> Reed-Solomon encoder -> block interleaver ->
//            parallel/serial (MSB first) -> QPSK mapper -> one complex
//            subcarrier value every two cycles on tx_sym, for an IFFT.
// Receive:   complex subcarrier values from an FFT on rx_sym -> QPSK
//            demapper -> serial/parallel -> deinterleaver -> Reed-Solomon
//            decoder -> corrected bytes on rx_data.
// The set of blocks (FFT, serial/parallel, QPSK, RS, de-interleaving) and
// their order on the receive side follow the design; the FFT itself is a
// vendor core there and is not part of this RTL, so its input and output
// appear as ports.  The transmit chain mirrors the receive chain.
//
// Framing: one interleaver frame is ROWS*COLS bytes and holds
// ROWS*COLS/RS_N whole codewords (default 36 bytes = 3 x RS(12,8)).  The
// transmit interleaver counts frames from reset; tx_sym_sop / tx_sym_eop
// mark the first / last symbol of each frame (144 symbols by default) and
// rx_sym_sop must mark the first received symbol of a frame, which aligns
// the receive chain.  Because each 6-byte column of the frame takes two
// bytes from each of the three codewords, any burst of up to 6 corrupted
// bytes (24 QPSK symbols) is corrected.
//
// Handshakes: tx_data is taken when tx_valid and tx_ready are high, tx_sop
// marking the first byte of a message (RS_K bytes).  The symbol streams have
// a valid flag and no backpressure; received symbols must be at least two
// cycles apart.  rx_correct_en enables correction; rx_ok, valid with
// rx_eop, reports a decodable codeword.  rx_overflow flags a received frame
// arriving faster than it can be drained.  reset is synchronous, active high.
module ofdm_system
  import ofdm_pkg::*;
#(
  parameter int unsigned RS_N    = 12,
  parameter int unsigned RS_K    = 8,
  parameter int unsigned IL_ROWS = 6,
  parameter int unsigned IL_COLS = 6
) (
  input  logic              clk,
  input  logic              reset,
  // transmit bytes in
  input  logic [BYTE_W-1:0] tx_data,
  input  logic              tx_valid,
  input  logic              tx_sop,
  output logic              tx_ready,
  // to the IFFT
  output iq_t               tx_sym,
  output logic              tx_sym_valid,
  output logic              tx_sym_sop,
  output logic              tx_sym_eop,
  // from the FFT
  input  iq_t               rx_sym,
  input  logic              rx_sym_valid,
  input  logic              rx_sym_sop,
  input  logic              rx_sym_eop,
  // received bytes out
  input  logic              rx_correct_en,
  output logic [BYTE_W-1:0] rx_data,
  output logic              rx_valid,
  output logic              rx_sop,
  output logic              rx_eop,
  output logic              rx_ok,
  output logic              rx_overflow
);

  // ------------------------------------------------------------ transmit
  gf_t  enc_y;
  logic enc_r, il_ready;
  logic [BYTE_W-1:0] il_y;
  logic il_v, il_s, il_t, ps_ready;
  logic ps_bit, ps_v, ps_s, ps_t;

  rs_encoder #(.N(RS_N), .K(RS_K)) u_rs_enc (
    .clk, .reset,
    .x_in(tx_data), .sink_r(tx_valid), .sink_s(tx_sop), .sink_ready(tx_ready),
    .y_out(enc_y), .source_r(enc_r), .source_s(), .source_t(),
    .source_ready(il_ready)
  );

  interleaver #(.W(BYTE_W), .ROWS(IL_ROWS), .COLS(IL_COLS)) u_il (
    .clk, .reset,
    .x(enc_y), .sink_r(enc_r), .sink_s(1'b0), .sink_t(1'b0), .sink_ready(il_ready),
    .y(il_y), .source_cnt(il_v), .source_cnt1(il_s), .source_cnt2(il_t),
    .source_ready(ps_ready)
  );

  parallel_serial #(.W(BYTE_W)) u_ps (
    .clk, .rst(reset), .en(1'b1),
    .din(il_y), .load(il_v), .sop_in(il_s), .eop_in(il_t), .ready(ps_ready),
    .cout(ps_bit), .cout_vld(ps_v), .cout_sop(ps_s), .cout_eop(ps_t)
  );

  qpsk_mod u_qmod (
    .clk, .reset,
    .input_x(ps_bit), .enable(1'b1), .sink_r(ps_v), .sink_s(ps_s), .sink_t(ps_t),
    .output_y(tx_sym), .source_r(tx_sym_valid), .source_s(tx_sym_sop), .source_t(tx_sym_eop)
  );

  // ------------------------------------------------------------- receive
  logic dm_bit, dm_v, dm_s;
  logic [BYTE_W-1:0] sp_word;
  logic sp_v, sp_s;
  logic [BYTE_W-1:0] dil_y;
  logic dil_v, dil_s;

  qpsk_demod u_qdemod (
    .clk, .reset,
    .input_x(rx_sym), .enable(1'b1), .sink_r(rx_sym_valid), .sink_s(rx_sym_sop),
    .sink_t(rx_sym_eop),
    .output_y(dm_bit), .source_r(dm_v), .source_s(dm_s), .source_t()
  );

  serial_parallel #(.W(BYTE_W)) u_sp (
    .clk, .rst(reset), .en(dm_v), .cin(dm_bit), .sop_in(dm_s),
    .cout(sp_word), .cout_vld(sp_v), .cout_sop(sp_s)
  );

  deinterleaver #(.W(BYTE_W), .ROWS(IL_ROWS), .COLS(IL_COLS)) u_dil (
    .clk, .reset,
    .x(sp_word), .sink_r(sp_v), .sink_s(sp_s), .sink_t(1'b0),
    .y(dil_y), .source_cnt(dil_v), .source_cnt1(dil_s), .source_cnt2(),
    .overflow(rx_overflow)
  );

  rs_decoder #(.N(RS_N), .K(RS_K)) u_rs_dec (
    .clk, .reset,
    .x_in(dil_y), .sink_r(dil_v), .sink_s(dil_s), .sink_t(1'b0), .sink_en(rx_correct_en),
    .y_out(rx_data), .source_r(rx_valid), .source_s(rx_sop), .source_t(rx_eop),
    .source_en(rx_ok)
  );

  // Whole codewords per frame, so that frame starts are codeword starts.
  if ((IL_ROWS * IL_COLS) % RS_N != 0) begin : g_bad_framing
    $error("interleaver frame must hold a whole number of RS codewords");
  end

endmodule
