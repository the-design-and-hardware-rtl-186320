// rs_decoder: Reed-Solomon decoder RS(N, K) over GF(2^8), T = (N-K)/2 byte
// errors corrected per codeword ("DeRS").
//
// Decoding runs in three overlapped stages, so codewords may arrive back to
// back at one byte per cycle:
//   1. While a codeword streams in, it is stored in one of two buffer banks
//      and its 2T syndromes S_j = r(a^j) are accumulated by Horner's rule,
//      each with a fixed multiplier by a^j.
//   2. In the cycle after the last byte, the Berlekamp-Massey algorithm
//      (unrolled, combinational) turns the syndromes into the error locator
//      L(x), and the error evaluator W(x) = S(x)L(x) mod x^2T is formed.
//   3. The stored codeword is then read out, one byte per cycle, while a
//      Chien search evaluates L and W at the inverse location of each byte
//      (every term steps by a fixed multiplier a^j).  Where L is zero the
//      error value W / L_odd (Forney's rule for first root a^0) is added.
// General products use shift-and-add multipliers; the field inverse needed
// by Berlekamp-Massey and Forney is read from a 256-entry table (ofdm_pkg).
// The codeword is declared decodable when the number of roots found equals
// the degree of L and that degree is at most T.  The RS decoding itself and
// the port names of the DeRS symbol are the design's; the algorithm, the code
// parameters (default RS(12, 8)) and the meaning of sink_en / source_en are
// this implementation's choices.
//
// Interface: x_in is taken when sink_r is high; sink_s restarts a codeword,
// sink_t marks its last byte (checked only).  sink_en enables correction;
// when it is low (sampled at the end of a codeword) the bytes leave unchanged
// but are still checked.  Output: y_out with source_r valid, source_s /
// source_t first / last byte; source_en, valid with source_t, is high when
// the codeword was decodable (no error, or all errors corrected).  The first
// corrected byte leaves 3 cycles after the last received byte.  reset is
// synchronous, active high.
module rs_decoder
  import ofdm_pkg::*;
#(
  parameter int unsigned N = 12,
  parameter int unsigned K = 8
) (
  input  logic clk,
  input  logic reset,
  input  gf_t  x_in,
  input  logic sink_r,
  input  logic sink_s,
  input  logic sink_t,
  input  logic sink_en,
  output gf_t  y_out,
  output logic source_r,
  output logic source_s,
  output logic source_t,
  output logic source_en
);

  localparam int unsigned NSYN = N - K;
  localparam int unsigned T    = NSYN / 2;
  localparam int unsigned CW   = $clog2(N);

  typedef gf_t [NSYN-1:0] synv_t;
  typedef gf_t [NSYN:0]   poly_t;

  // a^j: per-step constants of the syndrome and Chien updates.
  function automatic synv_t step_consts();
    synv_t v;
    for (int j = 0; j < int'(NSYN); j++) v[j] = gf_alpha_pow(j);
    return v;
  endfunction

  // a^(-j(N-1)): start values of the Chien terms (first byte = degree N-1).
  function automatic synv_t chien_init();
    synv_t v;
    for (int j = 0; j < int'(NSYN); j++)
      v[j] = gf_alpha_pow((255 - ((j * (N - 1)) % 255)) % 255);
    return v;
  endfunction

  localparam synv_t STEP = step_consts();
  localparam synv_t INIT = chien_init();

  // ---------------------------------------------------------------- stage 1
  gf_t               mem [2][N];
  logic              wbank;
  logic [CW-1:0]     cnt, pos;
  synv_t             syn, syn_next, syn_done;
  logic              done_pend, done_bank, done_en;

  assign pos = sink_s ? '0 : cnt;

  always_comb begin
    for (int j = 0; j < int'(NSYN); j++)
      syn_next[j] = ((pos == '0) ? 8'h00 : gf_mul(syn[j], STEP[j])) ^ x_in;
  end

  always_ff @(posedge clk) begin
    if (sink_r) mem[wbank][pos] <= x_in;
  end

  // ---------------------------------------------------------------- stage 2
  poly_t bm_c, bm_b, bm_t;
  gf_t   bm_d, bm_bb, bm_coef;
  int    bm_l, bm_m;
  synv_t lam_ev, om_ev;
  logic  deg_ok;

  always_comb begin
    bm_c    = '0;
    bm_b    = '0;
    bm_t    = '0;
    bm_c[0] = 8'h01;
    bm_b[0] = 8'h01;
    bm_bb   = 8'h01;
    bm_d    = '0;
    bm_coef = '0;
    bm_l    = 0;
    bm_m    = 1;
    for (int n = 0; n < int'(NSYN); n++) begin
      bm_d = syn_done[n];
      for (int i = 1; i <= int'(NSYN); i++)
        if (i <= bm_l && i <= n) bm_d ^= gf_mul(bm_c[i], syn_done[n-i]);
      if (bm_d == 8'h00) begin
        bm_m = bm_m + 1;
      end else begin
        bm_coef = gf_mul(bm_d, gf_inv(bm_bb));
        bm_t    = bm_c;
        for (int i = 0; i <= int'(NSYN); i++)
          if (i >= bm_m) bm_c[i] ^= gf_mul(bm_coef, bm_b[i-bm_m]);
        if (2 * bm_l <= n) begin
          bm_l  = n + 1 - bm_l;
          bm_b  = bm_t;
          bm_bb = bm_d;
          bm_m  = 1;
        end else begin
          bm_m = bm_m + 1;
        end
      end
    end
    // locator and evaluator, pre-scaled for the first Chien position
    deg_ok = (bm_l <= int'(T));
    for (int j = 0; j < int'(NSYN); j++) begin
      lam_ev[j] = (j <= int'(T)) ? gf_mul(bm_c[j], INIT[j]) : 8'h00;
      om_ev[j]  = '0;
      for (int i = 0; i <= j; i++)
        if (i <= int'(T)) om_ev[j] ^= gf_mul(bm_c[i], syn_done[j-i]);
      om_ev[j] = gf_mul(om_ev[j], INIT[j]);
    end
  end

  // ---------------------------------------------------------------- stage 3
  synv_t         lam_t, om_t;
  logic          busy, rbank, corr_en, ok_deg;
  logic [CW-1:0] rp;
  logic [CW:0]   nroots, deg;
  gf_t           lam_sum, odd_sum, om_sum, err;
  logic          is_root, load;

  always_comb begin
    lam_sum = '0;
    odd_sum = '0;
    om_sum  = '0;
    for (int j = 0; j < int'(NSYN); j++) begin
      lam_sum ^= lam_t[j];
      if (j % 2 == 1) odd_sum ^= lam_t[j];
      om_sum ^= om_t[j];
    end
    is_root = busy && (lam_sum == 8'h00);
    err     = is_root ? gf_mul(om_sum, gf_inv(odd_sum)) : 8'h00;
  end

  assign load = done_pend && (!busy || rp == CW'(N - 1));

  always_ff @(posedge clk) begin
    if (reset) begin
      wbank     <= 1'b0;
      cnt       <= '0;
      syn       <= '0;
      syn_done  <= '0;
      done_pend <= 1'b0;
      done_bank <= 1'b0;
      done_en   <= 1'b0;
      lam_t     <= '0;
      om_t      <= '0;
      busy      <= 1'b0;
      rbank     <= 1'b0;
      corr_en   <= 1'b0;
      ok_deg    <= 1'b0;
      rp        <= '0;
      nroots    <= '0;
      deg       <= '0;
      y_out     <= '0;
      source_r  <= 1'b0;
      source_s  <= 1'b0;
      source_t  <= 1'b0;
      source_en <= 1'b0;
    end else begin
      // stage 1: syndromes
      if (sink_r) begin
        if (pos == CW'(N - 1)) begin
          syn_done  <= syn_next;
          done_pend <= 1'b1;
          done_bank <= wbank;
          done_en   <= sink_en;
          wbank     <= !wbank;
          cnt       <= '0;
        end else begin
          syn <= syn_next;
          cnt <= pos + 1'b1;
        end
      end
      // stage 3: Chien search, Forney correction, output
      source_r  <= busy;
      source_s  <= busy && (rp == '0);
      source_t  <= busy && (rp == CW'(N - 1));
      source_en <= busy && (rp == CW'(N - 1)) && ok_deg &&
                   ((nroots + (CW+1)'(is_root)) == deg);
      if (busy) begin
        y_out  <= mem[rbank][rp] ^ (corr_en ? err : 8'h00);
        nroots <= nroots + (CW+1)'(is_root);
        for (int j = 0; j < int'(NSYN); j++) begin
          lam_t[j] <= gf_mul(lam_t[j], STEP[j]);
          om_t[j]  <= gf_mul(om_t[j], STEP[j]);
        end
        if (rp == CW'(N - 1)) busy <= 1'b0;
        rp <= rp + 1'b1;
      end
      // stage 2: locator for the codeword just received
      if (load) begin
        lam_t   <= lam_ev;
        om_t    <= om_ev;
        busy    <= 1'b1;
        rp      <= '0;
        rbank   <= done_bank;
        corr_en <= done_en;
        ok_deg  <= deg_ok;
        deg     <= (CW+1)'(bm_l);
        nroots  <= '0;
        if (!(sink_r && pos == CW'(N - 1))) done_pend <= 1'b0;
      end
    end
  end

  a_eop_position: assert property (@(posedge clk) disable iff (reset)
    (sink_r && sink_t) |-> (pos == CW'(N - 1)));
  // A new codeword must not finish before the previous locator was taken.
  a_no_overrun: assert property (@(posedge clk) disable iff (reset)
    (sink_r && pos == CW'(N - 1)) |-> (!done_pend || load));

endmodule
