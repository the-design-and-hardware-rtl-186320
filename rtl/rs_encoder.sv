// rs_encoder: systematic Reed-Solomon encoder RS(N, K) over GF(2^8).
//
// The K message bytes pass straight through and are followed by N-K parity
// bytes, the remainder of m(x) * x^(N-K) divided by the generator polynomial
// g(x) = (x + a^0)(x + a^1)...(x + a^(N-K-1)), a = 0x02, field polynomial
// 0x11D.  The remainder is formed in the usual linear feedback shift
// register; every tap multiplies by a fixed coefficient of g(x), computed at
// elaboration, so each multiplier is a constant XOR network ("fixed form"
// multipliers, as the design asks for).  That an RS code with byte symbols
// is used is the design's; the code length, field and generator are this
// implementation's choices: the default RS(12, 8) is shortened from
// RS(255, 247) and corrects two byte errors per codeword.
//
// Interface (valid/ready on both sides): x_in is taken when sink_r and
// sink_ready are high; sink_s restarts a codeword (it is accepted, like any
// byte, only during the message part).  sink_ready is low while
// parity bytes are sent.  y_out is registered and held while source_r is
// high and source_ready low; source_s / source_t mark the first / last byte
// of each codeword.  reset is synchronous, active high.
module rs_encoder
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
  output logic sink_ready,
  output gf_t  y_out,
  output logic source_r,
  output logic source_s,
  output logic source_t,
  input  logic source_ready
);

  localparam int unsigned NPAR = N - K;
  typedef gf_t [NPAR:0] gpoly_t;

  function automatic gpoly_t gen_poly();
    gpoly_t g;
    gf_t    root;
    g    = '0;
    g[0] = 8'h01;
    for (int i = 0; i < int'(NPAR); i++) begin
      root = gf_alpha_pow(i);
      for (int j = NPAR; j >= 1; j--) g[j] = g[j-1] ^ gf_mul(g[j], root);
      g[0] = gf_mul(g[0], root);
    end
    return g;
  endfunction

  localparam gpoly_t G = gen_poly();

  gf_t [NPAR-1:0]     par, par_src;
  logic [$clog2(N)-1:0] cnt, pos;
  logic                 adv, in_phase, take;
  gf_t                  fb;

  assign adv        = !source_r || source_ready;
  assign in_phase   = (cnt < ($bits(cnt))'(K));
  assign sink_ready = adv && in_phase;
  assign take       = sink_r && sink_ready;
  assign pos        = sink_s ? '0 : cnt;
  assign par_src    = (take && sink_s) ? '0 : par;
  assign fb         = x_in ^ par_src[NPAR-1];

  always_ff @(posedge clk) begin
    if (reset) begin
      par      <= '0;
      cnt      <= '0;
      y_out    <= '0;
      source_r <= 1'b0;
      source_s <= 1'b0;
      source_t <= 1'b0;
    end else if (adv) begin
      if (take) begin
        // message byte: pass through, update the remainder
        y_out    <= x_in;
        source_r <= 1'b1;
        source_s <= (pos == '0);
        source_t <= 1'b0;
        for (int j = NPAR - 1; j >= 1; j--) par[j] <= par_src[j-1] ^ gf_mul(fb, G[j]);
        par[0] <= gf_mul(fb, G[0]);
        cnt    <= pos + 1'b1;
      end else if (!in_phase) begin
        // parity byte: shift the remainder out, highest degree first
        y_out    <= par[NPAR-1];
        source_r <= 1'b1;
        source_s <= 1'b0;
        source_t <= (cnt == ($bits(cnt))'(N - 1));
        par      <= {par[NPAR-2:0], 8'h00};
        cnt      <= (cnt == ($bits(cnt))'(N - 1)) ? '0 : cnt + 1'b1;
      end else begin
        source_r <= 1'b0;
        source_s <= 1'b0;
        source_t <= 1'b0;
      end
    end
  end

endmodule
