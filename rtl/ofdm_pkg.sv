// ofdm_pkg: types, constants and Galois-field helpers shared by the OFDM
// baseband blocks.
//
// The byte-wide data path (8-bit symbols) follows the design; the I/Q sample
// width, the QPSK amplitude and the GF(2^8) field polynomial are this
// implementation's own choices.  GF(2^8) is built on the primitive polynomial
// x^8 + x^4 + x^3 + x^2 + 1 (0x11D) with alpha = 0x02.  The functions below
// are plain combinational logic: multiplication by a constant, which is what
// the Reed-Solomon encoder taps and the syndrome/Chien updates need, reduces
// to a fixed XOR network after synthesis.  The field inverse is a 256-entry
// look-up table computed at elaboration, following the design's suggestion
// of table-based arithmetic where it saves logic.
package ofdm_pkg;

  // Width of the byte stream (RS symbol, interleaver word, S/P word).
  localparam int unsigned BYTE_W = 8;

  // Width of each of I and Q on the frequency-domain sample interface.
  localparam int unsigned IQ_W = 16;

  // Magnitude of the QPSK constellation points on each axis.
  localparam logic signed [IQ_W-1:0] QPSK_AMP = 16'sd8192;

  // One complex sample (one subcarrier value).
  typedef struct packed {
    logic signed [IQ_W-1:0] i;
    logic signed [IQ_W-1:0] q;
  } iq_t;

  // One GF(2^8) element.
  typedef logic [7:0] gf_t;

  localparam logic [7:0] GF_POLY_LOW = 8'h1D;  // x^8 = x^4 + x^3 + x^2 + 1

  // General multiplication: shift-and-add with modular reduction.
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    gf_t p;
    gf_t aa;
    p  = '0;
    aa = a;
    for (int k = 0; k < 8; k++) begin
      if (b[k]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ GF_POLY_LOW) : (aa << 1);
    end
    return p;
  endfunction

  // alpha^e for any e >= 0 (intended for elaboration-time constants).
  function automatic gf_t gf_alpha_pow(input int e);
    gf_t r;
    r = 8'h01;
    for (int k = 0; k < (e % 255); k++) r = gf_mul(r, 8'h02);
    return r;
  endfunction

  // Multiplicative inverse by exponentiation, a^254 (square-and-multiply).
  // Used only to build the look-up table below.
  function automatic gf_t gf_inv_pow(input gf_t a);
    gf_t r;
    gf_t base;
    r    = 8'h01;
    base = a;
    for (int k = 0; k < 8; k++) begin
      if (k != 0) r = gf_mul(r, base);  // 254 = 0b1111_1110
      base = gf_mul(base, base);
    end
    return r;
  endfunction

  typedef gf_t [255:0] gf_table_t;

  function automatic gf_table_t gf_inv_table();
    gf_table_t t;
    for (int a = 0; a < 256; a++) t[a] = gf_inv_pow(gf_t'(a));
    return t;
  endfunction

  // Inverse look-up table, filled at elaboration: 256 x 8 bits of ROM in
  // place of a chain of general multipliers.  Entry 0 is 0.
  localparam gf_table_t GF_INV_LUT = gf_inv_table();

  function automatic gf_t gf_inv(input gf_t a);
    return GF_INV_LUT[a];
  endfunction

endpackage
