// tx_pkg: constants and helper functions shared by the QPSK transmitter blocks.
//
// Holds the MPEG-2 framing numbers, the GF(2^8) field of the Reed-Solomon
// coder (primitive polynomial f(x) = x^8 + x^4 + x^3 + x^2 + 1, alpha = 02h),
// the RS(204,188) generator polynomial g(x) = prod_{i=0..15} (x + alpha^i)
// computed at elaboration time, the randomizer seed, the convolutional code
// generators (171, 133 octal) and the square-root raised cosine taps of the
// modulator. The field, the generator polynomial, the seed, the code and the
// roll-off come from the transmitter description; the filter span (8 symbols)
// and the tap scaling are design choices.
package tx_pkg;

  // ---- MPEG-2 transport stream framing --------------------------------
  localparam int unsigned PKT_LEN    = 188;   // bytes per transport packet
  localparam int unsigned CW_LEN     = 204;   // bytes per RS code word
  localparam int unsigned PAR_LEN    = 16;    // parity bytes (2t, t = 8)
  localparam logic [7:0]  SYNC_BYTE  = 8'h47;
  localparam logic [7:0]  SYNC_INV   = 8'hB8;
  localparam int unsigned PKT_GROUP  = 8;     // packets per randomizer period

  // ---- Randomizer: 1 + x^14 + x^15, seed 100101010000000 (stage 1 first) --
  // Bit 14 of the vector is stage 1, bit 0 is stage 15.
  localparam logic [14:0] PRBS_SEED  = 15'b100101010000000;

  // ---- GF(2^8) ----------------------------------------------------------
  localparam int unsigned GF_M       = 8;
  localparam logic [7:0]  GF_POLY    = 8'h1D;  // f(x) without the x^8 term

  // Reference GF multiply (shift-and-add); used only to build constants.
  function automatic logic [7:0] gf_mul_const(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] acc, t;
    acc = '0;
    t   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ t;
      t = t[7] ? ((t << 1) ^ GF_POLY) : (t << 1);
    end
    return acc;
  endfunction

  // Coefficients g_0..g_15 of the monic generator polynomial
  // g(x) = prod_{i=0}^{15} (x + alpha^i), alpha = 02h. g_16 = 1 is implicit.
  typedef logic [PAR_LEN-1:0][7:0] rs_gen_t;

  function automatic rs_gen_t rs_gen_poly();
    logic [7:0] g [PAR_LEN+1];
    logic [7:0] root;
    rs_gen_t    res;
    for (int k = 0; k <= PAR_LEN; k++) g[k] = '0;
    g[0] = 8'h01;
    root = 8'h01;
    for (int i = 0; i < PAR_LEN; i++) begin
      // multiply the current polynomial by (x + root)
      for (int k = PAR_LEN; k > 0; k--) g[k] = g[k-1] ^ gf_mul_const(g[k], root);
      g[0] = gf_mul_const(g[0], root);
      root = gf_mul_const(root, 8'h02);
    end
    for (int k = 0; k < PAR_LEN; k++) res[k] = g[k];
    return res;
  endfunction

  localparam rs_gen_t RS_GEN = rs_gen_poly();

  // ---- Convolutional code, K = 7 -----------------------------------------
  // Generators in octal, MSB = tap on the current input bit.
  localparam logic [6:0] CC_G1 = 7'o171;      // X output -> I
  localparam logic [6:0] CC_G2 = 7'o133;      // Y output -> Q

  // ---- Modulator ----------------------------------------------------------
  localparam int unsigned SPAN     = 8;       // filter span in symbols
  localparam int unsigned OUT_W    = 10;      // output sample width
  // Square-root raised cosine, roll-off 0.35, sampled at T/4:
  //   SRRC_TAPS[q] = round(328.35 * h((q/4 - SPAN/2) T)),  q = 0 .. 4*SPAN-1
  // with h(0) = 1 - r + 4r/pi and
  //   h(t) = (sin(pi t (1-r)) + 4 r t cos(pi t (1+r))) / (pi t (1 - (4 r t)^2)),
  // t in symbol periods. The scale makes the largest phase sum of |h| fit
  // a signed 10-bit word (510 <= 511).
  typedef logic signed [OUT_W-1:0] tap_t;
  localparam tap_t SRRC_TAPS [4*SPAN] = '{
      1,   4,   3,  -3,  -8,  -5,   8,  21,
     19,  -7, -44, -62, -28,  68, 200, 314,
    360, 314, 200,  68, -28, -62, -44,  -7,
     19,  21,   8,  -5,  -8,  -3,   3,   4
  };

  // One IF sample of one phase p: sum over the symbol window of +/-h.
  // Window bit j is the symbol of age j (bit value 0 -> +1, 1 -> -1).
  function automatic tap_t rom_value(input int unsigned p, input logic [SPAN-1:0] win);
    int acc;
    acc = 0;
    for (int j = 0; j < SPAN; j++)
      acc += win[j] ? -int'(SRRC_TAPS[4*j+p]) : int'(SRRC_TAPS[4*j+p]);
    return tap_t'(acc);
  endfunction

endpackage
