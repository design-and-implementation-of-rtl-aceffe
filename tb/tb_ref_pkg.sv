// tb_ref_pkg: reference arithmetic for the transmitter testbenches.
//
// Everything here is computed a different way from the RTL: GF(2^8) products
// through exponent/logarithm tables, the randomizer and the convolutional code
// bit-serially with one array element per register stage, and Reed-Solomon
// code words checked through their syndromes (a valid code word of
// g(x) = prod_{i=0}^{15} (x + alpha^i) vanishes at alpha^0 .. alpha^15).
package tb_ref_pkg;

  int unsigned gf_exp [512];
  int unsigned gf_log [256];

  // Field of x^8 + x^4 + x^3 + x^2 + 1 (11Dh), alpha = 2.
  function automatic void gf_init();
    int unsigned x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      gf_exp[i]       = x;
      gf_exp[i + 255] = x;
      gf_log[x]       = i;
      x = x << 1;
      if (x & 32'h100) x = x ^ 32'h11D;
    end
    gf_exp[510] = gf_exp[0];
    gf_exp[511] = gf_exp[1];
    gf_log[0]   = 0;
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    if (a == 0 || b == 0) return 8'h00;
    return 8'(gf_exp[gf_log[a] + gf_log[b]]);
  endfunction

  // Syndrome i of a code word given first byte = highest-degree coefficient.
  function automatic logic [7:0] rs_syndrome(input logic [7:0] cw [], input int i);
    logic [7:0] s, root;
    root = 8'(gf_exp[i]);
    s    = 8'h00;
    foreach (cw[k]) s = gf_mul(s, root) ^ cw[k];
    return s;
  endfunction

  // Randomizer: stage[1..15], stage[1] loaded with the first seed bit.
  typedef bit stages_t [1:15];

  function automatic stages_t prbs_seed();
    stages_t st;
    bit [14:0] seed = 15'b100101010000000;   // written stage 1 .. stage 15
    for (int k = 1; k <= 15; k++) st[k] = seed[15 - k];
    return st;
  endfunction

  // One PRBS output byte (first bit in the MSB); advances the stages.
  function automatic logic [7:0] prbs_byte(ref stages_t st);
    logic [7:0] o;
    bit fb;
    for (int b = 7; b >= 0; b--) begin
      fb = st[14] ^ st[15];
      for (int k = 15; k > 1; k--) st[k] = st[k-1];
      st[1] = fb;
      o[b]  = fb;
    end
    return o;
  endfunction

  // Convolutional code K = 7, G1 = 171, G2 = 133 (octal), one bit at a time.
  // sr[1] is the previous input bit, sr[6] the oldest.
  typedef bit cc_state_t [1:6];

  function automatic logic [1:0] cc_bit(ref cc_state_t sr, input bit u);
    bit x, y;
    // 171 = 1 111 001: u, s1, s2, s3, s6.  133 = 1 011 011: u, s2, s3, s5, s6.
    x = u ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[6];
    y = u ^ sr[2] ^ sr[3] ^ sr[5] ^ sr[6];
    for (int k = 6; k > 1; k--) sr[k] = sr[k-1];
    sr[1] = u;
    return {x, y};
  endfunction

endpackage
