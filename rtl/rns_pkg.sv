// rns_pkg: constants and constant functions shared by the residue number
// system (RNS) arithmetic blocks.
//
// The default residue system has five 8-bit moduli {255, 254, 253, 251, 247}.
// They are pairwise coprime, so every integer in [0, M) with
// M = 255*254*253*251*247 = 1 015 933 059 570 (just under 2^40) has a unique
// residue representation. N_BITS = ceil(log2 M) = 40 is the width of the
// positional (binary) side. The moduli set is the one the design is sized
// for; N_BITS follows from it.
//
// The functions compute, at elaboration time, the constants that the
// hardware keeps in its T and M registers / ROMs:
//   recip(m, r)        t = floor(2^r / m), the reciprocal 1/m truncated to r
//                      fractional bits (t <= 1/m < t + 2^-r),
//   modulus_product()  M,
//   crt_weight(i)      P_i = M_i * |M_i^-1|_{m_i} with M_i = M / m_i, the
//                      Chinese-remainder weights used by the reverse converter
//                      (X = |sum P_i * alpha_i|_M).
// All of this is plain constant arithmetic on 64-bit or 128-bit values, so
// M may have up to 126 bits and a single modulus up to 62 bits.
package rns_pkg;

  // Number of moduli and width of one residue digit.
  localparam int unsigned S      = 5;
  localparam int unsigned B      = 8;
  // Width of the positional representation, ceil(log2 M).
  localparam int unsigned N_BITS = 40;

  typedef logic [B-1:0]      digit_t;
  typedef digit_t [S-1:0]    moduli_t;

  // Index 0 holds m_1 = 255, index 4 holds m_5 = 247.
  localparam moduli_t MODULI = {8'd247, 8'd251, 8'd253, 8'd254, 8'd255};

  // floor(2^r / m) for r up to 126.
  function automatic logic [127:0] recip(input logic [127:0] m, input int unsigned r);
    logic [127:0] one;
    one = 128'd1 << r;
    return one / m;
  endfunction

  // Moduli are passed to the functions below as a flat vector: modulus i
  // occupies bits [i*b +: b]. A packed [S-1:0][B-1:0] array converts to this
  // layout by plain assignment.
  function automatic longint unsigned modulus_at(input logic [1023:0] mods, input int unsigned b,
                                                 input int unsigned i);
    longint unsigned v;
    v = 0;
    for (int unsigned k = 0; k < b; k++) if (mods[i*b+k]) v = v | (64'd1 << k);
    return v;
  endfunction

  // Product of the first s moduli (up to 128 bits).
  function automatic logic [127:0] modulus_product(input logic [1023:0] mods,
                                                   input int unsigned b, input int unsigned s);
    logic [127:0] p;
    p = 128'd1;
    for (int unsigned i = 0; i < s; i++) p = p * 128'(modulus_at(mods, b, i));
    return p;
  endfunction

  // Multiplicative inverse of a modulo m (extended Euclid); a and m coprime,
  // m below 2^62.
  function automatic longint unsigned mod_inverse(input longint unsigned a,
                                                  input longint unsigned m);
    longint signed old_r, r, old_s, s_, q, tmp;
    old_r = longint'(a % m);
    r     = longint'(m);
    old_s = 1;
    s_    = 0;
    while (r != 0) begin
      q     = old_r / r;
      tmp   = old_r - q * r;  old_r = r;  r  = tmp;
      tmp   = old_s - q * s_; old_s = s_; s_ = tmp;
    end
    if (old_s < 0) old_s = old_s + longint'(m);
    return longint'(old_s);
  endfunction

  // CRT weight P_i = M_i * |M_i^-1|_{m_i}, M_i = M / m_i (below M).
  function automatic logic [127:0] crt_weight(input logic [1023:0] mods, input int unsigned b,
                                              input int unsigned s, input int unsigned i);
    logic [127:0]    mm, mi;
    longint unsigned m, inv;
    mm  = modulus_product(mods, b, s);
    m   = modulus_at(mods, b, i);
    mi  = mm / 128'(m);
    inv = mod_inverse(longint'(mi % 128'(m)), m);
    return mi * 128'(inv);
  endfunction

endpackage
