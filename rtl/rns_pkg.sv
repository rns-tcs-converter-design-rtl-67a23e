// rns_pkg: constants and elaboration-time helpers shared by the RNS to
// two's-complement (TCS) converter.
//
// The residue number system base is B = {32, 31, 29, 27, 25, 23, 19, 17}:
// eight pairwise co-prime moduli of at most five bits, giving a dynamic range
// M = 144 259 293 600 (37.07 bits). Residue lane 0 is the modulus 17 lane and
// lane 7 the modulus 32 lane, so the base is stored in ascending order.
//
// Word widths follow the converter datapath:
//   RES_W  = 5   bits per residue digit (ceil(log2 m) for the largest modulus)
//   M_W    = 38  ceil(log2 M): width of a projection and of a value mod M
//   SUM_W  = 42  width of the projection sum (8*(M-1) needs 41; one spare bit)
//   LOW_W  = 37  low-order segment of the sum, chosen so 2^LOW_W - 1 < M
//   HIGH_W = 5   high-order segment, addresses the modulo-M generator table
//   X_W    = 39  ceil(log2 M) + 1: signed output width
// The functions below are used only at elaboration time to fill the look-up
// tables and to derive the constants; none of them becomes hardware.
package rns_pkg;

  localparam int unsigned N_MOD = 8;
  localparam int unsigned RES_W = 5;

  typedef int unsigned moduli_t [N_MOD];
  localparam moduli_t MODULI = '{17, 19, 23, 25, 27, 29, 31, 32};

  // Product of all moduli: the dynamic range M.
  function automatic longint unsigned range_of(moduli_t mods);
    longint unsigned p = 1;
    for (int i = 0; i < N_MOD; i++) p = p * longint'(mods[i]);
    return p;
  endfunction

  // Number of bits needed to hold values 0 .. v-1 (ceil(log2 v)).
  function automatic int unsigned clog2_64(longint unsigned v);
    int unsigned n = 0;
    longint unsigned t = 1;
    while (t < v) begin
      t = t << 1;
      n++;
    end
    return n;
  endfunction

  // Largest k with 2^k <= v (floor(log2 v)).
  function automatic int unsigned flog2_64(longint unsigned v);
    int unsigned n = 0;
    while ((v >> (n + 1)) != 0) n++;
    return n;
  endfunction

  localparam longint unsigned M_RANGE = range_of(MODULI);
  localparam int unsigned     M_W     = clog2_64(M_RANGE);          // 38
  localparam int unsigned     SUM_W   = 42;
  localparam int unsigned     LOW_W   = flog2_64(M_RANGE);          // 37
  localparam int unsigned     HIGH_W  = SUM_W - LOW_W;              // 5
  localparam int unsigned     X_W     = M_W + 1;                    // 39

  // Multiplicative inverse of a modulo m, found by search (m is small).
  function automatic longint unsigned inv_mod(longint unsigned a, longint unsigned m);
    for (longint unsigned k = 1; k < m; k++)
      if (((a % m) * k) % m == 1) return k;
    return 0;
  endfunction

  // Orthogonal projection N_j = M_j * |M_j^-1 * n|_m for residue n of modulus m.
  function automatic longint unsigned projection(longint unsigned m, longint unsigned mr,
                                                 longint unsigned n);
    longint unsigned mj = mr / m;
    return mj * ((inv_mod(mj, m) * n) % m);
  endfunction

endpackage
