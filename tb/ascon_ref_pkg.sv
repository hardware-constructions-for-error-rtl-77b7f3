// ascon_ref_pkg -- reference model used by the testbenches.
//
// It models the ASCON S-box twice, as the 32-entry table of the ASCON
// specification and as the bitwise instruction sequence of the ASCON
// reference software, and builds on them the three signatures, one round
// and a whole permutation. The models use plain loops and bit indexing,
// sharing no code with the RTL.
package ascon_ref_pkg;

  typedef logic [63:0] word_t;
  typedef word_t [4:0] state_t;

  localparam logic [4:0] SBOX_TABLE [32] = '{
    5'h04, 5'h0b, 5'h1f, 5'h14, 5'h1a, 5'h15, 5'h09, 5'h02,
    5'h1b, 5'h05, 5'h08, 5'h12, 5'h1d, 5'h03, 5'h06, 5'h1c,
    5'h1e, 5'h13, 5'h07, 5'h0e, 5'h00, 5'h0d, 5'h11, 5'h18,
    5'h10, 5'h0c, 5'h01, 5'h19, 5'h16, 5'h0a, 5'h0f, 5'h17};

  function automatic logic [4:0] sbox_tab(logic [4:0] x);
    return SBOX_TABLE[x];
  endfunction

  // Bitwise form of the reference software; v[0] is x0 (MSB of the index).
  function automatic logic [4:0] sbox_alg(logic [4:0] x);
    logic v [5];
    logic t [5];
    for (int i = 0; i < 5; i++) v[i] = x[4-i];
    v[0] ^= v[4]; v[4] ^= v[3]; v[2] ^= v[1];
    for (int i = 0; i < 5; i++) t[i] = ~v[i] & v[(i+1)%5];
    for (int i = 0; i < 5; i++) v[i] ^= t[(i+1)%5];
    v[1] ^= v[0]; v[0] ^= v[4]; v[3] ^= v[2]; v[2] = ~v[2];
    return {v[0], v[1], v[2], v[3], v[4]};
  endfunction

  // Signatures of a 5-bit output g = {g0..g4}.
  function automatic logic sig_onebit(logic [4:0] g);
    logic p = 1'b0;
    for (int i = 0; i < 5; i++) p ^= g[i];
    return p;
  endfunction

  function automatic logic [1:0] sig_interleaved(logic [4:0] g);
    // {odd (g1^g3), even (g0^g2^g4)}
    return {g[3] ^ g[1], g[4] ^ g[2] ^ g[0]};
  endfunction

  function automatic logic [2:0] sig_crc3(logic [4:0] g);
    // {p5 = g0|g2, p4 = g0|g1|g3, p3 = g1|g4}
    logic g0 = g[4], g1 = g[3], g2 = g[2], g3 = g[1], g4 = g[0];
    return {g0 | g2, g0 | g1 | g3, g1 | g4};
  endfunction

  // Signature by scheme number (0 one-bit, 1 interleaved, 2 CRC-3), padded.
  function automatic logic [2:0] sig(int scheme, logic [4:0] g);
    case (scheme)
      0:       return {2'b00, sig_onebit(g)};
      1:       return {1'b0, sig_interleaved(g)};
      default: return sig_crc3(g);
    endcase
  endfunction

  function automatic word_t rotr(word_t x, int r);
    word_t y;
    for (int k = 0; k < 64; k++) y[k] = x[(k + r) % 64];
    return y;
  endfunction

  function automatic state_t linear(state_t s);
    int ra [5] = '{19, 61, 1, 10, 7};
    int rb [5] = '{28, 39, 6, 17, 41};
    state_t o;
    for (int i = 0; i < 5; i++) o[i] = s[i] ^ rotr(s[i], ra[i]) ^ rotr(s[i], rb[i]);
    return o;
  endfunction

  // Substitution layer with an AND fault mask; also returns the signature
  // mismatch of every S-box for the given scheme.
  function automatic state_t slayer(state_t s, state_t mask, int scheme,
                                    output logic [2:0] efs [64]);
    state_t o;
    for (int j = 0; j < 64; j++) begin
      logic [4:0] x, y, m;
      x = {s[0][j], s[1][j], s[2][j], s[3][j], s[4][j]};
      m = {mask[0][j], mask[1][j], mask[2][j], mask[3][j], mask[4][j]};
      y = sbox_tab(x) & m;
      efs[j] = sig(scheme, sbox_tab(x)) ^ sig(scheme, y);
      for (int i = 0; i < 5; i++) o[i][j] = y[4-i];
    end
    return o;
  endfunction

  function automatic state_t round_fn(state_t s, int r, state_t mask, int scheme,
                                      output logic [2:0] efs [64]);
    state_t t = s;
    t[2][7:0] ^= {4'(15 - r), 4'(r)};
    return linear(slayer(t, mask, scheme, efs));
  endfunction

  function automatic state_t perm(state_t s, int nrounds);
    logic [2:0] efs [64];
    state_t ones = {5{64'hFFFF_FFFF_FFFF_FFFF}};
    for (int r = 12 - nrounds; r < 12; r++) s = round_fn(s, r, ones, 2, efs);
    return s;
  endfunction

endpackage
