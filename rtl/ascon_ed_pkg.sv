// ascon_ed_pkg -- types and constants shared by the error-detecting ASCON
// permutation.
//
// The 320-bit ASCON state is held as five 64-bit words x0..x4 (word 0 first).
// One 5-bit S-box works on one bit slice: bit j of x0..x4 forms its input
// (mu0..mu4), with mu0 taken from x0 and used as the most significant bit
// when the input is read as the index of the S-box table.
//
// Two parameters select a variant of the protected S-box:
//   sbox_impl_e  how the S-box and the signature predictor are built:
//                LOGIC_I (the original gate network of ASCON), LOGIC_II
//                (a compact sum-of-products form) or LUT (look-up tables).
//   ed_scheme_e  which signature guards each S-box: a one-bit parity, two
//                interleaved parities, or the three CRC-3 signature bits.
// The round constants and rotation distances are those of the ASCON
// specification; they are not design choices of this implementation.
package ascon_ed_pkg;

  typedef logic [63:0]      word_t;
  typedef word_t [4:0]      state_t;   // state_t[0] is x0

  typedef enum logic [1:0] {
    IMPL_LOGIC_I  = 2'd0,
    IMPL_LOGIC_II = 2'd1,
    IMPL_LUT      = 2'd2
  } sbox_impl_e;

  typedef enum logic [1:0] {
    SCHEME_ONE_BIT     = 2'd0,
    SCHEME_INTERLEAVED = 2'd1,
    SCHEME_CRC3        = 2'd2
  } ed_scheme_e;

  localparam int unsigned NUM_SBOXES = 64;   // S-boxes per substitution layer
  localparam int unsigned MAX_ROUNDS = 12;   // rounds of the full permutation

  // Error-flag bits produced by one protected S-box.
  function automatic int unsigned ef_width(ed_scheme_e scheme);
    case (scheme)
      SCHEME_ONE_BIT:     return 1;
      SCHEME_INTERLEAVED: return 2;
      default:            return 3;
    endcase
  endfunction

  // Round constant of round r (0..11) of the 12-round permutation; a
  // permutation of n rounds uses r = 12-n .. 11.
  function automatic logic [7:0] round_const(logic [3:0] r);
    return {4'hF - r, r};
  endfunction

  // Rotation distances of the linear layer, two per word.
  localparam int unsigned ROT_A [5] = '{19, 61, 1, 10, 7};
  localparam int unsigned ROT_B [5] = '{28, 39, 6, 17, 41};

endpackage
