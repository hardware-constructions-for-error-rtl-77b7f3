// ascon_sbox_logic2 -- the 5-bit ASCON S-box as a compact sum of products
// ("Logic-II").
//
// Each output bit is a two- or three-term OR of AND terms over the inputs
// and a few XORs, derived directly from the input/output table of the
// S-box rather than from the original gate network. It computes the same
// function as ascon_sbox_logic1 and is purely combinational.
//
// Interface: mu[4:0] = {mu0..mu4}, gamma[4:0] = {gamma0..gamma4}, mu0 and
// gamma0 being the most significant bits.
module ascon_sbox_logic2 (
  input  logic [4:0] mu,
  output logic [4:0] gamma
);
  logic m0, m1, m2, m3, m4;
  logic g0, g1, g2, g3, g4;

  assign {m0, m1, m2, m3, m4} = mu;

  always_comb begin
    g0 = (~m0 & ~m1 & (m2 ^ m3)) | (m1 & (m3 ^ ~m4)) | (m0 & ~m1 & (m2 ^ ~m3));
    g1 = ((~m1 ^ m2) & (m1 ^ ~m3) & (m0 ^ m4))
       | ((m0 ^ ~m4) & ((~m1 & m3) | (m2 & ~m3) | (m1 & ~m2)));
    g2 = ((m1 ^ ~m2) & (~m4 | m3)) | ((m1 ^ m2) & (~m3 & m4));
    g3 = ((m1 ^ ~m2) & (m0 | (m3 ^ m4))) | (~m0 & (m1 ^ m2) & (m3 ^ ~m4));
    g4 = (~m1 & (m3 ^ m4)) | (m1 & (m0 ^ ~m3));
    gamma = {g0, g1, g2, g3, g4};
  end
endmodule
