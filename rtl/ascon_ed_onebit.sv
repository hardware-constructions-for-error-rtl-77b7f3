// ascon_ed_onebit -- one-bit signature check for one ASCON S-box.
//
// The signature p0 is the modulo-2 sum of the five S-box output bits. It is
// predicted from the S-box input mu, without using the S-box output, and
// compared with the parity actually found on the output gamma; a mismatch
// raises the error flag ef.
//
// The predictor is built in the same style as the S-box it guards (IMPL):
//   IMPL_LOGIC_I   XOR of the five Logic-I output expressions,
//   IMPL_LOGIC_II  a six-term sum of products,
//   IMPL_LUT       a 32-entry table indexed by mu.
// The table holds the parity of each S-box entry (bit i of P0_TABLE is the
// value for mu = i). Purely combinational: ef is valid in the same cycle
// as mu and gamma. The equations follow the published scheme; the table is
// the parity of the S-box table entries.
module ascon_ed_onebit
  import ascon_ed_pkg::*;
#(
  parameter sbox_impl_e IMPL = IMPL_LOGIC_I
) (
  input  logic [4:0] mu,      // S-box input {mu0..mu4}
  input  logic [4:0] gamma,   // S-box output {gamma0..gamma4}, as observed
  output logic       ef       // 1: error detected
);
  localparam logic [31:0] P0_TABLE = 32'h1d2e84b7;

  logic m0, m1, m2, m3, m4;
  logic p0_pred, p0_act;

  assign {m0, m1, m2, m3, m4} = mu;

  generate
    if (IMPL == IMPL_LOGIC_I) begin : g_logic1
      // Terms of the Logic-I output expressions.
      logic t_a, t_b, t_c, t_d, t_e;
      always_comb begin
        t_a = (m0 ^ m4) ^ (~m1 & (m1 ^ m2));
        t_b = (m3 ^ m4) ^ (~(m0 ^ m4) & m1);
        t_c = m1 ^ (~(m1 ^ m2) & m3);
        t_d = (m2 ^ m1) ^ (~m3 & m4);
        t_e = m3 ^ (~(m3 ^ m4) & (m0 ^ m4));
        // gamma0 ^ gamma1 ^ gamma2 ^ gamma3 ^ gamma4
        p0_pred = (t_a ^ t_b) ^ (t_c ^ t_a) ^ ~t_d ^ (t_e ^ t_d) ^ t_b;
      end
    end else if (IMPL == IMPL_LOGIC_II) begin : g_logic2
      always_comb
        p0_pred = (~m0 & ~m1 & ~m3) | (~m2 & m3 & ~m4) | (~m0 & m2 & m3 & m4)
                | (~m1 & ~m3 & m4) | (m0 & ~m2 & m3) | (m0 & m1 & ~m3 & ~m4);
    end else begin : g_lut
      always_comb p0_pred = P0_TABLE[mu];
    end
  endgenerate

  always_comb begin
    p0_act = ^gamma;
    ef     = p0_pred ^ p0_act;
  end
endmodule
