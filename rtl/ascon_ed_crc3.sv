// ascon_ed_crc3 -- three-bit CRC-3 signature check for one ASCON S-box.
//
// The output vector is read as f(x) = g0 x^4 + g3 x^3 + g2 x^2 + g1 x + g4
// and reduced by g(x) = x^3 + x + 1, giving the coefficient groups
// p3 <- {g1, g4}, p4 <- {g0, g1, g3}, p5 <- {g0, g2}. As in the signature
// equations and signature table this design follows, the bits of each group
// are combined with OR:
//   p3 = g1 | g4,  p4 = g0 | g1 | g3,  p5 = g0 | g2.
// The three bits are predicted from the S-box input mu alone and compared
// with the same functions of the observed output gamma; ef[k] flags a
// mismatch of p3, p4 and p5 for k = 0, 1, 2.
//
// The predictor follows the S-box style (IMPL): ORs of the Logic-I output
// expressions, Logic-II sums of products, or three 32-entry tables (bit i
// is the value for mu = i). Purely combinational.
module ascon_ed_crc3
  import ascon_ed_pkg::*;
#(
  parameter sbox_impl_e IMPL = IMPL_LOGIC_I
) (
  input  logic [4:0] mu,
  input  logic [4:0] gamma,
  output logic [2:0] ef       // {p5, p4, p3 mismatch}
);
  localparam logic [31:0] P3_TABLE = 32'heeefb776;
  localparam logic [31:0] P4_TABLE = 32'hfbeffdfe;
  localparam logic [31:0] P5_TABLE = 32'hdbefdb3d;

  logic m0, m1, m2, m3, m4;
  logic g0, g1, g2, g3, g4;
  logic [2:0] p_pred, p_act;   // {p5, p4, p3}

  assign {m0, m1, m2, m3, m4} = mu;
  assign {g0, g1, g2, g3, g4} = gamma;

  generate
    if (IMPL == IMPL_LOGIC_I) begin : g_logic1
      logic t_a, t_b, t_c, t_d, t_e;
      always_comb begin
        t_a = (m0 ^ m4) ^ (~m1 & (m1 ^ m2));
        t_b = (m3 ^ m4) ^ (~(m0 ^ m4) & m1);
        t_c = m1 ^ (~(m1 ^ m2) & m3);
        t_d = (m2 ^ m1) ^ (~m3 & m4);
        t_e = m3 ^ (~(m3 ^ m4) & (m0 ^ m4));
        p_pred[0] = (t_c ^ t_a) | t_b;                    // gamma1 | gamma4
        p_pred[1] = (t_a ^ t_b) | (t_c ^ t_a) | (t_e ^ t_d); // gamma0 | gamma1 | gamma3
        p_pred[2] = (t_a ^ t_b) | ~t_d;                   // gamma0 | gamma2
      end
    end else if (IMPL == IMPL_LOGIC_II) begin : g_logic2
      always_comb begin
        p_pred[0] = ((~m3 | (m1 & m2)) & m4) | (((~m1 & ~m2) | m3) & m0) | (~m1 & m3 & ~m4)
                  | (~m0 & m1 & ~m2 & ~m4) | (~m0 & m2 & ~m3);
        p_pred[1] = ((~m1 | m0) & m4) | (m1 & ~m3 & ~m4) | (m0 & ~m1 & ~m2) | (m2 & m3)
                  | ((m2 | m3) & ~m0);
        p_pred[2] = ((m1 ^ ~m2) & ~m4) | ((m1 ^ m3) & ~m2) | (~m0 & ~m1 & m2 & ~m3)
                  | ((m4 | m3) & m0 & ~m1) | (m1 & m3 & m4);
      end
    end else begin : g_lut
      always_comb p_pred = {P5_TABLE[mu], P4_TABLE[mu], P3_TABLE[mu]};
    end
  endgenerate

  always_comb begin
    p_act = {g0 | g2, g0 | g1 | g3, g1 | g4};
    ef    = p_pred ^ p_act;
  end
endmodule
