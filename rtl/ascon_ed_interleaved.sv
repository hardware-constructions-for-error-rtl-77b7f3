// ascon_ed_interleaved -- interleaved two-bit signature check for one
// ASCON S-box.
//
// p1 is the modulo-2 sum of the even output bits (gamma0, gamma2, gamma4)
// and p2 that of the odd ones (gamma1, gamma3). Both are predicted from
// the S-box input mu alone and compared with the sums found on the
// observed output gamma; ef[0] flags a p1 mismatch, ef[1] a p2 mismatch.
//
// The predictor follows the S-box style (IMPL): XORs of the Logic-I output
// expressions, Logic-II sums of products, or two 32-entry tables (bit i of
// a table is the value for mu = i). Purely combinational.
//
// The Logic-II p1 predictor groups its mu0 terms as
// mu0 (~mu1 mu3 mu4 | mu1 ~mu2 (~mu3 | ~mu4) | mu2 mu3 mu4); all predictor
// forms were checked against the S-box table for all 32 inputs.
module ascon_ed_interleaved
  import ascon_ed_pkg::*;
#(
  parameter sbox_impl_e IMPL = IMPL_LOGIC_I
) (
  input  logic [4:0] mu,
  input  logic [4:0] gamma,
  output logic [1:0] ef       // {p2 mismatch, p1 mismatch}
);
  localparam logic [31:0] P1_TABLE = 32'h87887877;
  localparam logic [31:0] P2_TABLE = 32'h9aa6fcc0;

  logic m0, m1, m2, m3, m4;
  logic p1_pred, p2_pred, p1_act, p2_act;

  assign {m0, m1, m2, m3, m4} = mu;

  generate
    if (IMPL == IMPL_LOGIC_I) begin : g_logic1
      logic t_a, t_b, t_c, t_d, t_e;
      always_comb begin
        t_a = (m0 ^ m4) ^ (~m1 & (m1 ^ m2));
        t_b = (m3 ^ m4) ^ (~(m0 ^ m4) & m1);
        t_c = m1 ^ (~(m1 ^ m2) & m3);
        t_d = (m2 ^ m1) ^ (~m3 & m4);
        t_e = m3 ^ (~(m3 ^ m4) & (m0 ^ m4));
        p1_pred = (t_a ^ t_b) ^ ~t_d ^ t_b;        // gamma0 ^ gamma2 ^ gamma4
        p2_pred = (t_c ^ t_a) ^ (t_e ^ t_d);       // gamma1 ^ gamma3
      end
    end else if (IMPL == IMPL_LOGIC_II) begin : g_logic2
      always_comb begin
        p1_pred = (~m0 & m1 & ~m2 & m3 & m4)
                | (m0 & ((~m1 & m3 & m4) | (m1 & ~m2 & (~m3 | ~m4)) | (m2 & m3 & m4)))
                | (~m0 & (~m4 | ~m3) & (~m1 | m2));
        p2_pred = (~m0 & ((m2 & m3) | (m1 & m3) | (m1 & m2)))
                | (m0 & ~m1 & ~m2 & m3 & ~m4) | (m2 & m3 & m4)
                | (m1 & m2 & ~m3 & ~m4) | (m0 & m4 & ((~m1 & ~m3) | (m1 & ~m2)));
      end
    end else begin : g_lut
      always_comb begin
        p1_pred = P1_TABLE[mu];
        p2_pred = P2_TABLE[mu];
      end
    end
  endgenerate

  always_comb begin
    p1_act = gamma[4] ^ gamma[2] ^ gamma[0];
    p2_act = gamma[3] ^ gamma[1];
    ef     = {p2_pred ^ p2_act, p1_pred ^ p1_act};
  end
endmodule
