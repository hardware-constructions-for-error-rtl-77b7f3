// ascon_sbox_ed -- one ASCON S-box with concurrent error detection.
//
// The S-box (built as IMPL selects: Logic-I gates, Logic-II sum of
// products, or a LUT) maps mu to gamma. A signature predictor of the same
// style computes the expected signature of gamma from mu alone, and the
// signature actually carried by gamma is compared with it; every mismatching
// signature bit raises one bit of ef. SCHEME chooses the signature: one-bit
// parity (1 flag), interleaved parities (2 flags) or CRC-3 (3 flags).
//
// fault_mask is a fault-injection hook: each S-box output bit is ANDed
// with its mask bit before it leaves the block and before the check sees
// it, so a 0 holds that output bit stuck at 0. Tie it to all ones in
// normal operation. Purely combinational.
//
// The pairing of predictor and S-box of the same style and the AND-mask
// stuck-at-0 fault model follow the scheme's own evaluation; bringing the
// mask out as a port is a choice of this implementation.
module ascon_sbox_ed
  import ascon_ed_pkg::*;
#(
  parameter sbox_impl_e  IMPL   = IMPL_LOGIC_I,
  parameter ed_scheme_e  SCHEME = SCHEME_CRC3,
  localparam int unsigned EFW   = ef_width(SCHEME)
) (
  input  logic [4:0]     mu,          // {mu0..mu4}
  input  logic [4:0]     fault_mask,  // 1 = pass, 0 = output bit stuck at 0
  output logic [4:0]     gamma,       // {gamma0..gamma4}, after any fault
  output logic [EFW-1:0] ef           // error flags, 1 = error detected
);
  logic [4:0] gamma_raw;

  generate
    if (IMPL == IMPL_LOGIC_I) begin : g_sbox
      ascon_sbox_logic1 u_sbox (.mu(mu), .gamma(gamma_raw));
    end else if (IMPL == IMPL_LOGIC_II) begin : g_sbox
      ascon_sbox_logic2 u_sbox (.mu(mu), .gamma(gamma_raw));
    end else begin : g_sbox
      ascon_sbox_lut    u_sbox (.mu(mu), .gamma(gamma_raw));
    end
  endgenerate

  assign gamma = gamma_raw & fault_mask;

  generate
    if (SCHEME == SCHEME_ONE_BIT) begin : g_check
      ascon_ed_onebit      #(.IMPL(IMPL)) u_check (.mu(mu), .gamma(gamma), .ef(ef));
    end else if (SCHEME == SCHEME_INTERLEAVED) begin : g_check
      ascon_ed_interleaved #(.IMPL(IMPL)) u_check (.mu(mu), .gamma(gamma), .ef(ef));
    end else begin : g_check
      ascon_ed_crc3        #(.IMPL(IMPL)) u_check (.mu(mu), .gamma(gamma), .ef(ef));
    end
  endgenerate
endmodule
