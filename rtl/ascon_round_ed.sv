// ascon_round_ed -- one ASCON round with an error-detecting S-box layer.
//
// The round adds the round constant to x2 (constant addition), passes the
// state through the protected substitution layer (ascon_slayer_ed) and then
// through the linear layer (ascon_linear_layer). The error flags of the 64
// S-boxes are brought out with the new state. Purely combinational; a
// register around it (ascon_perm_ed) makes one round per clock.
//
// rc_idx selects the constant: round r (0..11) of the 12-round permutation
// adds {4'hF - r, r} to the low byte of x2.
module ascon_round_ed
  import ascon_ed_pkg::*;
#(
  parameter sbox_impl_e  IMPL   = IMPL_LOGIC_I,
  parameter ed_scheme_e  SCHEME = SCHEME_CRC3,
  localparam int unsigned EFW   = ef_width(SCHEME)
) (
  input  state_t                          s_in,
  input  logic [3:0]                      rc_idx,
  input  state_t                          fault_mask,
  output state_t                          s_out,
  output logic [NUM_SBOXES-1:0][EFW-1:0]  ef,
  output logic                            error
);
  state_t s_const, s_subst;

  always_comb begin
    s_const    = s_in;
    s_const[2] = s_in[2] ^ {56'd0, round_const(rc_idx)};
  end

  ascon_slayer_ed #(.IMPL(IMPL), .SCHEME(SCHEME)) u_slayer (
    .s_in(s_const), .fault_mask(fault_mask), .s_out(s_subst), .ef(ef), .error(error)
  );

  ascon_linear_layer u_linear (.s_in(s_subst), .s_out(s_out));
endmodule
