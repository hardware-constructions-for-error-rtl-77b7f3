// ascon_slayer_ed -- the ASCON substitution layer with error detection.
//
// NUM_SBOXES protected S-boxes (ascon_sbox_ed) work in parallel, one per
// bit slice of the five-word state: S-box j reads bit j of x0..x4 and
// writes bit j of the five output words. Each S-box returns its own error
// flags, so one pass yields NUM_SBOXES x EFW flags; error is their OR.
//
// fault_mask has the layout of the state: bit j of mask word i forces
// output bit j of word i to 0 when low (fault injection; all ones in
// normal operation). Purely combinational. The bit-slice arrangement is
// ASCON's; reducing the flags to one error bit by OR is this design's choice.
module ascon_slayer_ed
  import ascon_ed_pkg::*;
#(
  parameter sbox_impl_e  IMPL   = IMPL_LOGIC_I,
  parameter ed_scheme_e  SCHEME = SCHEME_CRC3,
  localparam int unsigned EFW   = ef_width(SCHEME)
) (
  input  state_t                          s_in,
  input  state_t                          fault_mask,
  output state_t                          s_out,
  output logic [NUM_SBOXES-1:0][EFW-1:0]  ef,      // ef[j]: flags of S-box j
  output logic                            error
);
  for (genvar j = 0; j < NUM_SBOXES; j++) begin : g_sbox
    logic [4:0] mu, gamma, mask;
    assign mu   = {s_in[0][j], s_in[1][j], s_in[2][j], s_in[3][j], s_in[4][j]};
    assign mask = {fault_mask[0][j], fault_mask[1][j], fault_mask[2][j],
                   fault_mask[3][j], fault_mask[4][j]};
    ascon_sbox_ed #(.IMPL(IMPL), .SCHEME(SCHEME)) u_sbox_ed (
      .mu(mu), .fault_mask(mask), .gamma(gamma), .ef(ef[j])
    );
    assign {s_out[0][j], s_out[1][j], s_out[2][j], s_out[3][j], s_out[4][j]} = gamma;
  end

  assign error = |ef;
endmodule
