// ascon_linear_layer -- the ASCON linear diffusion layer.
//
// Each state word is XORed with two rotated copies of itself:
//   x_i <- x_i ^ (x_i >>> ROT_A[i]) ^ (x_i >>> ROT_B[i])
// with the rotation distances of the ASCON specification (19/28, 61/39,
// 1/6, 10/17, 7/41 for x0..x4). Pure wiring and XOR gates, combinational.
module ascon_linear_layer
  import ascon_ed_pkg::*;
(
  input  state_t s_in,
  output state_t s_out
);
  function automatic word_t ror(word_t x, int unsigned r);
    return (x >> r) | (x << (64 - r));
  endfunction

  always_comb
    for (int i = 0; i < 5; i++)
      s_out[i] = s_in[i] ^ ror(s_in[i], ROT_A[i]) ^ ror(s_in[i], ROT_B[i]);
endmodule
