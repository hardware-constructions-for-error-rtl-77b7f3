// ascon_sbox_logic1 -- the 5-bit ASCON S-box as its original gate network
// ("Logic-I").
//
// Three XORs mix the input (x0^=x4, x2^=x1, x4^=x3), a chi step follows
// (each bit XORed with the AND of the inverted next bit and the bit after
// it), and a last XOR stage mixes the result (x1^=x0, x0^=x4, x3^=x2) and
// inverts x2. This is the network of the ASCON designers; it is purely
// combinational.
//
// Interface: mu[4:0] = {mu0,mu1,mu2,mu3,mu4}, so that mu read as a number
// is the table index; gamma[4:0] = {gamma0..gamma4} in the same order.
// gamma equals the table entry SB[mu].
module ascon_sbox_logic1 (
  input  logic [4:0] mu,
  output logic [4:0] gamma
);
  logic m0, m1, m2, m3, m4;
  logic a0, a1, a2, a3, a4;   // after the input XOR stage
  logic b0, b1, b2, b3, b4;   // after the chi step

  assign {m0, m1, m2, m3, m4} = mu;

  always_comb begin
    a0 = m0 ^ m4;
    a1 = m1;
    a2 = m2 ^ m1;
    a3 = m3;
    a4 = m4 ^ m3;
    b0 = a0 ^ (~a1 & a2);
    b1 = a1 ^ (~a2 & a3);
    b2 = a2 ^ (~a3 & a4);
    b3 = a3 ^ (~a4 & a0);
    b4 = a4 ^ (~a0 & a1);
    gamma = {b0 ^ b4, b1 ^ b0, ~b2, b3 ^ b2, b4};
  end
endmodule
