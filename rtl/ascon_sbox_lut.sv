// ascon_sbox_lut -- the 5-bit ASCON S-box as a 32-entry look-up table.
//
// The input is the table index and the output is the stored entry; on an
// FPGA this maps onto distributed LUT memory. Purely combinational.
//
// Interface: mu[4:0] = {mu0..mu4}, gamma[4:0] = {gamma0..gamma4}, mu0 and
// gamma0 being the most significant bits.
module ascon_sbox_lut (
  input  logic [4:0] mu,
  output logic [4:0] gamma
);
  always_comb begin
    unique case (mu)
      5'h00: gamma = 5'h04;  5'h01: gamma = 5'h0b;  5'h02: gamma = 5'h1f;  5'h03: gamma = 5'h14;
      5'h04: gamma = 5'h1a;  5'h05: gamma = 5'h15;  5'h06: gamma = 5'h09;  5'h07: gamma = 5'h02;
      5'h08: gamma = 5'h1b;  5'h09: gamma = 5'h05;  5'h0a: gamma = 5'h08;  5'h0b: gamma = 5'h12;
      5'h0c: gamma = 5'h1d;  5'h0d: gamma = 5'h03;  5'h0e: gamma = 5'h06;  5'h0f: gamma = 5'h1c;
      5'h10: gamma = 5'h1e;  5'h11: gamma = 5'h13;  5'h12: gamma = 5'h07;  5'h13: gamma = 5'h0e;
      5'h14: gamma = 5'h00;  5'h15: gamma = 5'h0d;  5'h16: gamma = 5'h11;  5'h17: gamma = 5'h18;
      5'h18: gamma = 5'h10;  5'h19: gamma = 5'h0c;  5'h1a: gamma = 5'h01;  5'h1b: gamma = 5'h19;
      5'h1c: gamma = 5'h16;  5'h1d: gamma = 5'h0a;  5'h1e: gamma = 5'h0f;  5'h1f: gamma = 5'h17;
      default: gamma = 5'h00;
    endcase
  end
endmodule
