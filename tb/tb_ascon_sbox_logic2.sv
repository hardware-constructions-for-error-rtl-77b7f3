// tb_ascon_sbox_logic2 -- exhaustive self-checking test of the Logic-II sum-of-products
// ASCON S-box. All 32 inputs are applied and each output is compared with
// the specification table and with the bitwise reference form of the
// S-box. A watchdog ends the run with a failure if it hangs.
module tb_ascon_sbox_logic2;
  import ascon_ref_pkg::*;

  logic       clk = 1'b0;
  logic [4:0] mu, gamma;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  ascon_sbox_logic2 dut (.mu(mu), .gamma(gamma));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++) begin
      mu = 5'(x);
      @(posedge clk);
      checks += 2;
      if (gamma !== sbox_tab(mu)) begin
        failures++;
        $display("FAIL mu=%02h gamma=%02h table=%02h", mu, gamma, sbox_tab(mu));
      end
      if (gamma !== sbox_alg(mu)) begin
        failures++;
        $display("FAIL mu=%02h gamma=%02h reference=%02h", mu, gamma, sbox_alg(mu));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
