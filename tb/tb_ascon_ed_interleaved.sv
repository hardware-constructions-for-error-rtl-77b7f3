// tb_ascon_ed_interleaved -- exhaustive self-checking test of the interleaved signature
// check in all three predictor styles (Logic-I, Logic-II, LUT).
//
// For every S-box input mu and every 5-bit value on the observed output
// gamma (the correct one and all 31 wrong ones), each of the three
// instances must flag exactly the signature bits in which gamma differs
// from the correct S-box output, per the reference model. It also counts
// how many wrong outputs each style detects at all.
module tb_ascon_ed_interleaved;
  import ascon_ed_pkg::*;
  import ascon_ref_pkg::*;

  logic       clk = 1'b0;
  logic [4:0] mu, gamma;
  logic [1:0] ef [3];
  int         checks = 0, failures = 0;
  int         detected [3] = '{0, 0, 0};
  int         wrong = 0;

  always #5 clk = ~clk;

  ascon_ed_interleaved #(.IMPL(IMPL_LOGIC_I))  dut_l1  (.mu(mu), .gamma(gamma), .ef(ef[0]));
  ascon_ed_interleaved #(.IMPL(IMPL_LOGIC_II)) dut_l2  (.mu(mu), .gamma(gamma), .ef(ef[1]));
  ascon_ed_interleaved #(.IMPL(IMPL_LUT))      dut_lut (.mu(mu), .gamma(gamma), .ef(ef[2]));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++) begin
      for (int y = 0; y < 32; y++) begin
        logic [2:0] exp_ef;
        mu    = 5'(x);
        gamma = 5'(y);
        @(posedge clk);
        exp_ef = sig(1, sbox_tab(mu)) ^ sig(1, gamma);
        if (gamma != sbox_tab(mu)) wrong++;
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (3'(ef[k]) !== exp_ef) begin
            failures++;
            $display("FAIL impl=%0d mu=%02h gamma=%02h ef=%b expected=%b", k, mu, gamma, ef[k], exp_ef);
          end
          if (ef[k] != 0) detected[k]++;
        end
      end
    end
    for (int k = 0; k < 3; k++)
      $display("impl %0d: %0d of %0d wrong outputs detected", k, detected[k], wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
