// tb_ascon_sbox_ed -- exhaustive self-checking test of the protected S-box
// in all nine combinations of S-box style (Logic-I, Logic-II, LUT) and
// signature scheme (one-bit, interleaved, CRC-3).
//
// Every input mu is applied with every stuck-at-0 fault mask (32 x 32).
// Each instance must output the correct S-box value with the masked bits
// cleared, and raise exactly the flags the reference model predicts. Fault-
// free cases must give no flag. Detection counts of single and multiple
// bit faults are printed per scheme.
module tb_ascon_sbox_ed;
  import ascon_ed_pkg::*;
  import ascon_ref_pkg::*;

  logic       clk = 1'b0;
  logic [4:0] mu, mask;
  logic [4:0] gamma [9];
  logic [2:0] ef    [9];
  int         checks = 0, failures = 0;
  int         sbu_eff [3] = '{0, 0, 0}, sbu_det [3] = '{0, 0, 0};
  int         mbu_eff [3] = '{0, 0, 0}, mbu_det [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  for (genvar i = 0; i < 3; i++) begin : g_impl
    for (genvar s = 0; s < 3; s++) begin : g_scheme
      localparam ed_scheme_e SCH = ed_scheme_e'(s);
      localparam int unsigned W = ef_width(SCH);
      logic [W-1:0] e;
      ascon_sbox_ed #(.IMPL(sbox_impl_e'(i)), .SCHEME(SCH)) dut (
        .mu(mu), .fault_mask(mask), .gamma(gamma[3*i+s]), .ef(e));
      assign ef[3*i+s] = 3'(e);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++) begin
      for (int m = 0; m < 32; m++) begin
        logic [4:0] good, bad;
        mu   = 5'(x);
        mask = 5'(m);
        @(posedge clk);
        good = sbox_tab(mu);
        bad  = good & mask;
        for (int k = 0; k < 9; k++) begin
          logic [2:0] exp_ef;
          exp_ef = sig(k % 3, good) ^ sig(k % 3, bad);
          checks += 2;
          if (gamma[k] !== bad) begin
            failures++;
            $display("FAIL inst=%0d mu=%02h mask=%02h gamma=%02h expected=%02h", k, mu, mask, gamma[k], bad);
          end
          if (ef[k] !== exp_ef) begin
            failures++;
            $display("FAIL inst=%0d mu=%02h mask=%02h ef=%b expected=%b", k, mu, mask, ef[k], exp_ef);
          end
          if (k < 3 && bad != good) begin
            if ($countones(~mask) == 1) begin
              sbu_eff[k]++;
              if (ef[k] != 0) sbu_det[k]++;
            end else begin
              mbu_eff[k]++;
              if (ef[k] != 0) mbu_det[k]++;
            end
          end
        end
      end
    end
    for (int s = 0; s < 3; s++)
      $display("scheme %0d: effective single-bit faults detected %0d/%0d, multi-bit %0d/%0d",
               s, sbu_det[s], sbu_eff[s], mbu_det[s], mbu_eff[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
