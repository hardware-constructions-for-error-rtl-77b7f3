// tb_ascon_slayer_ed -- self-checking test of the protected substitution
// layer in three configurations (Logic-I/CRC-3, Logic-II/interleaved,
// LUT/one-bit).
//
// Random states are applied first without faults (no flag may rise) and
// then with random sparse stuck-at-0 masks. The substituted state, all 64
// per-S-box flag groups and the combined error bit are compared with the
// reference model.
module tb_ascon_slayer_ed;
  import ascon_ed_pkg::*;
  import ascon_ref_pkg::*;

  localparam int NCFG = 3;
  localparam sbox_impl_e IMPLS   [NCFG] = '{IMPL_LOGIC_I, IMPL_LOGIC_II, IMPL_LUT};
  localparam int         SCHEMES [NCFG] = '{2, 1, 0};

  logic   clk = 1'b0;
  state_t s_in, mask;
  state_t s_out [NCFG];
  logic [2:0] ef [NCFG][64];
  logic   err [NCFG];
  int     checks = 0, failures = 0, detections = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam ed_scheme_e SCH = ed_scheme_e'(SCHEMES[c]);
    localparam int unsigned W = ef_width(SCH);
    logic [63:0][W-1:0] e;
    ascon_slayer_ed #(.IMPL(IMPLS[c]), .SCHEME(SCH)) dut (
      .s_in(s_in), .fault_mask(mask), .s_out(s_out[c]), .ef(e), .error(err[c]));
    for (genvar j = 0; j < 64; j++) begin : g_j
      assign ef[c][j] = 3'(e[j]);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(state_t s, state_t m);
    s_in = s;
    mask = m;
    @(posedge clk);
    for (int c = 0; c < NCFG; c++) begin
      logic [2:0] efs [64];
      state_t exp_s;
      logic exp_err;
      exp_s = slayer(s, m, SCHEMES[c], efs);
      exp_err = 1'b0;
      checks++;
      if (s_out[c] !== exp_s) begin
        failures++;
        $display("FAIL cfg=%0d state out=%h expected=%h", c, s_out[c], exp_s);
      end
      for (int j = 0; j < 64; j++) begin
        exp_err |= (efs[j] != 0);
        checks++;
        if (ef[c][j] !== efs[j]) begin
          failures++;
          $display("FAIL cfg=%0d sbox %0d ef=%b expected=%b", c, j, ef[c][j], efs[j]);
        end
      end
      checks++;
      if (err[c] !== exp_err) begin
        failures++;
        $display("FAIL cfg=%0d error=%b expected=%b", c, err[c], exp_err);
      end
      if (err[c]) detections++;
    end
  endtask

  initial begin
    state_t ones;
    ones = {5{64'hFFFF_FFFF_FFFF_FFFF}};
    for (int n = 0; n < 100; n++) begin
      state_t s;
      for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom};
      apply(s, ones);
    end
    for (int n = 0; n < 400; n++) begin
      state_t s, m;
      for (int i = 0; i < 5; i++) begin
        s[i] = {$urandom, $urandom};
        // about one bit in 32 held at 0
        m[i] = ~({$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom}
               & {$urandom, $urandom} & {$urandom, $urandom});
      end
      apply(s, m);
    end
    if (detections == 0) begin
      failures++;
      $display("FAIL no injected fault was ever detected");
    end
    $display("layers flagged an error %0d times", detections);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
