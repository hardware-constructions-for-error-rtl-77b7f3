// tb_ascon_fault_coverage -- stuck-at-0 fault-injection campaign on the
// protected substitution layer, one layer per signature scheme (Logic-I
// style).
//
// 10,000 random layer inputs are applied; each time every one of the 64
// S-boxes receives its own fault, so 640,000 faults are injected per
// scheme and fault type. Single-bit faults (SBU) hold one random output bit
// of the S-box at 0; multiple-bit faults (MBU) hold a random set of two to
// five output bits at 0, by AND masking. Every flag is compared with the
// reference model, and the coverage is printed both over all injected
// faults and over the faults that actually changed the S-box output (a
// stuck-at-0 on a bit that is already 0 has no effect).
module tb_ascon_fault_coverage;
  import ascon_ed_pkg::*;
  import ascon_ref_pkg::*;

  localparam int NVEC = 10000;

  logic   clk = 1'b0;
  state_t s_in, mask;
  state_t s_out [3];
  logic [2:0] ef [3][64];
  logic   err [3];
  int     checks = 0, failures = 0;
  longint injected [2], effective [2][3], detected [2][3];

  always #5 clk = ~clk;

  for (genvar c = 0; c < 3; c++) begin : g_scheme
    localparam ed_scheme_e SCH = ed_scheme_e'(c);
    localparam int unsigned W = ef_width(SCH);
    logic [63:0][W-1:0] e;
    ascon_slayer_ed #(.IMPL(IMPL_LOGIC_I), .SCHEME(SCH)) dut (
      .s_in(s_in), .fault_mask(mask), .s_out(s_out[c]), .ef(e), .error(err[c]));
    for (genvar j = 0; j < 64; j++) begin : g_j
      assign ef[c][j] = 3'(e[j]);
    end
  end

  initial begin
    repeat (2 * NVEC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++) begin
      injected[t] = 0;
      for (int c = 0; c < 3; c++) begin effective[t][c] = 0; detected[t][c] = 0; end
    end
    for (int t = 0; t < 2; t++) begin
      for (int v = 0; v < NVEC; v++) begin
        state_t s, m;
        for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom};
        m = {5{64'hFFFF_FFFF_FFFF_FFFF}};
        for (int j = 0; j < 64; j++) begin
          if (t == 0) begin
            int w;
            w = int'($urandom % 5);
            m[w][j] = 1'b0;
          end
          else begin
            logic [4:0] bits;
            do bits = 5'($urandom); while ($countones(bits) < 2);
            for (int i = 0; i < 5; i++) if (bits[i]) m[i][j] = 1'b0;
          end
        end
        s_in = s;
        mask = m;
        @(posedge clk);
        injected[t] += 64;
        for (int c = 0; c < 3; c++) begin
          logic [2:0] efs [64];
          state_t exp_s;
          exp_s = slayer(s, m, c, efs);
          checks++;
          if (s_out[c] !== exp_s) begin
            failures++;
            $display("FAIL scheme %0d output", c);
          end
          for (int j = 0; j < 64; j++) begin
            logic [4:0] x;
            x = {s[0][j], s[1][j], s[2][j], s[3][j], s[4][j]};
            checks++;
            if (ef[c][j] !== efs[j]) begin
              failures++;
              $display("FAIL scheme %0d sbox %0d ef=%b expected=%b", c, j, ef[c][j], efs[j]);
            end
            if ((sbox_tab(x) & {m[0][j], m[1][j], m[2][j], m[3][j], m[4][j]}) != sbox_tab(x))
              effective[t][c]++;
            if (ef[c][j] != 0) detected[t][c]++;
          end
        end
      end
    end
    for (int t = 0; t < 2; t++)
      for (int c = 0; c < 3; c++)
        $display("%s scheme %0d: injected %0d, changed the output %0d, detected %0d (%0.3f%% of effective)",
                 t == 0 ? "SBU" : "MBU", c, injected[t], effective[t][c], detected[t][c],
                 100.0 * real'(detected[t][c]) / real'(effective[t][c]));
    for (int c = 0; c < 3; c++)
      if (detected[0][c] == 0 || detected[1][c] == 0) begin
        failures++;
        $display("FAIL scheme %0d detected nothing", c);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
