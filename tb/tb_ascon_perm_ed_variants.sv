// tb_ascon_perm_ed_variants -- runs the error-detecting permutation in all
// nine combinations of S-box style (Logic-I, Logic-II, LUT) and signature
// scheme (one-bit, interleaved, CRC-3) side by side on the same stimulus.
//
// All nine must reproduce the Ascon-Hash known answer, agree with the
// reference model on random p^12 and p^6 runs, and, with stuck-at-0 faults
// injected in one round, flag exactly what the reference model predicts for
// their scheme. Detections are counted per scheme; a scheme that never
// detects a fault counts as a failure.
module tb_ascon_perm_ed_variants;
  import ascon_ed_pkg::*;
  import ascon_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n, start;
  logic [3:0] rounds;
  state_t     state_in, fault_mask, ones;
  logic       busy [9], done [9], error [9];
  state_t     state_out [9];
  logic [63:0][2:0] ef_q [9];
  int         checks = 0, failures = 0;
  int         detected [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  for (genvar i = 0; i < 3; i++) begin : g_impl
    for (genvar s = 0; s < 3; s++) begin : g_scheme
      localparam ed_scheme_e SCH = ed_scheme_e'(s);
      localparam int unsigned W = ef_width(SCH);
      logic [63:0][W-1:0] e;
      ascon_perm_ed #(.IMPL(sbox_impl_e'(i)), .SCHEME(SCH)) dut (
        .clk(clk), .rst_n(rst_n), .start(start), .rounds(rounds), .state_in(state_in),
        .fault_mask(fault_mask), .busy(busy[3*i+s]), .done(done[3*i+s]),
        .state_out(state_out[3*i+s]), .ef_q(e), .error(error[3*i+s]));
      for (genvar j = 0; j < 64; j++) begin : g_j
        assign ef_q[3*i+s][j] = 3'(e[j]);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_perm(state_t s, int n, int fault_round, state_t fmask);
    state_t     exp_s [3];
    logic       exp_err [3];
    logic [2:0] efs [64];
    logic [2:0] last_efs [3][64];
    for (int sc = 0; sc < 3; sc++) begin
      exp_s[sc]   = s;
      exp_err[sc] = 1'b0;
      for (int k = 0; k < n; k++) begin
        exp_s[sc] = round_fn(exp_s[sc], 12 - n + k, (k == fault_round) ? fmask : ones, sc, efs);
        for (int j = 0; j < 64; j++) exp_err[sc] |= (efs[j] != 0);
        last_efs[sc] = efs;
      end
    end
    @(negedge clk);
    start = 1'b1; rounds = 4'(n); state_in = s;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < n; k++) begin
      fault_mask = (k == fault_round) ? fmask : ones;
      @(negedge clk);
      fault_mask = ones;
    end
    for (int d = 0; d < 9; d++) begin
      int sc = d % 3;
      check(done[d] && !busy[d], $sformatf("inst %0d done after %0d cycles", d, n));
      check(state_out[d] === exp_s[sc], $sformatf("inst %0d state", d));
      check(error[d] === exp_err[sc], $sformatf("inst %0d error %b expected %b", d, error[d], exp_err[sc]));
      for (int j = 0; j < 64; j++)
        check(ef_q[d][j] === last_efs[sc][j], $sformatf("inst %0d flags of S-box %0d", d, j));
      if (d < 3 && error[d]) detected[sc]++;
    end
  endtask

  initial begin
    state_t s, m;
    ones = {5{64'hFFFF_FFFF_FFFF_FFFF}};
    rst_n = 1'b0; start = 1'b0; rounds = 4'd12; state_in = '0; fault_mask = ones;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    s = '0;
    s[0] = 64'h00400c0000000100;
    run_perm(s, 12, -1, ones);
    for (int d = 0; d < 9; d++)
      check(state_out[d] === {64'h348fa5c9d525e140, 64'h43189921b8f8e3e8, 64'hb48a92db98d5da62,
                              64'h8bb21831c60f1002, 64'hee9398aadb67f03d},
            $sformatf("inst %0d Ascon-Hash known answer", d));

    for (int n = 0; n < 120; n++) begin
      int r;
      for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom};
      r = (n % 2 == 0) ? 12 : 6;
      m = ones;
      if (n >= 20)
        for (int b = 0; b < 1 + (n % 3); b++) begin
        int w, k;
        w = int'($urandom % 5);
        k = int'($urandom % 64);
        m[w][k] = 1'b0;
      end
      run_perm(s, r, (n >= 20) ? int'($urandom % r) : -1, m);
    end
    for (int sc = 0; sc < 3; sc++) begin
      $display("scheme %0d detected a fault in %0d of 100 faulty runs", sc, detected[sc]);
      if (detected[sc] == 0) begin failures++; $display("FAIL scheme %0d never detected", sc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
