// tb_ascon_perm_ed -- end-to-end, self-checking test of the error-detecting
// ASCON permutation at its default configuration (Logic-I S-boxes, CRC-3
// signatures, 64 S-boxes, up to 12 rounds).
//
// 1. Known answer: p^12 of the Ascon-Hash initial value
//    (x0 = 00400c0000000100, x1..x4 = 0) must give the published
//    precomputed Ascon-Hash state.
// 2. Random states through p^12, p^6 and other round counts, fault free:
//    the result must match the reference model, done must come exactly
//    `rounds` cycles after start and no error may be flagged.
// 3. Fault injection: in one randomly chosen round, one or several S-box
//    output bits are held at 0. The result, the sticky error bit and the
//    flags of the last round must match the reference model.
// 4. A start pulse while busy must be ignored, and the sticky error must be
//    cleared by the next start.
// Each of these events is counted and a failure is counted for any that
// never occurred.
module tb_ascon_perm_ed;
  import ascon_ed_pkg::*;
  import ascon_ref_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n, start, busy, done, error;
  logic [3:0]       rounds;
  state_t           state_in, fault_mask, state_out;
  logic [63:0][2:0] ef_q;
  int               checks = 0, failures = 0;
  int               n_p12 = 0, n_p6 = 0, n_other = 0, n_fault = 0, n_detected = 0;
  int               n_undetected = 0, n_cleared = 0, n_ignored_start = 0;
  state_t           ones;

  always #5 clk = ~clk;

  ascon_perm_ed dut (
    .clk(clk), .rst_n(rst_n), .start(start), .rounds(rounds), .state_in(state_in),
    .fault_mask(fault_mask), .busy(busy), .done(done), .state_out(state_out),
    .ef_q(ef_q), .error(error));

  initial begin
    repeat (200000) @(posedge clk);
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

  // Runs one permutation of n rounds; in round fault_round (0-based, -1 for
  // none) the S-box outputs are masked with fmask. With poke_start a second
  // start with another state is pulsed in the middle of the run.
  task automatic run_perm(state_t s, int n, int fault_round, state_t fmask,
                          bit poke_start, output logic err_out);
    state_t     exp_s;
    logic       exp_err;
    logic [2:0] efs [64];
    logic [2:0] last_efs [64];
    int         cycles;

    exp_s   = s;
    exp_err = 1'b0;
    for (int k = 0; k < n; k++) begin
      exp_s = round_fn(exp_s, 12 - n + k, (k == fault_round) ? fmask : ones, 2, efs);
      for (int j = 0; j < 64; j++) exp_err |= (efs[j] != 0);
      last_efs = efs;
    end

    @(negedge clk);
    start    = 1'b1;
    rounds   = 4'(n);
    state_in = s;
    @(negedge clk);
    start    = 1'b0;
    state_in = ~s;
    check(busy && !done, "busy after start");
    cycles = 0;
    for (int k = 0; k < n; k++) begin
      fault_mask = (k == fault_round) ? fmask : ones;
      if (poke_start && k == n / 2) begin
        start = 1'b1;
        rounds = 4'd1;
        n_ignored_start++;
      end
      @(negedge clk);
      start = 1'b0;
      fault_mask = ones;
      cycles++;
      if (k < n - 1) check(busy && !done, $sformatf("busy, no done in round %0d of %0d", k, n));
    end
    check(done && !busy, $sformatf("done after %0d cycles for %0d rounds", cycles, n));
    check(state_out === exp_s, $sformatf("state %h, expected %h", state_out, exp_s));
    check(error === exp_err, $sformatf("error %b, expected %b", error, exp_err));
    for (int j = 0; j < 64; j++)
      check(ef_q[j] === last_efs[j], $sformatf("last-round flags of S-box %0d", j));
    @(negedge clk);
    check(!done && !busy, "done is a single pulse");
    err_out = error;
  endtask

  initial begin
    state_t s, kat, m;
    logic   e;
    ones       = {5{64'hFFFF_FFFF_FFFF_FFFF}};
    rst_n      = 1'b0;
    start      = 1'b0;
    rounds     = 4'd12;
    state_in   = '0;
    fault_mask = ones;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !done && !error, "idle after reset");

    // 1. Known answer (published Ascon-Hash precomputed initial state).
    s = '0;
    s[0] = 64'h00400c0000000100;
    kat[0] = 64'hee9398aadb67f03d;
    kat[1] = 64'h8bb21831c60f1002;
    kat[2] = 64'hb48a92db98d5da62;
    kat[3] = 64'h43189921b8f8e3e8;
    kat[4] = 64'h348fa5c9d525e140;
    run_perm(s, 12, -1, ones, 1'b0, e);
    check(state_out === kat, $sformatf("Ascon-Hash IV: %h", state_out));
    n_p12++;

    // 2. Fault-free random permutations.
    for (int n = 0; n < 60; n++) begin
      int r;
      for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom};
      r = (n % 3 == 0) ? 12 : (n % 3 == 1) ? 6 : 1 + ($urandom % 12);
      run_perm(s, r, -1, ones, (n % 10 == 5), e);
      if (r == 12) n_p12++; else if (r == 6) n_p6++; else n_other++;
    end

    // 3./4. Fault injection; after a detected fault the next start clears error.
    for (int n = 0; n < 200; n++) begin
      int r, fr, nbits;
      logic had_error;
      for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom};
      r  = (n % 2 == 0) ? 12 : 6;
      fr = $urandom % r;
      m  = ones;
      nbits = (n % 4 == 3) ? 1 + ($urandom % 8) : 1;
      for (int b = 0; b < nbits; b++) begin
        int w, k;
        w = int'($urandom % 5);
        k = int'($urandom % 64);
        m[w][k] = 1'b0;
      end
      run_perm(s, r, fr, m, 1'b0, had_error);
      n_fault++;
      if (had_error) n_detected++; else n_undetected++;
      if (r == 12) n_p12++; else n_p6++;
      if (had_error) begin
        for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom};
        run_perm(s, 6, -1, ones, 1'b0, e);
        n_p6++;
        check(e === 1'b0, "error cleared by the next start");
        if (!e) n_cleared++;
      end
    end

    $display("p^12 runs %0d, p^6 runs %0d, other round counts %0d", n_p12, n_p6, n_other);
    $display("faulty runs %0d: detected %0d, not detected %0d", n_fault, n_detected, n_undetected);
    $display("error cleared by restart %0d, starts ignored while busy %0d", n_cleared, n_ignored_start);
    if (n_p12 == 0)           begin failures++; $display("FAIL no p^12 run"); end
    if (n_p6 == 0)            begin failures++; $display("FAIL no p^6 run"); end
    if (n_detected == 0)      begin failures++; $display("FAIL no fault detected"); end
    if (n_cleared == 0)       begin failures++; $display("FAIL error never cleared"); end
    if (n_ignored_start == 0) begin failures++; $display("FAIL no start while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
