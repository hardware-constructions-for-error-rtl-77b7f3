// tb_ascon_round_ed -- self-checking test of one protected ASCON round
// (default configuration: Logic-I S-boxes, CRC-3 check).
//
// For each of the 12 round constants, random states are applied without
// and with random stuck-at-0 faults on the S-box outputs; the new state,
// the 64 flag groups and the error bit are compared with the reference
// round (constant addition, table S-box, rotations).
module tb_ascon_round_ed;
  import ascon_ed_pkg::*;
  import ascon_ref_pkg::*;

  logic       clk = 1'b0;
  state_t     s_in, mask, s_out;
  logic [3:0] rc_idx;
  logic [63:0][2:0] ef;
  logic       err;
  int         checks = 0, failures = 0, detections = 0;

  always #5 clk = ~clk;

  ascon_round_ed dut (.s_in(s_in), .rc_idx(rc_idx), .fault_mask(mask),
                      .s_out(s_out), .ef(ef), .error(err));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 12; r++) begin
      for (int n = 0; n < 40; n++) begin
        state_t s, m, exp_s;
        logic [2:0] efs [64];
        logic exp_err;
        for (int i = 0; i < 5; i++) begin
          s[i] = {$urandom, $urandom};
          m[i] = (n < 20) ? '1 : ~({$urandom, $urandom} & {$urandom, $urandom}
                                   & {$urandom, $urandom} & {$urandom, $urandom});
        end
        s_in = s; mask = m; rc_idx = 4'(r);
        exp_err = 1'b0;
        @(posedge clk);
        exp_s = round_fn(s, r, m, 2, efs);
        checks++;
        if (s_out !== exp_s) begin
          failures++;
          $display("FAIL r=%0d out=%h expected=%h", r, s_out, exp_s);
        end
        for (int j = 0; j < 64; j++) begin
          exp_err |= (efs[j] != 0);
          checks++;
          if (ef[j] !== efs[j]) begin
            failures++;
            $display("FAIL r=%0d sbox %0d ef=%b expected=%b", r, j, ef[j], efs[j]);
          end
        end
        checks++;
        if (err !== exp_err) begin
          failures++;
          $display("FAIL r=%0d error=%b expected=%b", r, err, exp_err);
        end
        if (err) detections++;
      end
    end
    if (detections == 0) begin
      failures++;
      $display("FAIL no injected fault was ever detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
