// tb_ascon_linear_layer -- self-checking test of the ASCON linear layer.
//
// Applies every single-bit state (320 unit vectors, which fixes each
// rotation distance) and 200 random states, comparing the output with the
// reference model's bit-indexed rotations.
module tb_ascon_linear_layer;
  import ascon_ref_pkg::*;

  logic   clk = 1'b0;
  state_t s_in, s_out;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  ascon_linear_layer dut (.s_in(s_in), .s_out(s_out));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(state_t s);
    state_t exp_s;
    s_in = s;
    @(posedge clk);
    exp_s = linear(s);
    checks++;
    if (s_out !== exp_s) begin
      failures++;
      $display("FAIL in=%h out=%h expected=%h", s, s_out, exp_s);
    end
  endtask

  initial begin
    for (int i = 0; i < 5; i++)
      for (int b = 0; b < 64; b++) begin
        state_t s = '0;
        s[i][b] = 1'b1;
        check_one(s);
      end
    for (int n = 0; n < 200; n++) begin
      state_t s;
      for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom};
      check_one(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
