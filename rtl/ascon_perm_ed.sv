// ascon_perm_ed -- round-iterative ASCON permutation with concurrent error
// detection in all 64 S-boxes.
//
// A 320-bit state register is fed back through one combinational round
// (ascon_round_ed) per clock, so a permutation of n rounds (n = 12 for
// p^a, 6 for p^b in ASCON-128) takes n cycles. Every round the 64
// protected S-boxes each deliver EFW error flags; the flags of the round
// just computed are registered in ef_q and ORed into the sticky error
// output, which is cleared when the next permutation starts. The checks
// cover the S-box layer only: a fault that corrupts an S-box input is not
// detected.
//
// Interface and timing:
//   start/rounds/state_in  sampled when start is high and busy is low;
//                          rounds (1..12) picks the last n round constants,
//                          a value outside 1..12 runs all 12 rounds.
//   busy                   high while rounds are being applied.
//   done                   one-cycle pulse, `rounds` cycles after start;
//                          state_out then holds the result, error the OR
//                          of all flags of this permutation.
//   fault_mask             fault-injection hook, state layout; a 0 holds the
//                          matching S-box output bit at 0 in the round being
//                          computed. All ones in normal operation.
// Reset (rst_n, active low, synchronous) clears the control and flag
// registers; the state register is not reset.
//
// The permutation, its 12-round length and the 64 flags per round follow
// the error-detection scheme; computing one round per clock, the handshake,
// the reset and the sticky error bit are choices of this implementation.
module ascon_perm_ed
  import ascon_ed_pkg::*;
#(
  parameter sbox_impl_e  IMPL   = IMPL_LOGIC_I,
  parameter ed_scheme_e  SCHEME = SCHEME_CRC3,
  localparam int unsigned EFW   = ef_width(SCHEME)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  logic [3:0]                      rounds,
  input  state_t                          state_in,
  input  state_t                          fault_mask,
  output logic                            busy,
  output logic                            done,
  output state_t                          state_out,
  output logic [NUM_SBOXES-1:0][EFW-1:0]  ef_q,
  output logic                            error
);
  typedef enum logic {ST_IDLE, ST_RUN} ctrl_state_e;

  ctrl_state_e                         ctrl_q;
  state_t                              state_q, state_next;
  logic [3:0]                          rc_q;
  logic [NUM_SBOXES-1:0][EFW-1:0]      ef_round;
  logic                                err_round;
  logic [3:0]                          first_rc;

  ascon_round_ed #(.IMPL(IMPL), .SCHEME(SCHEME)) u_round (
    .s_in(state_q), .rc_idx(rc_q), .fault_mask(fault_mask),
    .s_out(state_next), .ef(ef_round), .error(err_round)
  );

  always_comb
    first_rc = (rounds >= 4'd1 && rounds <= 4'd12) ? 4'd12 - rounds : 4'd0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl_q <= ST_IDLE;
      rc_q   <= '0;
      done   <= 1'b0;
      ef_q   <= '0;
      error  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (ctrl_q)
        ST_IDLE: if (start) begin
          state_q <= state_in;
          rc_q    <= first_rc;
          ef_q    <= '0;
          error   <= 1'b0;
          ctrl_q  <= ST_RUN;
        end
        ST_RUN: begin
          state_q <= state_next;
          ef_q    <= ef_round;
          error   <= error | err_round;
          rc_q    <= rc_q + 4'd1;
          if (rc_q == 4'(MAX_ROUNDS - 1)) begin
            done   <= 1'b1;
            ctrl_q <= ST_IDLE;
          end
        end
        default: ctrl_q <= ST_IDLE;
      endcase
    end
  end

  assign busy      = (ctrl_q == ST_RUN);
  assign state_out = state_q;

  // A new permutation may only be requested with a round count in 1..12.
  always_ff @(posedge clk)
    if (rst_n && start && !busy)
      assert (rounds >= 4'd1 && rounds <= 4'd12)
        else $error("ascon_perm_ed: rounds=%0d outside 1..12", rounds);
endmodule
