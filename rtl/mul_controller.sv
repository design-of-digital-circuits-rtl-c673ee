// mul_controller: ASMD controller of the shift-and-add multiplier.
//
// Four states, as in the multiplier's ASMD chart:
//   S_idle  : Ready. On Start, assert Load_regs and go to S_add.
//   S_add   : Decr_P; if Q[0] is 1 also Add_regs. Go to S_shift.
//   S_shift : Shift_regs. Back to S_add while P_zero is low, to S_done
//             when it is high.
//   S_done  : Done for one cycle, then back to S_idle.
// Decr_P sits in S_add so that S_shift tests the already decremented P and
// exactly n add/shift pairs run. Reset is synchronous and active high, a
// choice of this design.
//
// Interface: clk, reset, start, q0, p_zero in; ctrl (mul_ctrl_t), ready,
// done out. Timing: with P loaded with n, done is high 2n+1 cycles after
// the edge that accepted start.
module mul_controller
  import asmd_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  logic      start,
  input  logic      q0,
  input  logic      p_zero,
  output mul_ctrl_t ctrl,
  output logic      ready,
  output logic      done
);

  mul_state_t state, state_nxt;

  always_ff @(posedge clk) begin
    if (reset) state <= MUL_S_IDLE;
    else       state <= state_nxt;
  end

  always_comb begin
    state_nxt = state;
    unique case (state)
      MUL_S_IDLE:  if (start) state_nxt = MUL_S_ADD;
      MUL_S_ADD:              state_nxt = MUL_S_SHIFT;
      MUL_S_SHIFT: state_nxt = p_zero ? MUL_S_DONE : MUL_S_ADD;
      MUL_S_DONE:             state_nxt = MUL_S_IDLE;
      default:                state_nxt = MUL_S_IDLE;
    endcase
  end

  always_comb begin
    ctrl.load_regs  = (state == MUL_S_IDLE) && start;
    ctrl.decr_p     = (state == MUL_S_ADD);
    ctrl.add_regs   = (state == MUL_S_ADD) && q0;
    ctrl.shift_regs = (state == MUL_S_SHIFT);
    ready           = (state == MUL_S_IDLE);
    done            = (state == MUL_S_DONE);
  end

endmodule
