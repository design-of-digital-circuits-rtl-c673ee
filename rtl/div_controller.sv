// div_controller: ASMD controller of the restoring divider.
//
// Three states, as in the divider's ASMD chart:
//   S_idle : Ready. On Start, assert Load_regs and go to S_comp.
//   S_comp : Decr_P every cycle. While P_zero is low assert Enable_RQ and
//            stay; when P_zero is high assert Finish_RQ and go to S_done.
//   S_done : Done for one cycle, then back to S_idle.
// Output equations (Load_regs = S_idle*Start, Enable_RQ = S_comp*!P_zero,
// Finish_RQ = S_comp*P_zero, Decr_P = S_comp, Ready = S_idle,
// Done = S_done) are the specified ones. Reset is synchronous and active
// high, a choice of this design.
//
// Interface: clk, reset, start, p_zero in; ctrl (div_ctrl_t), ready, done
// out. Timing: with P loaded with n, S_comp lasts n+1 cycles, so done rises
// n+2 cycles after the edge that accepted start.
module div_controller
  import asmd_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  logic      start,
  input  logic      p_zero,
  output div_ctrl_t ctrl,
  output logic      ready,
  output logic      done
);

  div_state_t state, state_nxt;

  always_ff @(posedge clk) begin
    if (reset) state <= DIV_S_IDLE;
    else       state <= state_nxt;
  end

  always_comb begin
    state_nxt = state;
    unique case (state)
      DIV_S_IDLE: if (start)  state_nxt = DIV_S_COMP;
      DIV_S_COMP: if (p_zero) state_nxt = DIV_S_DONE;
      DIV_S_DONE:             state_nxt = DIV_S_IDLE;
      default:                state_nxt = DIV_S_IDLE;
    endcase
  end

  always_comb begin
    ctrl.load_regs = (state == DIV_S_IDLE) && start;
    ctrl.enable_rq = (state == DIV_S_COMP) && !p_zero;
    ctrl.finish_rq = (state == DIV_S_COMP) && p_zero;
    ctrl.decr_p    = (state == DIV_S_COMP);
    ready          = (state == DIV_S_IDLE);
    done           = (state == DIV_S_DONE);
  end

endmodule
