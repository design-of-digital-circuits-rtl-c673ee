// asmd_pkg: types shared by the controllers and datapaths of the three
// sequential ASMD circuits (restoring divider, shift-and-add multiplier,
// bit counter).
//
// Each controller drives its datapath through a packed struct of control
// signals, one bit per control signal named in the ASMD charts. The state
// types are enums; their binary encoding is this design's own choice.
package asmd_pkg;

  // Divider controller states (S_idle, S_comp, S_done).
  typedef enum logic [1:0] {
    DIV_S_IDLE = 2'd0,
    DIV_S_COMP = 2'd1,
    DIV_S_DONE = 2'd2
  } div_state_t;

  // Divider control signals.
  typedef struct packed {
    logic load_regs;  // B<-divisor, R<-0, Q<-dividend, P<-n
    logic enable_rq;  // {R,Q} <- {R_nxt, Q_nxt}  (subtract and shift)
    logic finish_rq;  // {R,Q} <- {R_tmp, Q_nxt}  (last subtract, no shift of R)
    logic decr_p;     // P <- P - 1
  } div_ctrl_t;

  // Multiplier controller states (S_idle, S_add, S_shift, S_done).
  typedef enum logic [1:0] {
    MUL_S_IDLE  = 2'd0,
    MUL_S_ADD   = 2'd1,
    MUL_S_SHIFT = 2'd2,
    MUL_S_DONE  = 2'd3
  } mul_state_t;

  // Multiplier control signals.
  typedef struct packed {
    logic load_regs;  // A<-0, C<-0, B<-multiplicand, Q<-multiplier, P<-n
    logic add_regs;   // {C,A} <- A + B
    logic shift_regs; // {C,A,Q} <- {C,A,Q} >> 1
    logic decr_p;     // P <- P - 1
  } mul_ctrl_t;

  // Bit counter states.
  typedef enum logic [1:0] {
    BC_S_IDLE  = 2'd0,
    BC_S_COUNT = 2'd1,
    BC_S_DONE  = 2'd2
  } bc_state_t;

endpackage
