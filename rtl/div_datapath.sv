// div_datapath: registers and counter of the restoring divider.
//
// Holds the divisor B, the 2*WIDTH-bit register split into the dividend
// window R (upper half, ends as the remainder) and Q (lower half, starts as
// the dividend and ends as the quotient), and the down counter P of
// ceil(log2(WIDTH+1)) bits. The combinational path is div_cmp_sub followed
// by div_shifter, whose R half shifts only for enable_rq. On each clock
// edge:
//   load_regs : B <- divisor, R <- 0, Q <- dividend, P <- WIDTH
//   enable_rq : R <- R_nxt, Q <- Q_nxt      (compare/subtract, then shift)
//   finish_rq : R <- R_tmp, Q <- Q_nxt      (last compare/subtract; R is
//                                            not shifted so it ends as the
//                                            remainder)
//   decr_p    : P <- P - 1
// p_zero reports P == 0 to the controller. These operations follow the
// divider's ASMD chart. The registers have no reset: they are always loaded
// before they are used. If load_regs and decr_p were both high, load wins
// (the controller never does this; an assertion checks that load_regs,
// enable_rq and finish_rq are never high together).
//
// Interface: clk; ctrl (div_ctrl_t); divisor, dividend in; quotient,
// remainder, p_zero out. Timing: all registers update on the rising edge.
module div_datapath
  import asmd_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  div_ctrl_t        ctrl,
  input  logic [WIDTH-1:0] divisor,
  input  logic [WIDTH-1:0] dividend,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             p_zero
);

  localparam int unsigned PW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] b_reg, r_reg, q_reg;
  logic [PW-1:0]    p_reg;
  logic [WIDTH-1:0] r_tmp, r_nxt, q_nxt;
  logic             q_bit;

  div_cmp_sub #(.WIDTH(WIDTH)) u_cmp_sub (
    .r     (r_reg),
    .b     (b_reg),
    .r_tmp (r_tmp),
    .q_bit (q_bit)
  );

  div_shifter #(.WIDTH(WIDTH)) u_shifter (
    .r_tmp   (r_tmp),
    .q       (q_reg),
    .q_bit   (q_bit),
    .shift_r (ctrl.enable_rq),
    .r_nxt   (r_nxt),
    .q_nxt   (q_nxt)
  );

  always_ff @(posedge clk) begin
    if (ctrl.load_regs) begin
      b_reg <= divisor;
      r_reg <= '0;
      q_reg <= dividend;
      p_reg <= PW'(WIDTH);
    end else begin
      if (ctrl.decr_p)    p_reg <= p_reg - 1'b1;
      if (ctrl.enable_rq || ctrl.finish_rq) begin
        r_reg <= r_nxt;
        q_reg <= q_nxt;
      end
    end
  end

  // The controller issues at most one register operation on R and Q.
  a_one_rq_op: assert property (@(posedge clk)
    $onehot0({ctrl.load_regs, ctrl.enable_rq, ctrl.finish_rq}))
    else $error("div_datapath: load_regs, enable_rq and finish_rq overlap");

  assign p_zero    = (p_reg == '0);
  assign quotient  = q_reg;
  assign remainder = r_reg;

endmodule
