// mul_datapath: registers, adder and counter of the shift-and-add multiplier.
//
// Registers: B (multiplicand), the carry flip-flop C, A (partial sum) and Q
// (multiplier), with {C, A, Q} forming one 2*WIDTH+1-bit shift register,
// and the down counter P of ceil(log2(WIDTH+1)) bits. On each clock edge:
//   load_regs  : C <- 0, A <- 0, B <- multiplicand, Q <- multiplier, P <- n
//   add_regs   : {C, A} <- A + B                (WIDTH+1-bit sum)
//   shift_regs : {C, A, Q} <- {C, A, Q} >> 1    (0 enters C)
//   decr_p     : P <- P - 1
// q0 (Q[0]) and p_zero (P == 0) go to the controller. The product is
// {A, Q}; C is zero once the last shift is done. Register layout and
// operations follow the multiplier's figure and ASMD chart; the registers
// have no reset since they are loaded before use. load_regs has priority
// over the other operations; add_regs and shift_regs are never high
// together (add has priority if they were; an assertion checks that at
// most one of load_regs, add_regs and shift_regs is high).
//
// Interface: clk; ctrl (mul_ctrl_t); multiplicand, multiplier in; product,
// q0, p_zero out. Timing: all registers update on the rising edge.
module mul_datapath
  import asmd_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic               clk,
  input  mul_ctrl_t          ctrl,
  input  logic [WIDTH-1:0]   multiplicand,
  input  logic [WIDTH-1:0]   multiplier,
  output logic [2*WIDTH-1:0] product,
  output logic               q0,
  output logic               p_zero
);

  localparam int unsigned PW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] b_reg, a_reg, q_reg;
  logic             c_reg;
  logic [PW-1:0]    p_reg;
  logic [WIDTH:0]   sum;

  assign sum = {1'b0, a_reg} + {1'b0, b_reg};

  always_ff @(posedge clk) begin
    if (ctrl.load_regs) begin
      c_reg <= 1'b0;
      a_reg <= '0;
      b_reg <= multiplicand;
      q_reg <= multiplier;
      p_reg <= PW'(WIDTH);
    end else begin
      if (ctrl.decr_p) p_reg <= p_reg - 1'b1;
      if (ctrl.add_regs)
        {c_reg, a_reg} <= sum;
      else if (ctrl.shift_regs)
        {c_reg, a_reg, q_reg} <= {1'b0, c_reg, a_reg, q_reg[WIDTH-1:1]};
    end
  end

  // The controller issues at most one register operation on C, A and Q.
  a_one_caq_op: assert property (@(posedge clk)
    $onehot0({ctrl.load_regs, ctrl.add_regs, ctrl.shift_regs}))
    else $error("mul_datapath: load_regs, add_regs and shift_regs overlap");

  assign product = {a_reg, q_reg};
  assign q0      = q_reg[0];
  assign p_zero  = (p_reg == '0);

endmodule
