// div_shifter: one-bit left shifter of the restoring divider.
//
// Purely combinational. It treats {R_tmp, Q} as one 2*WIDTH-bit register
// and shifts it left by one with the new quotient bit entering at the
// bottom: r_nxt = {r_tmp[WIDTH-2:0], q[WIDTH-1]}, q_nxt = {q[WIDTH-2:0],
// q_bit}. Moving the dividend (and quotient) left stands in for moving the
// divisor right; the lower half, Q, holds the remaining dividend bits at
// the top and the quotient bits collected so far at the bottom. This
// follows the divider's datapath as specified.
//
// With shift_r low the R half is not shifted (r_nxt = r_tmp) while Q still
// takes q_nxt: that is the last step of a division (Finish_RQ), which
// leaves the remainder in R. Putting this select inside the shifter, so
// that R and Q are always loaded from it, is this design's choice.
//
// The top bit of r_tmp is shifted out and dropped. It is always 0 when
// the shift happens: before the k-th shift R holds only k-1 dividend bits,
// so r_tmp < 2**(WIDTH-1). Lint reports that bit as unused.
//
// Interface: r_tmp, q in (WIDTH bits), q_bit, shift_r in; r_nxt, q_nxt out.
// Timing: no clock.
module div_shifter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] r_tmp,
  input  logic [WIDTH-1:0] q,
  input  logic             q_bit,
  input  logic             shift_r,
  output logic [WIDTH-1:0] r_nxt,
  output logic [WIDTH-1:0] q_nxt
);

  always_comb begin
    r_nxt = shift_r ? {r_tmp[WIDTH-2:0], q[WIDTH-1]} : r_tmp;
    q_nxt = {q[WIDTH-2:0], q_bit};
  end

endmodule
