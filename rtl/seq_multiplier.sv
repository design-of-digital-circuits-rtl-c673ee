// seq_multiplier: sequential shift-and-add unsigned multiplier (n x n -> 2n).
//
// The multiplier is loaded into Q and the partial sum A (with its carry C)
// is cleared. For each of the n multiplier bits the circuit spends one
// cycle adding the multiplicand B into {C, A} when Q[0] is 1, and one cycle
// shifting {C, A, Q} right by one, so the used multiplier bit falls out of
// Q while the low product bits move in from A. After n pairs {A, Q} is the
// product. Controller (mul_controller) and datapath (mul_datapath) are
// split as in the multiplier's ASMD chart.
//
// Interface: clk, reset (synchronous), start; multiplicand, multiplier
// (WIDTH bits); ready, done (one-cycle pulse); product (2*WIDTH bits,
// held until the next start).
// Timing: done is high 2n+1 cycles after the edge at which start was seen
// with ready high.
module seq_multiplier
  import asmd_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               start,
  input  logic [WIDTH-1:0]   multiplicand,
  input  logic [WIDTH-1:0]   multiplier,
  output logic               ready,
  output logic               done,
  output logic [2*WIDTH-1:0] product
);

  mul_ctrl_t ctrl;
  logic      q0, p_zero;

  mul_controller u_ctrl (
    .clk    (clk),
    .reset  (reset),
    .start  (start),
    .q0     (q0),
    .p_zero (p_zero),
    .ctrl   (ctrl),
    .ready  (ready),
    .done   (done)
  );

  mul_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk          (clk),
    .ctrl         (ctrl),
    .multiplicand (multiplicand),
    .multiplier   (multiplier),
    .product      (product),
    .q0           (q0),
    .p_zero       (p_zero)
  );

endmodule
