// divider: sequential restoring long-division circuit (n-bit / n-bit).
//
// The dividend is loaded into the lower half Q of a 2n-bit register whose
// upper half R starts at zero. Each compute cycle compares R with the
// divisor B, subtracts when R >= B, records the comparison as a quotient
// bit and shifts {R, Q} left by one, pulling the next dividend bit into R
// and the quotient bit into Q. The last compute cycle subtracts without
// shifting R, leaving the remainder in R and the quotient in Q. This is the
// divider's specified control/datapath split: div_controller (ASMD) and
// div_datapath (registers, compare-and-subtract, shifter, counter P).
//
// Interface: clk, reset (synchronous), start; divisor, dividend (WIDTH
// bits); ready (idle, start accepted), done (one-cycle pulse); quotient,
// remainder (held until the next start).
// Timing: done is high n+2 cycles after the edge at which start was seen
// with ready high (n+1 compute cycles, then S_done). For a zero divisor the
// quotient is all ones and the remainder is the dividend, as the algorithm
// gives.
module divider
  import asmd_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [WIDTH-1:0] divisor,
  input  logic [WIDTH-1:0] dividend,
  output logic             ready,
  output logic             done,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder
);

  div_ctrl_t ctrl;
  logic      p_zero;

  div_controller u_ctrl (
    .clk    (clk),
    .reset  (reset),
    .start  (start),
    .p_zero (p_zero),
    .ctrl   (ctrl),
    .ready  (ready),
    .done   (done)
  );

  div_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk       (clk),
    .ctrl      (ctrl),
    .divisor   (divisor),
    .dividend  (dividend),
    .quotient  (quotient),
    .remainder (remainder),
    .p_zero    (p_zero)
  );

endmodule
