// asmd_top: the three sequential ASMD circuits side by side.
//
// A restoring divider (DIV_WIDTH-bit dividend and divisor), a shift-and-add
// multiplier (MUL_WIDTH x MUL_WIDTH) and a bit counter (BC_WIDTH bits) are
// independent designs. They share only the clock and the synchronous,
// active-high reset; each has its own start, ready, done, operands and
// result, named with a div_, mul_ or bc_ prefix. Default widths: 4 for the
// divider and 8 for the multiplier, as in their worked examples; 8 for the
// bit counter, which is this design's choice.
//
// Timing per circuit (n = its width): divider done n+2 cycles after start
// is accepted, multiplier 2n+1 cycles, bit counter (index of highest one)+3.
module asmd_top #(
  parameter int unsigned DIV_WIDTH = 4,
  parameter int unsigned MUL_WIDTH = 8,
  parameter int unsigned BC_WIDTH  = 8
) (
  input  logic                         clk,
  input  logic                         reset,
  // divider
  input  logic                         div_start,
  input  logic [DIV_WIDTH-1:0]         div_divisor,
  input  logic [DIV_WIDTH-1:0]         div_dividend,
  output logic                         div_ready,
  output logic                         div_done,
  output logic [DIV_WIDTH-1:0]         div_quotient,
  output logic [DIV_WIDTH-1:0]         div_remainder,
  // multiplier
  input  logic                         mul_start,
  input  logic [MUL_WIDTH-1:0]         mul_multiplicand,
  input  logic [MUL_WIDTH-1:0]         mul_multiplier,
  output logic                         mul_ready,
  output logic                         mul_done,
  output logic [2*MUL_WIDTH-1:0]       mul_product,
  // bit counter
  input  logic                         bc_start,
  input  logic [BC_WIDTH-1:0]          bc_a,
  output logic                         bc_ready,
  output logic                         bc_done,
  output logic [$clog2(BC_WIDTH+1)-1:0] bc_count
);

  divider #(.WIDTH(DIV_WIDTH)) u_divider (
    .clk       (clk),
    .reset     (reset),
    .start     (div_start),
    .divisor   (div_divisor),
    .dividend  (div_dividend),
    .ready     (div_ready),
    .done      (div_done),
    .quotient  (div_quotient),
    .remainder (div_remainder)
  );

  seq_multiplier #(.WIDTH(MUL_WIDTH)) u_multiplier (
    .clk          (clk),
    .reset        (reset),
    .start        (mul_start),
    .multiplicand (mul_multiplicand),
    .multiplier   (mul_multiplier),
    .ready        (mul_ready),
    .done         (mul_done),
    .product      (mul_product)
  );

  bit_counter #(.WIDTH(BC_WIDTH)) u_bit_counter (
    .clk   (clk),
    .reset (reset),
    .start (bc_start),
    .a_in  (bc_a),
    .ready (bc_ready),
    .done  (bc_done),
    .count (bc_count)
  );

endmodule
