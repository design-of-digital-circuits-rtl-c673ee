// div_cmp_sub: compare-and-subtract stage of the restoring divider.
//
// Purely combinational. It compares the dividend window R with the divisor
// B and returns {r_tmp, q_bit} = {R - B, 1} when R >= B and {R, 0}
// otherwise, i.e. one step of restoring long division: the subtraction is
// kept only when it does not go negative. The function is the one given for
// the divider; writing it as one magnitude comparator plus one subtractor
// and a 2:1 mux is this design's choice.
//
// Interface: r, b in (WIDTH bits); r_tmp out (WIDTH bits), q_bit out.
// Timing: no clock, result valid one combinational delay after r/b.
module div_cmp_sub #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] r,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] r_tmp,
  output logic             q_bit
);

  always_comb begin
    q_bit = (r >= b);
    r_tmp = q_bit ? (r - b) : r;
  end

endmodule
