// bit_counter: sequential population count of a WIDTH-bit value.
//
// Runs the loop "B = 0; while A != 0: if A[0] then B = B + 1; A = A >> 1"
// one iteration per clock. The algorithm is the given one; its ASMD is
// this design's own, in the same style as the divider:
//   S_idle  : ready. On start, A <- a_in and B <- 0, go to S_count.
//   S_count : if A != 0, B <- B + A[0] and A <- A >> 1, stay;
//             if A == 0, go to S_done.
//   S_done  : done for one cycle, then back to S_idle.
// Controller and datapath share this module. Reset is synchronous, active
// high, and clears B so that count reads zero before the first run.
//
// Interface: clk, reset, start, a_in (WIDTH bits) in; ready, done, count
// (ceil(log2(WIDTH+1)) bits) out; count holds until the next start.
// Timing: with k the index of the highest 1 in a_in, S_count lasts k+2
// cycles (1 cycle for a_in == 0), so done is high k+3 cycles (2 for zero)
// after the edge that accepted start.
module bit_counter
  import asmd_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic                         clk,
  input  logic                         reset,
  input  logic                         start,
  input  logic [WIDTH-1:0]             a_in,
  output logic                         ready,
  output logic                         done,
  output logic [$clog2(WIDTH+1)-1:0]   count
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  bc_state_t        state, state_nxt;
  logic [WIDTH-1:0] a_reg;
  logic [CW-1:0]    b_reg;
  logic             a_zero;
  logic             load_regs, step_regs;

  assign a_zero = (a_reg == '0);

  // Controller.
  always_ff @(posedge clk) begin
    if (reset) state <= BC_S_IDLE;
    else       state <= state_nxt;
  end

  always_comb begin
    state_nxt = state;
    unique case (state)
      BC_S_IDLE:  if (start)  state_nxt = BC_S_COUNT;
      BC_S_COUNT: if (a_zero) state_nxt = BC_S_DONE;
      BC_S_DONE:              state_nxt = BC_S_IDLE;
      default:                state_nxt = BC_S_IDLE;
    endcase
  end

  assign load_regs = (state == BC_S_IDLE) && start;
  assign step_regs = (state == BC_S_COUNT) && !a_zero;
  assign ready     = (state == BC_S_IDLE);
  assign done      = (state == BC_S_DONE);

  // Datapath.
  always_ff @(posedge clk) begin
    if (reset) begin
      b_reg <= '0;
    end else if (load_regs) begin
      a_reg <= a_in;
      b_reg <= '0;
    end else if (step_regs) begin
      a_reg <= a_reg >> 1;
      b_reg <= b_reg + CW'(a_reg[0]);
    end
  end

  assign count = b_reg;

endmodule
