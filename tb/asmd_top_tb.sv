// asmd_top_tb: end-to-end test of the top level at its default widths
// (divider 4 bits, multiplier 8 bits, bit counter 8 bits). Three threads
// drive the three circuits at the same time with random operands and the
// worked examples, and check every result (integer /, %, *, and a count of
// ones) and every latency (n+2, 2n+1, highest-one index + 3).
// It also counts how often each mechanism of the circuits happened and
// counts a failure for any that never did: divider subtract taken and
// skipped, the final subtract without shift, division by zero; multiplier
// add taken and skipped, carry out of the adder; bit counter loop ending
// before all bits were shifted, zero input; and all three circuits busy in
// the same cycle.
module asmd_top_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic reset;

  logic        div_start, div_ready, div_done;
  logic [3:0]  div_divisor, div_dividend, div_quotient, div_remainder;
  logic        mul_start, mul_ready, mul_done;
  logic [7:0]  mul_multiplicand, mul_multiplier;
  logic [15:0] mul_product;
  logic        bc_start, bc_ready, bc_done;
  logic [7:0]  bc_a;
  logic [3:0]  bc_count;

  asmd_top dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Mechanism counters, sampled on every rising edge.
  int n_sub_taken = 0, n_sub_skipped = 0, n_finish = 0, n_div_zero = 0;
  int n_add_taken = 0, n_add_skipped = 0, n_carry = 0;
  int n_bc_early = 0, n_bc_zero = 0, n_all_busy = 0;

  always @(posedge clk) begin
    if (!reset) begin
      if (dut.u_divider.ctrl.decr_p) begin
        if (dut.u_divider.u_dp.q_bit) n_sub_taken++;
        else                          n_sub_skipped++;
      end
      if (dut.u_divider.ctrl.finish_rq) n_finish++;
      if (dut.u_multiplier.ctrl.decr_p) begin
        if (dut.u_multiplier.q0) n_add_taken++;
        else                     n_add_skipped++;
      end
      if (dut.u_multiplier.ctrl.add_regs && dut.u_multiplier.u_dp.sum[8]) n_carry++;
      if (!div_ready && !mul_ready && !bc_ready) n_all_busy++;
    end
  end

  function automatic int ones(int v);
    int n = 0;
    for (int i = 0; i < 8; i++) n += v[i];
    return n;
  endfunction

  task automatic do_div(int b, int a);
    int cyc;
    if (b == 0) n_div_zero++;
    div_divisor = 4'(b); div_dividend = 4'(a); div_start = 1'b1;
    @(negedge clk);
    div_start = 1'b0;
    cyc = 1;
    while (!div_done && cyc < 100) begin @(negedge clk); cyc++; end
    check("div latency", cyc, 4 + 2);
    check($sformatf("quotient %0d/%0d", a, b), int'(div_quotient), (b == 0) ? 15 : a / b);
    check($sformatf("remainder %0d/%0d", a, b), int'(div_remainder), (b == 0) ? a : a % b);
    @(negedge clk);
  endtask

  task automatic do_mul(int a, int b);
    int cyc;
    mul_multiplicand = 8'(a); mul_multiplier = 8'(b); mul_start = 1'b1;
    @(negedge clk);
    mul_start = 1'b0;
    cyc = 1;
    while (!mul_done && cyc < 100) begin @(negedge clk); cyc++; end
    check("mul latency", cyc, 2 * 8 + 1);
    check($sformatf("product %0d*%0d", a, b), int'(mul_product), a * b);
    @(negedge clk);
  endtask

  task automatic do_bc(int v);
    int cyc, top;
    top = -1;
    for (int i = 0; i < 8; i++) if (v[i]) top = i;
    if (v == 0) n_bc_zero++;
    else if (top < 7) n_bc_early++;
    bc_a = 8'(v); bc_start = 1'b1;
    @(negedge clk);
    bc_start = 1'b0;
    cyc = 1;
    while (!bc_done && cyc < 100) begin @(negedge clk); cyc++; end
    check("bc latency", cyc, (top < 0) ? 2 : top + 3);
    check($sformatf("count %0h", v), int'(bc_count), ones(v));
    @(negedge clk);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    div_start = 1'b0; mul_start = 1'b0; bc_start = 1'b0;
    div_divisor = '0; div_dividend = '0; mul_multiplicand = '0;
    mul_multiplier = '0; bc_a = '0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    fork
      begin
        do_div(2, 15);
        do_div(0, 9);
        repeat (400) do_div(int'($urandom_range(15)), int'($urandom_range(15)));
      end
      begin
        do_mul(215, 23);
        repeat (150) do_mul(int'($urandom_range(255)), int'($urandom_range(255)));
      end
      begin
        do_bc(0);
        do_bc(8'hff);
        repeat (300) do_bc(int'($urandom_range(255)));
      end
    join
    $display("mechanisms: sub_taken=%0d sub_skipped=%0d finish=%0d div_by_zero=%0d",
             n_sub_taken, n_sub_skipped, n_finish, n_div_zero);
    $display("mechanisms: add_taken=%0d add_skipped=%0d carry=%0d",
             n_add_taken, n_add_skipped, n_carry);
    $display("mechanisms: bc_early_stop=%0d bc_zero=%0d all_busy=%0d",
             n_bc_early, n_bc_zero, n_all_busy);
    check("divider subtract taken happened",   int'(n_sub_taken > 0), 1);
    check("divider subtract skipped happened", int'(n_sub_skipped > 0), 1);
    check("divider finish step happened",      int'(n_finish > 0), 1);
    check("division by zero happened",         int'(n_div_zero > 0), 1);
    check("multiplier add taken happened",     int'(n_add_taken > 0), 1);
    check("multiplier add skipped happened",   int'(n_add_skipped > 0), 1);
    check("multiplier carry out happened",     int'(n_carry > 0), 1);
    check("bit counter early stop happened",   int'(n_bc_early > 0), 1);
    check("bit counter zero input happened",   int'(n_bc_zero > 0), 1);
    check("all three busy at once happened",   int'(n_all_busy > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
