// mul_controller_tb: checks the multiplier controller's states and outputs.
// A P counter (loaded with N, decremented on Decr_P) is modelled in the
// testbench to produce P_zero, and Q[0] is driven with a chosen bit pattern.
// Each cycle the outputs must match the expected phase: idle (Ready;
// Load_regs with Start), then N pairs of an add cycle (Decr_P, Add_regs
// only when Q[0] is 1) and a shift cycle (Shift_regs), then one Done cycle.
module mul_controller_tb;
  import asmd_pkg::*;

  localparam int N = 8;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      reset, start, q0, p_zero;
  mul_ctrl_t ctrl;
  logic      ready, done;
  int        p;

  mul_controller dut (
    .clk(clk), .reset(reset), .start(start), .q0(q0), .p_zero(p_zero),
    .ctrl(ctrl), .ready(ready), .done(done)
  );

  assign p_zero = (p == 0);
  always @(posedge clk) begin
    if (ctrl.load_regs)   p <= N;
    else if (ctrl.decr_p) p <= p - 1;
  end

  task automatic expect_out(string what, logic ld, logic add, logic sh,
                            logic dec, logic rdy, logic dn);
    checks++;
    if ({ctrl.load_regs, ctrl.add_regs, ctrl.shift_regs, ctrl.decr_p, ready, done}
        != {ld, add, sh, dec, rdy, dn}) begin
      failures++;
      $display("FAIL %s: ld=%b add=%b sh=%b dec=%b rdy=%b done=%b", what,
               ctrl.load_regs, ctrl.add_regs, ctrl.shift_regs, ctrl.decr_p, ready, done);
    end
  endtask

  task automatic run(logic [N-1:0] bits, bit noise);
    start = 1'b0;
    #1 expect_out("idle", 0, 0, 0, 0, 1, 0);
    @(negedge clk);
    start = 1'b1;
    #1 expect_out("idle, start", 1, 0, 0, 0, 1, 0);
    @(negedge clk);
    start = noise;
    for (int i = 0; i < N; i++) begin
      q0 = bits[i];
      #1 expect_out($sformatf("add %0d", i), 0, bits[i], 0, 1, 0, 0);
      @(negedge clk);
      q0 = ~bits[i];  // Q[0] is not looked at in the shift state
      #1 expect_out($sformatf("shift %0d", i), 0, 0, 1, 0, 0, 0);
      @(negedge clk);
    end
    #1 expect_out("done", 0, 0, 0, 0, 0, 1);
    @(negedge clk);
    start = 1'b0;
    #1 expect_out("back to idle", 0, 0, 0, 0, 1, 0);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = 0; q0 = 1'b0;
    reset = 1'b1; start = 1'b0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    run(8'b00010111, 1'b0);
    run(8'b10101010, 1'b1);
    run(8'b00000000, 1'b0);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    #1 expect_out("add before reset", 0, q0, 0, 1, 0, 0);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    #1 expect_out("idle after reset", 0, 0, 0, 0, 1, 0);
    run(8'b11111111, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
