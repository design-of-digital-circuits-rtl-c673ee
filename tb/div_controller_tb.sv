// div_controller_tb: checks the divider controller's states and output
// equations. A P counter is modelled in the testbench (loaded with N on
// Load_regs, decremented on Decr_P) and feeds P_zero back, so whole runs
// are exercised. Each cycle the outputs are checked against the expected
// phase of the run: idle (Ready), N+1 compute cycles (Decr_P; Enable_RQ for
// the first N, Finish_RQ for the last), one Done cycle. Start pulses during
// compute and done must be ignored, and reset must return to idle.
module div_controller_tb;
  import asmd_pkg::*;

  localparam int N = 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      reset, start, p_zero;
  div_ctrl_t ctrl;
  logic      ready, done;
  int        p;

  div_controller dut (
    .clk(clk), .reset(reset), .start(start), .p_zero(p_zero),
    .ctrl(ctrl), .ready(ready), .done(done)
  );

  // Testbench model of the P counter.
  assign p_zero = (p == 0);
  always @(posedge clk) begin
    if (ctrl.load_regs)   p <= N;
    else if (ctrl.decr_p) p <= p - 1;
  end

  task automatic expect_out(string what, logic ld, logic en, logic fin,
                            logic dec, logic rdy, logic dn);
    checks++;
    if ({ctrl.load_regs, ctrl.enable_rq, ctrl.finish_rq, ctrl.decr_p, ready, done}
        != {ld, en, fin, dec, rdy, dn}) begin
      failures++;
      $display("FAIL %s: ld=%b en=%b fin=%b dec=%b rdy=%b done=%b", what,
               ctrl.load_regs, ctrl.enable_rq, ctrl.finish_rq, ctrl.decr_p, ready, done);
    end
  endtask

  // One run from idle; 'noise' raises start during compute and done.
  task automatic run(bit noise);
    start = 1'b0;
    #1 expect_out("idle, no start", 0, 0, 0, 0, 1, 0);
    @(negedge clk);
    #1 expect_out("idle, no start (stays)", 0, 0, 0, 0, 1, 0);
    start = 1'b1;
    #1 expect_out("idle, start", 1, 0, 0, 0, 1, 0);
    @(negedge clk);
    start = noise;
    for (int i = 0; i < N; i++) begin
      #1 expect_out($sformatf("compute %0d", i), 0, 1, 0, 1, 0, 0);
      @(negedge clk);
    end
    #1 expect_out("compute last", 0, 0, 1, 1, 0, 0);
    @(negedge clk);
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
    p = 0;
    reset = 1'b1; start = 1'b0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    run(1'b0);
    @(negedge clk);
    run(1'b1);
    // Reset in the middle of a run.
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    #1 expect_out("compute before reset", 0, 1, 0, 1, 0, 0);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    #1 expect_out("idle after reset", 0, 0, 0, 0, 1, 0);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
