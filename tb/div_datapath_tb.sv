// div_datapath_tb: drives the divider datapath's control signals directly,
// in the order the divider's controller issues them, and checks:
//  * the worked example 15 / 2 register by register: after load and each
//    Enable_RQ, R = 0001 0011 0011 0011 and Q = 1110 1100 1001 0011, and
//    after Finish_RQ R = 0001, Q = 0111;
//  * that P_zero rises after exactly WIDTH decrements;
//  * all 256 4-bit operand pairs against integer / and %, with quotient
//    all ones and remainder = dividend for a zero divisor.
module div_datapath_tb;
  import asmd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  div_ctrl_t  ctrl;
  logic [3:0] divisor, dividend, quotient, remainder;
  logic       p_zero;

  div_datapath dut (
    .clk(clk), .ctrl(ctrl), .divisor(divisor), .dividend(dividend),
    .quotient(quotient), .remainder(remainder), .p_zero(p_zero)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic step(logic ld, logic en, logic fin, logic dec);
    ctrl = '{load_regs: ld, enable_rq: en, finish_rq: fin, decr_p: dec};
    @(posedge clk);
    #1;
    ctrl = '0;
  endtask

  // One whole division: load, WIDTH enables, one finish.
  task automatic divide(int b, int a);
    divisor = 4'(b); dividend = 4'(a);
    step(1, 0, 0, 0);
    for (int i = 0; i < 4; i++) begin
      check("p_zero while counting", int'(p_zero), 0);
      step(0, 1, 0, 1);
    end
    check("p_zero at the end", int'(p_zero), 1);
    step(0, 0, 1, 1);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_r[4] = '{1, 3, 3, 3};
    int exp_q[4] = '{4'b1110, 4'b1100, 4'b1001, 4'b0011};
    ctrl = '0;
    @(negedge clk);

    // Worked example: 15 / 2.
    divisor = 4'd2; dividend = 4'd15;
    step(1, 0, 0, 0);
    check("load R", int'(remainder), 0);
    check("load Q", int'(quotient), 15);
    for (int i = 0; i < 4; i++) begin
      check("P_zero before last", int'(p_zero), 0);
      step(0, 1, 0, 1);
      check($sformatf("example R step %0d", i), int'(remainder), exp_r[i]);
      check($sformatf("example Q step %0d", i), int'(quotient), exp_q[i]);
    end
    check("P_zero after 4 decrements", int'(p_zero), 1);
    step(0, 0, 1, 1);
    check("example final R", int'(remainder), 1);
    check("example final Q", int'(quotient), 7);

    // Registers hold with no control asserted.
    step(0, 0, 0, 0);
    check("hold R", int'(remainder), 1);
    check("hold Q", int'(quotient), 7);

    for (int b = 0; b < 16; b++) begin
      for (int a = 0; a < 16; a++) begin
        divide(b, a);
        check($sformatf("Q %0d/%0d", a, b), int'(quotient),  (b == 0) ? 15 : a / b);
        check($sformatf("R %0d/%0d", a, b), int'(remainder), (b == 0) ? a  : a % b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
