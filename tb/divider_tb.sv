// divider_tb: end-to-end test of the restoring divider. At the default
// 4 bits every dividend/divisor pair is divided; at 8 bits 600 random pairs
// and the corners. Results are checked against integer / and % (quotient
// all ones, remainder = dividend for a zero divisor), and every run must
// take exactly WIDTH+2 cycles from the accepting edge to Done.
module divider_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic reset;

  logic       s4, rdy4, dn4;
  logic [3:0] b4, a4, q4, r4;
  logic       s8, rdy8, dn8;
  logic [7:0] b8, a8, q8, r8;

  divider dut4 (
    .clk(clk), .reset(reset), .start(s4), .divisor(b4), .dividend(a4),
    .ready(rdy4), .done(dn4), .quotient(q4), .remainder(r4)
  );
  divider #(.WIDTH(8)) dut8 (
    .clk(clk), .reset(reset), .start(s8), .divisor(b8), .dividend(a8),
    .ready(rdy8), .done(dn8), .quotient(q8), .remainder(r8)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic div4(int b, int a);
    int cyc = 0;
    check("ready before start", int'(rdy4), 1);
    b4 = 4'(b); a4 = 4'(a); s4 = 1'b1;
    @(negedge clk);
    s4 = 1'b0;
    b4 = ~b4; a4 = ~a4;  // operands are only sampled at the start
    cyc = 1;
    while (!dn4 && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("latency w4 %0d/%0d", a, b), cyc, 4 + 2);
    check($sformatf("Q w4 %0d/%0d", a, b), int'(q4), (b == 0) ? 15 : a / b);
    check($sformatf("R w4 %0d/%0d", a, b), int'(r4), (b == 0) ? a : a % b);
    @(negedge clk);
  endtask

  task automatic div8(int b, int a);
    int cyc = 0;
    b8 = 8'(b); a8 = 8'(a); s8 = 1'b1;
    @(negedge clk);
    s8 = 1'b0;
    cyc = 1;
    while (!dn8 && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("latency w8 %0d/%0d", a, b), cyc, 8 + 2);
    check($sformatf("Q w8 %0d/%0d", a, b), int'(q8), (b == 0) ? 255 : a / b);
    check($sformatf("R w8 %0d/%0d", a, b), int'(r8), (b == 0) ? a : a % b);
    @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; s4 = 1'b0; s8 = 1'b0;
    b4 = '0; a4 = '0; b8 = '0; a8 = '0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    // Worked examples: 15 / 2 = 7 r 1, 13 / 2 = 6 r 1, 140 / 9 = 15 r 5.
    div4(2, 15);
    div4(2, 13);
    div8(9, 140);
    for (int b = 0; b < 16; b++)
      for (int a = 0; a < 16; a++)
        div4(b, a);
    div8(255, 255); div8(1, 255); div8(255, 0); div8(0, 77); div8(128, 255);
    repeat (600) div8(int'($urandom_range(255)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
