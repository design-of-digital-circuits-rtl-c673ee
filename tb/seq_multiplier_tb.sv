// seq_multiplier_tb: end-to-end test of the shift-and-add multiplier at the
// default 8 bits (worked example 215 x 23, corners, 3000 random pairs) and
// at 4 bits (all 256 pairs). Products are checked against integer a*b and
// every run must take exactly 2*WIDTH+1 cycles from the accepting edge to
// Done.
module seq_multiplier_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic reset;

  logic        s8, rdy8, dn8;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic        s4, rdy4, dn4;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;

  seq_multiplier dut8 (
    .clk(clk), .reset(reset), .start(s8), .multiplicand(a8), .multiplier(b8),
    .ready(rdy8), .done(dn8), .product(p8)
  );
  seq_multiplier #(.WIDTH(4)) dut4 (
    .clk(clk), .reset(reset), .start(s4), .multiplicand(a4), .multiplier(b4),
    .ready(rdy4), .done(dn4), .product(p4)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic mul8(int a, int b);
    int cyc;
    check("ready before start", int'(rdy8), 1);
    a8 = 8'(a); b8 = 8'(b); s8 = 1'b1;
    @(negedge clk);
    s8 = 1'b0;
    a8 = ~a8; b8 = ~b8;
    cyc = 1;
    while (!dn8 && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("latency w8 %0d*%0d", a, b), cyc, 2 * 8 + 1);
    check($sformatf("product w8 %0d*%0d", a, b), int'(p8), a * b);
    @(negedge clk);
  endtask

  task automatic mul4(int a, int b);
    int cyc;
    a4 = 4'(a); b4 = 4'(b); s4 = 1'b1;
    @(negedge clk);
    s4 = 1'b0;
    cyc = 1;
    while (!dn4 && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("latency w4 %0d*%0d", a, b), cyc, 2 * 4 + 1);
    check($sformatf("product w4 %0d*%0d", a, b), int'(p4), a * b);
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; s8 = 1'b0; s4 = 1'b0;
    a8 = '0; b8 = '0; a4 = '0; b4 = '0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    mul8(8'b11010111, 8'b00010111);
    mul8(255, 255); mul8(0, 200); mul8(200, 0); mul8(1, 255); mul8(128, 128);
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        mul4(a, b);
    repeat (3000) mul8(int'($urandom_range(255)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
