// bit_counter_tb: runs the bit counter on every 8-bit value and on 300
// random 16-bit values (second instance). The count is checked against the
// number of ones found by a loop over the bits, and the time from the
// accepting edge to Done against (index of the highest one) + 3, or 2 for
// a zero input.
module bit_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic reset;

  logic        s8, rdy8, dn8;
  logic [7:0]  a8;
  logic [3:0]  c8;
  logic        s16, rdy16, dn16;
  logic [15:0] a16;
  logic [4:0]  c16;

  bit_counter dut8 (
    .clk(clk), .reset(reset), .start(s8), .a_in(a8),
    .ready(rdy8), .done(dn8), .count(c8)
  );
  bit_counter #(.WIDTH(16)) dut16 (
    .clk(clk), .reset(reset), .start(s16), .a_in(a16),
    .ready(rdy16), .done(dn16), .count(c16)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int ones(int v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += v[i];
    return n;
  endfunction

  function automatic int exp_latency(int v);
    int top = -1;
    for (int i = 0; i < 32; i++) if (v[i]) top = i;
    return (top < 0) ? 2 : top + 3;
  endfunction

  task automatic count8(int v);
    int cyc;
    check("ready before start", int'(rdy8), 1);
    a8 = 8'(v); s8 = 1'b1;
    @(negedge clk);
    s8 = 1'b0;
    a8 = ~a8;
    cyc = 1;
    while (!dn8 && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("latency w8 %0h", v), cyc, exp_latency(v));
    check($sformatf("count w8 %0h", v), int'(c8), ones(v));
    @(negedge clk);
  endtask

  task automatic count16(int v);
    int cyc;
    a16 = 16'(v); s16 = 1'b1;
    @(negedge clk);
    s16 = 1'b0;
    cyc = 1;
    while (!dn16 && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("latency w16 %0h", v), cyc, exp_latency(v));
    check($sformatf("count w16 %0h", v), int'(c16), ones(v));
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
    reset = 1'b1; s8 = 1'b0; s16 = 1'b0; a8 = '0; a16 = '0;
    @(negedge clk); @(negedge clk);
    reset = 1'b0;
    check("count after reset", int'(c8), 0);
    @(negedge clk);
    for (int v = 0; v < 256; v++) count8(v);
    count16(16'hffff); count16(0); count16(16'h8000);
    repeat (300) count16(int'($urandom_range(16'hffff)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
