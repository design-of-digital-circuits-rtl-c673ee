// div_cmp_sub_tb: exhaustive check of the divider's compare-and-subtract
// stage at 4 bits and random check at 8 bits. Expected values come from
// integer arithmetic: q_bit = (r >= b), r_tmp = q_bit ? r - b : r.
module div_cmp_sub_tb;
  int checks = 0, failures = 0;

  logic [3:0] r4, b4, rt4;
  logic       q4;
  logic [7:0] r8, b8, rt8;
  logic       q8;

  div_cmp_sub dut4 (.r(r4), .b(b4), .r_tmp(rt4), .q_bit(q4));
  div_cmp_sub #(.WIDTH(8)) dut8 (.r(r8), .b(b8), .r_tmp(rt8), .q_bit(q8));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      for (int b = 0; b < 16; b++) begin
        r4 = 4'(r); b4 = 4'(b);
        #1;
        check($sformatf("q_bit r=%0d b=%0d", r, b), int'(q4), (r >= b) ? 1 : 0);
        check($sformatf("r_tmp r=%0d b=%0d", r, b), int'(rt4), (r >= b) ? r - b : r);
      end
    end
    repeat (500) begin
      int r, b;
      r = int'($urandom_range(255)); b = int'($urandom_range(255));
      r8 = 8'(r); b8 = 8'(b);
      #1;
      check("q_bit w8", int'(q8), (r >= b) ? 1 : 0);
      check("r_tmp w8", int'(rt8), (r >= b) ? r - b : r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
