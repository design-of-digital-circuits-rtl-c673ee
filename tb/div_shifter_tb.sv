// div_shifter_tb: exhaustive check of the divider's left shifter at 4 bits,
// in both modes. With shift_r high the expected {r_nxt, q_nxt} is
// ({r_tmp, q} * 2 + q_bit) mod 256; with shift_r low r_nxt must equal r_tmp
// while q_nxt is still (q * 2 + q_bit) mod 16. Both are computed with
// integer arithmetic.
module div_shifter_tb;
  int checks = 0, failures = 0;

  logic [3:0] rt, q, rn, qn;
  logic       qb, sh;

  div_shifter dut (.r_tmp(rt), .q(q), .q_bit(qb), .shift_r(sh), .r_nxt(rn), .q_nxt(qn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      int exp;
      rt = 4'(v >> 5); q = 4'(v >> 1); qb = v[0]; sh = v[9];
      if (sh)
        exp = ((((v >> 1) & 8'hff) * 2) + (v & 1)) & 8'hff;
      else
        exp = (((v >> 5) & 4'hf) << 4) | (((((v >> 1) & 4'hf) * 2) + (v & 1)) & 4'hf);
      #1;
      checks++;
      if ({rn, qn} != 8'(exp)) begin
        failures++;
        $display("FAIL r_tmp=%b q=%b q_bit=%b shift_r=%b: got %b_%b expected %b",
                 rt, q, qb, sh, rn, qn, 8'(exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
