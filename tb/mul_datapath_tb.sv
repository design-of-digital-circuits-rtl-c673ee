// mul_datapath_tb: drives the multiplier datapath's control signals in the
// order the controller issues them and checks:
//  * the worked example 11010111 x 00010111 step by step: A after each add
//    and {A, Q} after each shift (A = 11010111, then 01101011/10001011,
//    A = 01000010 with carry, then 10100001/01000101, A = 01111000 with
//    carry, then 10111100/00100010), and the final product 215*23 = 4945;
//  * that P_zero rises after exactly WIDTH decrements;
//  * 3000 random operand pairs and the corners against integer a*b.
module mul_datapath_tb;
  import asmd_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  mul_ctrl_t   ctrl;
  logic [7:0]  mcand, mplier;
  logic [15:0] product;
  logic        q0, p_zero;

  mul_datapath dut (
    .clk(clk), .ctrl(ctrl), .multiplicand(mcand), .multiplier(mplier),
    .product(product), .q0(q0), .p_zero(p_zero)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic step(logic ld, logic add, logic sh, logic dec);
    ctrl = '{load_regs: ld, add_regs: add, shift_regs: sh, decr_p: dec};
    @(posedge clk);
    #1;
    ctrl = '0;
  endtask

  task automatic multiply(int a, int b);
    mcand = 8'(a); mplier = 8'(b);
    step(1, 0, 0, 0);
    for (int i = 0; i < 8; i++) begin
      check("p_zero while counting", int'(p_zero), 0);
      step(0, q0, 0, 1);
      step(0, 0, 1, 0);
    end
    check("p_zero at the end", int'(p_zero), 1);
    check($sformatf("product %0d*%0d", a, b), int'(product), a * b);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_add_a[3]   = '{8'b11010111, 8'b01000010, 8'b01111000};
    int exp_shift_aq[3] = '{16'b01101011_10001011, 16'b10100001_01000101,
                            16'b10111100_00100010};
    ctrl = '0;
    @(negedge clk);
    mcand = 8'b11010111; mplier = 8'b00010111;
    step(1, 0, 0, 0);
    check("load A,Q", int'(product), 16'b00000000_00010111);
    for (int i = 0; i < 3; i++) begin
      check("example Q[0]", int'(q0), 1);
      step(0, 1, 0, 1);
      check($sformatf("example add %0d A", i), int'(product[15:8]), exp_add_a[i]);
      step(0, 0, 1, 0);
      check($sformatf("example shift %0d AQ", i), int'(product), exp_shift_aq[i]);
    end
    for (int i = 3; i < 8; i++) begin
      check("p_zero before last", int'(p_zero), 0);
      step(0, q0, 0, 1);
      step(0, 0, 1, 0);
    end
    check("p_zero after 8", int'(p_zero), 1);
    check("example product", int'(product), 215 * 23);
    step(0, 0, 0, 0);
    check("hold", int'(product), 215 * 23);

    multiply(255, 255); multiply(0, 255); multiply(255, 0); multiply(1, 1);
    multiply(128, 255);
    repeat (3000) multiply(int'($urandom_range(255)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
