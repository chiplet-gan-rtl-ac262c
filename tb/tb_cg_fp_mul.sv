// Self-checking test of the FP32 multiplier: random normal operands against a double
// precision reference, plus zero, infinity, NaN, overflow and underflow cases.
module tb_cg_fp_mul;
  import cg_tb_fp_pkg::*;
  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  cg_fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] ey);
    a = ta; b = tb_; #1;
    checks++;
    if (y !== ey) begin
      failures++;
      $display("FAIL mul %h * %h = %h, expected %h", ta, tb_, y, ey);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] ra, rb;
      ra = rand_fp(); rb = rand_fp();
      check(ra, rb, r2fp(fp2r(ra) * fp2r(rb)));
    end
    check(32'h3f80_0000, 32'h4000_0000, 32'h4000_0000);   // 1 * 2
    check(32'hbfc0_0000, 32'h4040_0000, 32'hc090_0000);   // -1.5 * 3 = -4.5
    check(32'h0000_0000, 32'h4040_0000, 32'h0000_0000);   // 0 * 3
    check(32'h7f80_0000, 32'h4040_0000, 32'h7f80_0000);   // inf * 3
    check(32'h7f80_0000, 32'h0000_0000, 32'h7fc0_0000);   // inf * 0
    check(32'h7f00_0000, 32'h7f00_0000, 32'h7f80_0000);   // overflow
    check(32'h0080_0000, 32'h0080_0000, 32'h0000_0000);   // underflow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
