// Self-checking test of the FP32 adder: random operands of both signs and of near and far
// exponents against a double precision reference, plus cancellation and special values.
module tb_cg_fp_add;
  import cg_tb_fp_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  cg_fp_add dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] ey);
    a = ta; b = tb_; #1;
    checks++;
    if (y !== ey) begin
      failures++;
      $display("FAIL add %h + %h = %h, expected %h", ta, tb_, y, ey);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] ra, rb;
      ra = rand_fp(); rb = rand_fp();
      check(ra, rb, r2fp(fp2r(ra) + fp2r(rb)));
    end
    for (int i = 0; i < 3000; i++) begin   // close exponents, heavy cancellation
      logic [31:0] ra, rb;
      ra = rand_fp(120, 122); rb = rand_fp(120, 122);
      rb[31] = ~ra[31];
      check(ra, rb, r2fp(fp2r(ra) + fp2r(rb)));
    end
    check(32'h3f80_0000, 32'h3f80_0000, 32'h4000_0000);   // 1 + 1
    check(32'h3f80_0000, 32'hbf80_0000, 32'h0000_0000);   // 1 - 1
    check(32'h3f80_0000, 32'h0000_0000, 32'h3f80_0000);   // 1 + 0
    check(32'h4b80_0000, 32'h3f80_0000, 32'h4b80_0000);   // 2^24 + 1, tie to even
    check(32'h4b80_0000, 32'h4000_0000, 32'h4b80_0001);   // 2^24 + 2
    check(32'h7f80_0000, 32'hff80_0000, 32'h7fc0_0000);   // inf - inf
    check(32'h7f7f_ffff, 32'h7f7f_ffff, 32'h7f80_0000);   // overflow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
