// Self-checking test of the activation computation unit against reference models: ReLU,
// normalisation, statistics (with clear and with partial statistics added from another PE),
// nearest-neighbour and zero-insertion up-sampling, and transpose. Also checks that each
// command takes one cycle per element plus one.
module tb_cg_act_unit;
  import cg_pkg::*;
  import cg_tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, zero_ins = 0, clear_stats = 0, stat_add = 0;
  opcode_e op;
  logic [7:0] src, dst, m, n, f, acc_raddr, act_waddr;
  logic [31:0] a, b, acc_rdata, act_wdata, stat_add_sum, stat_add_sq, stat_sum, stat_sq;
  logic act_we, busy, done;
  logic [31:0] accm [256];
  logic [31:0] actm [256];
  logic [31:0] expm [256];
  int checks = 0, failures = 0;

  cg_act_unit dut (.*);
  always #5 clk = ~clk;
  assign acc_rdata = accm[acc_raddr];
  always @(posedge clk) if (act_we) actm[act_waddr] <= act_wdata;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic run(input opcode_e o, input int s, input int d, input int mm, input int nn,
                     input int ff, input bit zi, input bit clr, input int elements);
    int cyc;
    @(negedge clk);
    op = o; src = 8'(s); dst = 8'(d); m = 8'(mm); n = 8'(nn); f = 8'(ff); zero_ins = zi;
    clear_stats = clr; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != elements + 1) begin
      failures++;
      $display("FAIL %s took %0d cycles, expected %0d", o.name(), cyc, elements + 1);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_RELU; src = 0; dst = 0; m = 0; n = 0; f = 0; a = 0; b = 0;
    stat_add_sum = 0; stat_add_sq = 0;
    for (int i = 0; i < 256; i++) begin
      accm[i] = rand_fp(120, 130);
      if ($urandom % 2) accm[i][31] = 1'b1;
      actm[i] = 0;
    end
    repeat (2) @(negedge clk); rst_n = 1;

    // ReLU of 40 elements
    run(OP_RELU, 10, 100, 40, 0, 0, 0, 0, 40);
    for (int i = 0; i < 40; i++) expect_eq("relu", actm[100 + i], accm[10 + i][31] ? 32'd0 : accm[10 + i]);

    // normalisation (x - a) * b
    a = 32'h3fc0_0000; b = 32'h4040_0000;   // 1.5, 3.0
    run(OP_NORM, 0, 50, 30, 0, 0, 0, 0, 30);
    for (int i = 0; i < 30; i++)
      expect_eq("norm", actm[50 + i], r2fp(fp2r(r2fp(fp2r(accm[i]) - 1.5)) * 3.0));

    // statistics over 20 elements, then a partial pair from another PE
    begin
      logic [31:0] s, q;
      s = 0; q = 0;
      for (int i = 0; i < 20; i++) begin
        s = r2fp(fp2r(s) + fp2r(accm[30 + i]));
        q = r2fp(fp2r(q) + fp2r(r2fp(fp2r(accm[30 + i]) * fp2r(accm[30 + i]))));
      end
      run(OP_STATS, 30, 0, 20, 0, 0, 0, 1, 20);
      expect_eq("stat sum", stat_sum, s);
      expect_eq("stat sq", stat_sq, q);
      @(negedge clk);
      stat_add = 1; stat_add_sum = 32'h4000_0000; stat_add_sq = 32'h4080_0000;
      @(negedge clk); stat_add = 0;
      expect_eq("stat reduce sum", stat_sum, r2fp(fp2r(s) + 2.0));
      expect_eq("stat reduce sq", stat_sq, r2fp(fp2r(q) + 4.0));
    end

    // nearest-neighbour up-sampling of a 3x4 input by 2 -> 6x8
    run(OP_UPSAMPLE, 60, 0, 3, 4, 2, 0, 0, 48);
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 8; c++)
        expect_eq("upsample nn", actm[r * 8 + c], accm[60 + (r / 2) * 4 + c / 2]);
    // zero insertion of a 2x3 input by 3 -> 6x9
    run(OP_UPSAMPLE, 70, 100, 2, 3, 3, 1, 0, 54);
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 9; c++)
        expect_eq("upsample zero", actm[100 + r * 9 + c],
                  (r % 3 == 0 && c % 3 == 0) ? accm[70 + (r / 3) * 3 + c / 3] : 32'd0);

    // transpose of a 5x7 matrix
    run(OP_RESHAPE, 80, 160, 5, 7, 0, 0, 0, 35);
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 7; c++)
        expect_eq("reshape", actm[160 + c * 5 + r], accm[80 + r * 7 + c]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
