// Self-checking test of the multiplier array, crossbar and accumulation buffer: random
// multiply-accumulate steps at random bases and lane masks against a reference model that
// rounds the product and then the sum to FP32, as the hardware does; plus write and clear.
module tb_cg_mac_array;
  import cg_pkg::*;
  import cg_tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, wr_en = 0;
  logic [31:0] a, b [NUM_LANES], wr_data, rd_data;
  logic [NUM_LANES-1:0] lane_en;
  logic [7:0] base, wr_addr, rd_addr;
  logic [31:0] model [ACC_WORDS];
  int checks = 0, failures = 0, cycles = 0;

  cg_mac_array dut (.*);
  always #5 clk = ~clk;

  task automatic check_all(input string what);
    for (int o = 0; o < ACC_WORDS; o++) begin
      rd_addr = 8'(o); #1;
      checks++;
      if (rd_data !== model[o]) begin
        failures++;
        if (failures < 10) $display("FAIL %s acc[%0d] = %h expected %h", what, o, rd_data, model[o]);
      end
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; base = 0; lane_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int l = 0; l < NUM_LANES; l++) b[l] = 0;
    for (int o = 0; o < ACC_WORDS; o++) model[o] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all("reset");
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      en = 1; a = rand_fp(120, 130); base = 8'($urandom % ACC_WORDS);
      lane_en = 16'($urandom);
      for (int l = 0; l < NUM_LANES; l++) b[l] = rand_fp(120, 130);
      for (int l = 0; l < NUM_LANES; l++)
        if (lane_en[l] && int'(base) + l < ACC_WORDS)
          model[int'(base) + l] = r2fp(fp2r(model[int'(base) + l]) + fp2r(r2fp(fp2r(a) * fp2r(b[l]))));
      @(negedge clk); en = 0;
      if (t % 50 == 0) check_all("mac");
    end
    check_all("mac end");
    // one accumulation step per cycle: 9 consecutive steps on the same elements
    @(negedge clk);
    en = 1; base = 8'd20; lane_en = '1; a = 32'h3f80_0000;
    for (int l = 0; l < NUM_LANES; l++) b[l] = 32'h4000_0000;
    for (int k = 0; k < 9; k++)
      for (int l = 0; l < NUM_LANES; l++) model[20 + l] = r2fp(fp2r(model[20 + l]) + 2.0);
    repeat (9) @(negedge clk);
    en = 0;
    check_all("back-to-back");
    // write port
    @(negedge clk); wr_en = 1; wr_addr = 8'd143; wr_data = 32'h1234_5678; model[143] = wr_data;
    @(negedge clk); wr_en = 0;
    check_all("write");
    // clear
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int o = 0; o < ACC_WORDS; o++) model[o] = 0;
    check_all("clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
