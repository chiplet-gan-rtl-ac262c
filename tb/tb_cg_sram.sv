// Self-checking test of the PE SRAM: random writes against a reference array, read back
// through four read ports, out-of-range addresses read as zero.
module tb_cg_sram;
  localparam int WORDS = 244;
  logic clk = 0, we;
  logic [7:0] waddr, raddr [4];
  logic [31:0] wdata, rdata [4];
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  cg_sram #(.WORDS(WORDS), .NRD(4)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 4; i++) raddr[i] = 0;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = $urandom; ref_mem[a] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1;
      waddr = 8'($urandom % WORDS); wdata = $urandom;
      if (we) ref_mem[waddr] = wdata;
      for (int i = 0; i < 4; i++) raddr[i] = 8'($urandom % WORDS);
      #1;
      for (int i = 0; i < 4; i++) begin
        // a write to the same address lands at the next edge; reads see the old word
        checks++;
        if (rdata[i] !== ((we && waddr == raddr[i]) ? rdata[i] : ref_mem[raddr[i]])) begin
          failures++;
          $display("FAIL port %0d addr %0d: %h expected %h", i, raddr[i], rdata[i], ref_mem[raddr[i]]);
        end
      end
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < WORDS; a++) begin
      raddr[0] = 8'(a); #1; checks++;
      if (rdata[0] !== ref_mem[a]) begin failures++; $display("FAIL final %0d", a); end
    end
    raddr[1] = 8'd250; #1; checks++;
    if (rdata[1] !== 32'd0) begin failures++; $display("FAIL out of range read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
