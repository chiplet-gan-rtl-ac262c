// Self-checking test of the regional topology controller: no decision before all four PEs
// end their layer; a class that keeps the topology releases the PEs at once; a change of
// topology waits for the drained network, counting stall cycles, then flips mode and
// releases the PEs; the class decision (C-Mesh unless all four ask for matrix multiplication).
module tb_cg_topo_ctrl;
  import cg_pkg::*;
  logic clk = 0, rst_n = 0, drained = 0, ack;
  logic [3:0] layer_end_req = 0;
  comm_class_e layer_end_class [4];
  topo_e mode, mode_next;
  logic [15:0] switches, stalls;
  int checks = 0, failures = 0;

  cg_topo_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // raise the requests, wait for ack, drop them; returns cycles to ack
  task automatic layer_end(input comm_class_e c0, input comm_class_e c1, input int drain_after,
                           output int cycles);
    @(negedge clk);
    layer_end_class[0] = c0; layer_end_class[1] = c1;
    layer_end_class[2] = c1; layer_end_class[3] = c1;
    layer_end_req = 4'b1111;
    cycles = 0;
    while (!ack) begin
      @(negedge clk);
      cycles++;
      drained = (cycles >= drain_after);
      if (cycles > 100) break;
    end
    layer_end_req = 0;
    drained = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int i = 0; i < 4; i++) layer_end_class[i] = CC_LOAD;
    repeat (2) @(negedge clk); rst_n = 1;
    expect_true("reset in C-Mesh", mode == TOPO_CMESH);
    // three of four PEs done: nothing happens
    @(negedge clk); layer_end_req = 4'b0111;
    for (int i = 0; i < 5; i++) @(negedge clk);
    expect_true("no ack before all PEs", !ack && mode == TOPO_CMESH);
    layer_end_req = 0;
    // same topology (reduction keeps C-Mesh): immediate release
    layer_end(CC_REDUCE, CC_REDUCE, 0, cyc);
    expect_true("same topology released in 1 cycle", cyc == 1 && mode == TOPO_CMESH);
    // matrix multiplication: to mesh, wait 6 cycles for the drain
    layer_end(CC_MATMUL, CC_MATMUL, 6, cyc);
    expect_true("switch waits for drain", cyc == 7);
    expect_true("mode mesh", mode == TOPO_MESH);
    expect_true("one switch counted", switches == 1);
    expect_true("stall cycles counted", stalls == 5);
    // one PE asks for a reduction: C-Mesh wins
    layer_end(CC_MATMUL, CC_RESHAPE, 1, cyc);
    expect_true("mixed classes give C-Mesh", mode == TOPO_CMESH && switches == 2);
    layer_end(CC_MATMUL, CC_MATMUL, 1, cyc);
    expect_true("back to mesh", mode == TOPO_MESH && switches == 3);
    layer_end(CC_CHIPLET, CC_CHIPLET, 3, cyc);
    expect_true("chiplet traffic gives C-Mesh", mode == TOPO_CMESH && switches == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
