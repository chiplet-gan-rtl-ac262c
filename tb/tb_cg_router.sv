// Self-checking test of the router, two instances at once, each port driven by a testbench
// endpoint:
//   * a corner NoC router (router (0,0) of chiplet (0,0), four local PE ports) with random
//     C-Mesh / mesh settings of the regions;
//   * a NoP router of chiplet tile (1,1) in a 4x4 tile grid.
// Checks: a lone head flit reaches the next buffer 5 cycles after entering (five pipeline
// stages); under random all-to-all load every packet leaves intact on the port given by an
// independent reference of the routing rules, packets of one source and destination stay in
// order, and no credit protocol error is seen.
module tb_cg_router;
  import cg_pkg::*;
  localparam int NPA = 9, NPB = 8, N = 400;
  logic clk = 0, rst_n = 0;
  logic [3:0] region_cmesh = 4'b0000;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  link_t             a_in [NPA], a_out [NPA];
  logic [NUM_VC-1:0] a_inc[NPA], a_outc[NPA], a_vce[NPA];
  link_t             b_in [NPB], b_out [NPB];
  logic [NUM_VC-1:0] b_inc[NPB], b_outc[NPB], b_vce[NPB];
  logic a_idle, b_idle;
  packet_t qa [NPA][$];
  packet_t qb [NPB][$];
  int viol_a [NPA], viol_b [NPB];

  cg_router #(.NP(NPA), .IS_NOP(1'b0)) dut_a (
    .clk, .rst_n, .pos_r(8'd0), .pos_c(8'd0), .node_r(2'd0), .node_c(2'd0), .region_cmesh,
    .in_link(a_in), .in_credit(a_inc), .out_link(a_out), .out_credit(a_outc),
    .vc_empty(a_vce), .idle(a_idle));
  cg_router #(.NP(NPB), .IS_NOP(1'b1)) dut_b (
    .clk, .rst_n, .pos_r(8'd1), .pos_c(8'd1), .node_r(2'd0), .node_c(2'd0), .region_cmesh(4'd0),
    .in_link(b_in), .in_credit(b_inc), .out_link(b_out), .out_credit(b_outc),
    .vc_empty(b_vce), .idle(b_idle));

  for (genvar i = 0; i < NPA; i++) begin : g_a
    cg_tb_host h (.clk, .rst_n, .out_link(a_in[i]), .out_credit(a_inc[i]),
                  .in_link(a_out[i]), .in_credit(a_outc[i]));
    always @(negedge clk) while (qa[i].size() > 0) h.send(qa[i].pop_front());
    always @(negedge clk) viol_a[i] = h.credit_violations;
  end
  for (genvar i = 0; i < NPB; i++) begin : g_b
    cg_tb_host h (.clk, .rst_n, .out_link(b_in[i]), .out_credit(b_inc[i]),
                  .in_link(b_out[i]), .in_credit(b_outc[i]));
    always @(negedge clk) while (qb[i].size() > 0) h.send(qb[i].pop_front());
    always @(negedge clk) viol_b[i] = h.credit_violations;
  end

  // reference: router (0,0) of chiplet (0,0)
  function automatic int exp_a(input node_addr_t d);
    int reg_n;
    if (d.chip_r != 0 || d.chip_c != 0) begin
      if (d.chip_r == 1 && d.chip_c == 0) return P_YP;   // vertical neighbour: column 0, +Y
      return P_XP;                                      // right neighbour or NoP corner (3,3)
    end
    if (d.mem) return (d.node_r == 0 && d.node_c == 0) ? P_MEM : (d.node_c != 0 ? P_XP : P_YP);
    reg_n = (d.node_r >= 2 ? 2 : 0) + (d.node_c >= 2 ? 1 : 0);
    if (region_cmesh[reg_n]) begin
      if (reg_n == 0) return P_LOC + (d.node_r == 1 ? 2 : 0) + (d.node_c == 1 ? 1 : 0);
      return (reg_n == 2) ? P_YP : P_XP;
    end
    if (d.node_r == 0 && d.node_c == 0) return P_LOC;
    return d.node_c != 0 ? P_XP : P_YP;
  endfunction

  // reference: NoP router of tile (1,1)
  function automatic int exp_b(input node_addr_t d);
    if (d.chip_c / 2 > 1) return P_XP;
    if (d.chip_c / 2 < 1) return P_XN;
    if (d.chip_r / 2 > 1) return P_YP;
    if (d.chip_r / 2 < 1) return P_YN;
    return P_CHIPLET + (d.chip_r % 2) * 2 + (d.chip_c % 2);
  endfunction

  function automatic node_addr_t rand_dst_a();
    node_addr_t d;
    d = '0;
    case ($urandom % 6)
      0: begin d.chip_r = 8'($urandom % 4); d.chip_c = 8'($urandom % 4); end
      1: begin d.mem = 1'b1; d.node_r = ($urandom % 2) ? 2'd3 : 2'd0;
               d.node_c = ($urandom % 2) ? 2'd3 : 2'd0; end
      default: ;
    endcase
    d.node_r = d.mem ? d.node_r : 2'($urandom);
    d.node_c = d.mem ? d.node_c : 2'($urandom);
    return d;
  endfunction

  function automatic packet_t mk(input node_addr_t d, input int src, input int seq);
    packet_t p;
    p.hdr = '0;
    p.hdr.dst = d;
    p.hdr.op = OP_WR_ACT;
    p.hdr.a = 32'(seq);
    p.hdr.b = 32'(src);
    for (int w = 0; w < PAYLOAD_WORDS; w++) p.payload[w * 32 +: 32] = $urandom;
    return p;
  endfunction

  // expected packets by id, and the last sequence number per (router, source, destination)
  packet_t exp_pkt [int];
  int      exp_port[int];
  int      last_seq[string];
  int      n_sent = 0, n_got = 0;

  function automatic void got(input int rt, input int port, input packet_t p);
    int id;
    string key;
    id = int'(p.hdr.a);
    key = $sformatf("%0d/%0d/%h", rt, p.hdr.b, p.hdr.dst);
    checks++;
    if (!exp_pkt.exists(id)) begin
      failures++; $display("FAIL unknown packet %0d on router %0d port %0d", id, rt, port);
      return;
    end
    if (p !== exp_pkt[id]) begin failures++; $display("FAIL packet %0d corrupted", id); end
    checks++;
    if (port != exp_port[id]) begin
      failures++;
      $display("FAIL packet %0d on router %0d left on port %0d, expected %0d", id, rt, port, exp_port[id]);
    end
    checks++;
    if (last_seq.exists(key) && last_seq[key] > id) begin
      failures++; $display("FAIL packet %0d overtook %0d (%s)", id, last_seq[key], key);
    end
    last_seq[key] = id;
    exp_pkt.delete(id);
    n_got++;
  endfunction

  // collect delivered packets
  for (genvar i = 0; i < NPA; i++) begin : g_ca
    always @(negedge clk) while (g_a[i].h.rx_count() > 0) got(0, i, g_a[i].h.rx_pop());
  end
  for (genvar i = 0; i < NPB; i++) begin : g_cb
    always @(negedge clk) while (g_b[i].h.rx_count() > 0) got(1, i, g_b[i].h.rx_pop());
  end

  // head flit latency through one router
  int t_in, t_out;
  initial begin
    t_in = -1; t_out = -1;
  end
  always @(posedge clk) begin
    if (t_in < 0 && a_in[P_XP].valid) t_in = int'($time / 10);
    if (t_out < 0 && t_in >= 0 && a_out[P_LOC].valid) t_out = int'($time / 10);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d of %0d packets delivered", n_got, n_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    packet_t p;
    node_addr_t d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // lone packet: +X input -> local port 0
    d = '0;
    p = mk(d, P_XP, n_sent);
    exp_pkt[n_sent] = p; exp_port[n_sent] = exp_a(d); n_sent++;
    qa[P_XP].push_back(p);
    repeat (30) @(negedge clk);
    checks++;
    if (t_out - t_in != 5) begin
      failures++; $display("FAIL head latency %0d cycles, expected 5", t_out - t_in);
    end
    // random traffic in phases with different region topologies
    for (int ph = 0; ph < 4; ph++) begin
      while (!a_idle || !b_idle) @(negedge clk);
      region_cmesh = (ph == 0) ? 4'b1111 : (ph == 1) ? 4'b0000 : 4'($urandom);
      for (int k = 0; k < N / 4; k++) begin
        int s;
        s = $urandom % NPA;
        d = rand_dst_a();
        p = mk(d, s, n_sent);
        exp_pkt[n_sent] = p; exp_port[n_sent] = exp_a(d); n_sent++;
        qa[s].push_back(p);
        s = $urandom % NPB;
        d = '0;
        d.chip_r = 8'($urandom % 8); d.chip_c = 8'($urandom % 8);
        p = mk(d, 100 + s, n_sent);
        exp_pkt[n_sent] = p; exp_port[n_sent] = exp_b(d); n_sent++;
        qb[s].push_back(p);
        if ($urandom % 4 == 0) @(negedge clk);
      end
      while (n_got < n_sent) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (!a_idle || !b_idle) begin failures++; $display("FAIL router not idle at the end"); end
    for (int i = 0; i < NPA; i++) begin
      checks++;
      if (viol_a[i] != 0) begin failures++; $display("FAIL framing on A port %0d", i); end
    end
    for (int i = 0; i < NPB; i++) begin
      checks++;
      if (viol_b[i] != 0) begin failures++; $display("FAIL framing on B port %0d", i); end
    end
    $display("router test: %0d packets", n_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
