// Self-checking test of the network interface, with a testbench endpoint standing in for the
// router: packets from the PE side must arrive intact as head/body/body/tail flit groups;
// packets sent from the router side on the virtual channels of their destinations, with a PE
// that accepts them at random times, must be rebuilt intact and in order per virtual channel.
// Credits must never run out (the endpoint would see a broken packet otherwise).
module tb_cg_ni;
  import cg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_ready, rx_valid, rx_ready = 0, vc_empty, idle;
  packet_t tx_pkt, rx_pkt;
  link_t ni_out, ni_in;
  logic [NUM_VC-1:0] ni_out_credit, ni_in_credit;
  packet_t sent_tx [NUM_VC][$], sent_rx [NUM_VC][$];
  int checks = 0, failures = 0, n_rx = 0;
  localparam int N = 40;

  cg_ni dut (.clk, .rst_n, .tx_valid, .tx_ready, .tx_pkt, .rx_valid, .rx_ready, .rx_pkt,
             .out_link(ni_out), .out_credit(ni_out_credit), .in_link(ni_in),
             .in_credit(ni_in_credit), .vc_empty, .idle);
  cg_tb_host host (.clk, .rst_n, .out_link(ni_in), .out_credit(ni_in_credit),
                   .in_link(ni_out), .in_credit(ni_out_credit));
  always #5 clk = ~clk;

  function automatic packet_t rand_pkt(input int id);
    packet_t p;
    p.hdr = '0;
    p.hdr.op = OP_WR_ACT;
    p.hdr.addr = 8'(id);
    p.hdr.len = 8'd48;
    p.hdr.dst.node_r = 2'($urandom);
    p.hdr.dst.node_c = 2'($urandom);
    for (int w = 0; w < PAYLOAD_WORDS; w++) p.payload[w * 32 +: 32] = $urandom;
    return p;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PE side receiver with random back-pressure
  always @(negedge clk) rx_ready = ($urandom % 3) == 0;
  always @(posedge clk) begin
    if (rx_valid && rx_ready) begin
      packet_t e;
      e = sent_rx[vc_of(rx_pkt.hdr.dst)].pop_front();
      checks++;
      if (rx_pkt !== e) begin failures++; $display("FAIL rx packet %0d differs", n_rx); end
      n_rx++;
    end
  end

  initial begin
    int t0, t1;
    repeat (2) @(negedge clk); rst_n = 1;
    // router -> PE
    for (int i = 0; i < N; i++) begin
      packet_t p;
      p = rand_pkt(i);
      sent_rx[vc_of(p.hdr.dst)].push_back(p);
      host.send(p);
    end
    // PE -> router
    for (int i = 0; i < N; i++) begin
      packet_t p;
      p = rand_pkt(100 + i);
      @(negedge clk);
      tx_pkt = p; tx_valid = 1;
      while (!tx_ready) @(negedge clk);
      sent_tx[vc_of(p.hdr.dst)].push_back(p);
      if (i == 0) t0 = $time;
      @(negedge clk); tx_valid = 0;
    end
    while (host.rx_count() < N) @(negedge clk);
    t1 = $time;
    while (n_rx < N) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      packet_t got;
      got = host.rx_pop();
      checks++;
      if (got !== sent_tx[vc_of(got.hdr.dst)].pop_front()) begin failures++; $display("FAIL tx packet %0d differs", i); end
    end
    checks++;
    if (host.credit_violations != 0) begin failures++; $display("FAIL packet framing"); end
    // with credits returned at once, a packet leaves every 4-5 cycles
    checks++;
    if ((t1 - t0) / 10 > N * 6) begin failures++; $display("FAIL tx too slow: %0d cycles", (t1 - t0) / 10); end
    repeat (10) @(negedge clk);
    checks++;
    if (!idle || !vc_empty) begin failures++; $display("FAIL interface not idle at the end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
