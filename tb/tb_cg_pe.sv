// Self-checking test of the processing element, driven at its network-interface side with
// command packets and checked against a reference model of every command:
//   * SRAM and accumulation buffer writes, read back with OP_SEND;
//   * a 3 x 5 by 5 x 20 matrix multiplication, cleared and then accumulated a second time,
//     with the expected cycle count M * ceil(P/16) * N;
//   * ReLU, normalisation, statistics with a reduction (OP_STAT_ACC, OP_SEND_STAT),
//     nearest-neighbour and zero-insertion up-sampling, reshape (transpose);
//   * the layer-end handshake with the topology controller.
// The reference rounds every multiply and add to FP32 in the order the hardware uses.
module tb_cg_pe;
  import cg_pkg::*;
  import cg_tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 0, layer_end_req, layer_end_ack = 0, busy;
  packet_t rx_pkt, tx_pkt;
  comm_class_e layer_end_class;
  node_addr_t me;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cg_pe dut (.clk, .rst_n, .my_addr(me), .rx_valid, .rx_ready, .rx_pkt, .tx_valid, .tx_ready,
             .tx_pkt, .layer_end_req, .layer_end_class, .layer_end_ack, .busy);

  // reference state
  logic [31:0] act [256], wgt [256], acc [256];
  logic [31:0] ssum, ssq;

  function automatic logic [31:0] fmul(input logic [31:0] a, b); return r2fp(fp2r(a) * fp2r(b)); endfunction
  function automatic logic [31:0] fadd(input logic [31:0] a, b); return r2fp(fp2r(a) + fp2r(b)); endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random back-pressure on the PE output
  always @(negedge clk) tx_ready = ($urandom % 2) == 0;

  packet_t got_q[$];
  always @(posedge clk) if (tx_valid && tx_ready) got_q.push_back(tx_pkt);

  function automatic header_t hdr(input opcode_e op);
    header_t h;
    h = '0;
    h.op = op;
    h.dst = me;
    return h;
  endfunction

  // hand one command to the PE and wait until it has finished; returns the busy cycles
  task automatic cmd(input header_t h, input logic [PAYLOAD_WORDS*WORD_W-1:0] pl, output int cycles);
    @(negedge clk);
    while (!rx_ready) @(negedge clk);
    rx_pkt.hdr = h; rx_pkt.payload = pl; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    cycles = 0;
    while (busy) begin cycles++; @(negedge clk); end
  endtask

  task automatic cmd0(input header_t h, input logic [PAYLOAD_WORDS*WORD_W-1:0] pl);
    int c;
    cmd(h, pl, c);
  endtask

  // write n words of a reference memory (0 act, 1 wgt, 2 acc) from base on
  task automatic write_mem(input int which, input int base, input int n);
    int done_w;
    done_w = 0;
    while (done_w < n) begin
      header_t h;
      logic [PAYLOAD_WORDS*WORD_W-1:0] pl;
      int len;
      len = (n - done_w > PAYLOAD_WORDS) ? PAYLOAD_WORDS : n - done_w;
      h = hdr(which == 0 ? OP_WR_ACT : which == 1 ? OP_WR_WGT : OP_WR_ACC);
      h.addr = 8'(base + done_w);
      h.len = 8'(len);
      pl = '0;
      for (int w = 0; w < len; w++) pl[w * 32 +: 32] =
        which == 0 ? act[base + done_w + w] : which == 1 ? wgt[base + done_w + w] : acc[base + done_w + w];
      cmd0(h, pl);
      done_w += len;
    end
  endtask

  // read back n words from the act SRAM (from_acc 0) or the accumulation buffer and compare
  task automatic check_mem(input bit from_acc, input int base, input int n, input string what);
    int done_w, errs;
    done_w = 0; errs = 0;
    while (done_w < n) begin
      header_t h;
      packet_t p;
      int len;
      len = (n - done_w > PAYLOAD_WORDS) ? PAYLOAD_WORDS : n - done_w;
      h = hdr(OP_SEND);
      h.addr = 8'(base + done_w); h.len = 8'(len); h.flag = from_acc;
      h.rop = 4'(OP_RESP); h.addr2 = 8'(done_w); h.rdst.node_r = 2'd3; h.rdst.mem = 1'b1;
      cmd0(h, '0);
      while (got_q.size() == 0) @(negedge clk);
      p = got_q.pop_front();
      checks++;
      if (p.hdr.op != OP_RESP || p.hdr.dst != h.rdst || p.hdr.src != me || p.hdr.len != 8'(len) ||
          p.hdr.addr != 8'(done_w)) begin
        failures++; $display("FAIL %s: response header", what);
      end
      for (int w = 0; w < len; w++) begin
        logic [31:0] e;
        e = from_acc ? acc[base + done_w + w] : act[base + done_w + w];
        checks++;
        if (p.payload[w * 32 +: 32] !== e) begin
          failures++; errs++;
          if (errs < 5) $display("FAIL %s word %0d: %h, expected %h", what, done_w + w, p.payload[w * 32 +: 32], e);
        end
      end
      done_w += len;
    end
  endtask

  initial begin
    header_t h;
    int cyc;
    packet_t p;
    me = '0; me.chip_r = 8'd1; me.chip_c = 8'd2; me.node_r = 2'd1; me.node_c = 2'd2;
    repeat (3) @(negedge clk); rst_n = 1;

    // ---- buffer writes and read back
    for (int i = 0; i < 244; i++) begin act[i] = rand_fp(); wgt[i] = rand_fp(); end
    for (int i = 0; i < 144; i++) acc[i] = rand_fp();
    write_mem(0, 0, 244);
    write_mem(1, 0, 244);
    write_mem(2, 0, 144);
    check_mem(0, 0, 244, "act SRAM");
    check_mem(1, 0, 144, "acc buffer");

    // ---- matrix multiplication, M=3 N=5 P=20: act[10..] x wgt[20..] into acc[4..]
    for (int pass = 0; pass < 2; pass++) begin
      h = hdr(OP_MATMUL);
      h.addr = 8'd10; h.addr2 = 8'd20; h.addr3 = 8'd4; h.m = 8'd3; h.n = 8'd5; h.p = 8'd20;
      h.flag = (pass == 0);
      if (pass == 0) for (int i = 0; i < 144; i++) acc[i] = 32'd0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 20; j++)
          for (int k = 0; k < 5; k++)
            acc[4 + i * 20 + j] = fadd(acc[4 + i * 20 + j], fmul(act[10 + i * 5 + k], wgt[20 + k * 20 + j]));
      cmd(h, '0, cyc);
      checks++;
      if (cyc != 3 * 2 * 5) begin
        failures++; $display("FAIL matmul took %0d busy cycles, expected %0d", cyc, 3 * 2 * 5);
      end
      check_mem(1, 0, 144, pass == 0 ? "matmul" : "matmul accumulate");
    end

    // ---- ReLU of acc[0..59] into act[100..]
    h = hdr(OP_RELU); h.addr = 8'd0; h.addr2 = 8'd100; h.m = 8'd60;
    for (int i = 0; i < 60; i++) act[100 + i] = acc[i][31] ? 32'd0 : acc[i];
    cmd0(h, '0);
    check_mem(0, 100, 60, "relu");

    // ---- normalisation of acc[10..29] into act[0..]
    h = hdr(OP_NORM); h.addr = 8'd10; h.addr2 = 8'd0; h.m = 8'd20;
    h.a = rand_fp(120, 128); h.b = rand_fp(124, 130);
    for (int i = 0; i < 20; i++) act[i] = fmul(fadd(acc[10 + i], {~h.a[31], h.a[30:0]}), h.b);
    cmd0(h, '0);
    check_mem(0, 0, 20, "norm");

    // ---- statistics with reduction
    h = hdr(OP_STATS); h.addr = 8'd4; h.m = 8'd40; h.flag = 1'b1;
    ssum = 0; ssq = 0;
    for (int i = 0; i < 40; i++) begin ssum = fadd(ssum, acc[4 + i]); ssq = fadd(ssq, fmul(acc[4 + i], acc[4 + i])); end
    cmd0(h, '0);
    for (int r = 0; r < 3; r++) begin
      logic [PAYLOAD_WORDS*WORD_W-1:0] pl;
      pl = '0; pl[31:0] = rand_fp(); pl[63:32] = rand_fp(); pl[64 +: 32] = 32'hdead_beef;
      ssum = fadd(ssum, pl[31:0]); ssq = fadd(ssq, pl[63:32]);
      h = hdr(OP_STAT_ACC); h.len = 8'd2;
      cmd0(h, pl);
    end
    h = hdr(OP_SEND_STAT); h.rdst.node_c = 2'd3;
    cmd0(h, '0);
    while (got_q.size() == 0) @(negedge clk);
    p = got_q.pop_front();
    checks++;
    if (p.hdr.op != OP_STAT_ACC || p.hdr.dst != h.rdst || p.payload[31:0] !== ssum || p.payload[63:32] !== ssq) begin
      failures++; $display("FAIL statistics: %h %h, expected %h %h", p.payload[31:0], p.payload[63:32], ssum, ssq);
    end

    // ---- up-sampling of a 3 x 4 block of acc[8..], factor 2, both kinds
    for (int z = 0; z < 2; z++) begin
      h = hdr(OP_UPSAMPLE); h.addr = 8'd8; h.addr2 = 8'd30; h.m = 8'd3; h.n = 8'd4; h.p = 8'd2; h.flag = z[0];
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 8; j++)
          act[30 + i * 8 + j] = (z == 1 && (i % 2 != 0 || j % 2 != 0)) ? 32'd0 : acc[8 + (i / 2) * 4 + j / 2];
      cmd0(h, '0);
      check_mem(0, 30, 48, z ? "zero-insertion up-sampling" : "nearest up-sampling");
    end

    // ---- reshape: 5 x 7 block of acc[40..] transposed into act[150..]
    h = hdr(OP_RESHAPE); h.addr = 8'd40; h.addr2 = 8'd150; h.m = 8'd5; h.n = 8'd7;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 7; j++) act[150 + j * 5 + i] = acc[40 + i * 7 + j];
    cmd0(h, '0);
    check_mem(0, 150, 35, "reshape");

    // ---- layer end handshake
    h = hdr(OP_LAYER_END); h.m = 8'(CC_MATMUL);
    @(negedge clk);
    while (!rx_ready) @(negedge clk);
    rx_pkt.hdr = h; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat (7) @(negedge clk);
    checks++;
    if (!layer_end_req || layer_end_class != CC_MATMUL || !busy || rx_ready) begin
      failures++; $display("FAIL layer end request");
    end
    layer_end_ack = 1; @(negedge clk); layer_end_ack = 0; @(negedge clk);
    checks++;
    if (layer_end_req || busy || !rx_ready) begin failures++; $display("FAIL layer end release"); end

    checks++;
    if (got_q.size() != 0) begin failures++; $display("FAIL unexpected output packets"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
