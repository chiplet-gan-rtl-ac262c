// End-to-end test environment of the chiplet system, shared by the block test (2x2 chiplets)
// and the full-size test (4x4 chiplets); the testbench top connects it to the system's ports. A testbench endpoint on every memory port acts as
// the DRAM / host side and drives a small GAN-style layer sequence on every PE:
//   L0 load     (all regions C-Mesh): activations 2x4 and weights 4x16 into every PE;
//               layer end with class "matrix multiplication" -> every region switches to mesh
//   L1 matmul   (mesh): every PE multiplies, then sends its 2x16 result to its right
//               neighbour in the chiplet row; layer end: regions 0,1 ask for mesh, regions 2,3
//               for a reduction -> mixed topology, express links off
//   L2 reduce   (mixed): ReLU, statistics, and a pairwise reduction of the statistics between
//               neighbouring PEs; layer end "chiplet traffic" -> all C-Mesh, express links on
//   L3 chiplet  (C-Mesh): every PE sends its result to the opposite region of its chiplet
//               (express links), to the chiplets below and to the right (passive links between
//               adjacent chiplets, active links otherwise) and diagonally (active links, NoP)
//   readback    every PE sends its memories back to the memory port; all data are compared
//               with a reference model that rounds to FP32 in the hardware's order.
// Mechanism counts (topology switches and stalls, express / passive / active link flits,
// express link reconfigurations, mesh and C-Mesh deliveries) must all be non-zero.
module cg_tb_sys_env
  import cg_pkg::*;
  import cg_tb_fp_pkg::*;
#(
  parameter int R = 2,
  parameter int C = 2
) (
  output logic              clk,
  output logic              rst_n,
  output link_t             mem_in         [R][C][4],
  input  logic [NUM_VC-1:0] mem_in_credit  [R][C][4],
  input  link_t             mem_out        [R][C][4],
  output logic [NUM_VC-1:0] mem_out_credit [R][C][4],
  input  topo_e             region_mode    [R][C][4],
  input  logic              express_en     [R][C],
  input  logic [15:0]       pe_busy        [R][C],
  input  logic [31:0]       passive_flits,
  input  logic [31:0]       active_flits,
  input  logic [31:0]       express_flits,
  input  logic [31:0]       topo_switches,
  input  logic [31:0]       topo_stalls
);
  localparam int NPE = R * C * 16;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  packet_t hq [R][C][4][$];
  packet_t resp [string];
  int      tx_idle [R][C][4];
  int      viol [R][C][4];

  function automatic string key(input node_addr_t src, input opcode_e op, input int tag);
    return $sformatf("%0d.%0d.%0d.%0d/%0d/%0d", src.chip_r, src.chip_c, src.node_r, src.node_c, op, tag);
  endfunction

  for (genvar r = 0; r < R; r++) begin : g_r
    for (genvar c = 0; c < C; c++) begin : g_c
      for (genvar q = 0; q < 4; q++) begin : g_q
        cg_tb_host h (.clk, .rst_n, .out_link(mem_in[r][c][q]), .out_credit(mem_in_credit[r][c][q]),
                      .in_link(mem_out[r][c][q]), .in_credit(mem_out_credit[r][c][q]));
        always @(negedge clk) begin
          while (hq[r][c][q].size() > 0) h.send(hq[r][c][q].pop_front());
          while (h.rx_count() > 0) begin
            packet_t p;
            p = h.rx_pop();
            resp[key(p.hdr.src, p.hdr.op, int'(p.hdr.addr))] = p;
          end
          tx_idle[r][c][q] = h.tx_empty();
          viol[r][c][q] = h.credit_violations;
        end
      end
    end
  end

  // ------------------------------------------------------------------ mechanism monitors
  int n_express_toggles = 0, n_mesh_cycles = 0, n_cmesh_cycles = 0, n_mixed_cycles = 0;
  logic express_q [R][C];
  always @(posedge clk)
    if (rst_n)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          int nm;
          if (express_en[r][c] != express_q[r][c]) n_express_toggles++;
          express_q[r][c] = express_en[r][c];
          nm = 0;
          for (int q = 0; q < 4; q++) if (region_mode[r][c][q] == TOPO_MESH) nm++;
          if (nm == 4) n_mesh_cycles++;
          else if (nm == 0) n_cmesh_cycles++;
          else n_mixed_cycles++;
        end
    else
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) express_q[r][c] = 1'b1;

  // ------------------------------------------------------------------ reference model
  logic [31:0] act [NPE][256];
  logic [31:0] wgt [NPE][64];
  logic [31:0] acc [NPE][32];
  logic [31:0] ssum [NPE], ssq [NPE];

  function automatic logic [31:0] fmul(input logic [31:0] a, b); return r2fp(fp2r(a) * fp2r(b)); endfunction
  function automatic logic [31:0] fadd(input logic [31:0] a, b); return r2fp(fp2r(a) + fp2r(b)); endfunction

  function automatic int pid(input int cr, input int cc, input int nr, input int nc);
    return ((cr * C + cc) * 4 + nr) * 4 + nc;
  endfunction
  function automatic node_addr_t addr_of(input int cr, input int cc, input int nr, input int nc);
    node_addr_t a;
    a = '0; a.chip_r = 8'(cr); a.chip_c = 8'(cc); a.node_r = 2'(nr); a.node_c = 2'(nc);
    return a;
  endfunction
  function automatic int region(input int nr, input int nc);
    return (nr >= 2 ? 2 : 0) + (nc >= 2 ? 1 : 0);
  endfunction
  // memory port that serves PE (cr, cc, nr, nc): the corner router of its region
  function automatic node_addr_t host_of(input int cr, input int cc, input int nr, input int nc);
    node_addr_t a;
    a = addr_of(cr, cc, nr >= 2 ? 3 : 0, nc >= 2 ? 3 : 0);
    a.mem = 1'b1;
    return a;
  endfunction

  task automatic to_pe(input int cr, input int cc, input int nr, input int nc, input header_t h,
                       input logic [PAYLOAD_WORDS*WORD_W-1:0] pl);
    packet_t p;
    h.dst = addr_of(cr, cc, nr, nc);
    h.src = host_of(cr, cc, nr, nc);
    p.hdr = h; p.payload = pl;
    hq[cr][cc][region(nr, nc)].push_back(p);
  endtask

  // wait until the hosts have sent everything and the PEs have been idle for a while
  task automatic barrier();
    int quiet;
    quiet = 0;
    while (quiet < 300) begin
      bit idle;
      @(negedge clk);
      idle = 1;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          if (pe_busy[r][c] != 0) idle = 0;
          for (int q = 0; q < 4; q++) if (!tx_idle[r][c][q]) idle = 0;
        end
      quiet = idle ? quiet + 1 : 0;
    end
  endtask

  task automatic layer_end(input comm_class_e cls_r01, input comm_class_e cls_r23);
    for (int cr = 0; cr < R; cr++)
      for (int cc = 0; cc < C; cc++)
        for (int n = 0; n < 16; n++) begin
          header_t h;
          h = '0; h.op = OP_LAYER_END;
          h.m = 8'(region(n / 4, n % 4) < 2 ? cls_r01 : cls_r23);
          to_pe(cr, cc, n / 4, n % 4, h, '0);
        end
    barrier();
  endtask

  task automatic check_modes(input topo_e m01, input topo_e m23, input string what);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        checks++;
        if (region_mode[r][c][0] != m01 || region_mode[r][c][1] != m01 ||
            region_mode[r][c][2] != m23 || region_mode[r][c][3] != m23 ||
            express_en[r][c] != (m01 == TOPO_CMESH && m23 == TOPO_CMESH)) begin
          failures++; $display("FAIL chiplet (%0d,%0d) topology after %s", r, c, what);
        end
      end
  endtask

  // SEND of len words from addr of a PE's act SRAM (from_acc 0) or accumulation buffer
  function automatic header_t send_hdr(input bit from_acc, input int addr, input int len,
                                       input opcode_e rop, input int addr2, input node_addr_t to);
    header_t h;
    h = '0; h.op = OP_SEND; h.flag = from_acc; h.addr = 8'(addr); h.len = 8'(len);
    h.rop = 4'(rop); h.addr2 = 8'(addr2); h.rdst = to;
    return h;
  endfunction

  task automatic expect_words(input int cr, input int cc, input int nr, input int nc, input int tag,
                              input int base, input string what);
    string k;
    int errs;
    k = key(addr_of(cr, cc, nr, nc), OP_RESP, tag);
    checks++;
    if (!resp.exists(k)) begin
      failures++; $display("FAIL no %s data from PE %s", what, k);
      return;
    end
    errs = 0;
    for (int w = 0; w < 32; w++)
      if (resp[k].payload[w * 32 +: 32] !== act[pid(cr, cc, nr, nc)][base + w]) errs++;
    if (errs != 0) begin
      failures++;
      $display("FAIL %s data of PE %0d.%0d.%0d.%0d: %0d words differ", what, cr, cc, nr, nc, errs);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // ---------------- L0: load (C-Mesh)
    check_modes(TOPO_CMESH, TOPO_CMESH, "reset");
    for (int cr = 0; cr < R; cr++)
      for (int cc = 0; cc < C; cc++)
        for (int n = 0; n < 16; n++) begin
          int id;
          header_t h;
          logic [PAYLOAD_WORDS*WORD_W-1:0] pl;
          id = pid(cr, cc, n / 4, n % 4);
          for (int i = 0; i < 8; i++) act[id][i] = rand_fp(120, 132);
          for (int i = 0; i < 64; i++) wgt[id][i] = rand_fp(120, 132);
          h = '0; h.op = OP_WR_ACT; h.len = 8'd8; pl = '0;
          for (int i = 0; i < 8; i++) pl[i * 32 +: 32] = act[id][i];
          to_pe(cr, cc, n / 4, n % 4, h, pl);
          h.op = OP_WR_WGT; h.len = 8'd48; pl = '0;
          for (int i = 0; i < 48; i++) pl[i * 32 +: 32] = wgt[id][i];
          to_pe(cr, cc, n / 4, n % 4, h, pl);
          h.addr = 8'd48; h.len = 8'd16; pl = '0;
          for (int i = 0; i < 16; i++) pl[i * 32 +: 32] = wgt[id][48 + i];
          to_pe(cr, cc, n / 4, n % 4, h, pl);
        end
    barrier();
    $display("load done at cycle %0d", $time / 10);
    layer_end(CC_MATMUL, CC_MATMUL);
    check_modes(TOPO_MESH, TOPO_MESH, "load layer");

    // ---------------- L1: matmul and neighbour exchange (mesh)
    for (int cr = 0; cr < R; cr++)
      for (int cc = 0; cc < C; cc++)
        for (int n = 0; n < 16; n++) begin
          int id, nb;
          header_t h;
          id = pid(cr, cc, n / 4, n % 4);
          nb = pid(cr, cc, n / 4, (n % 4 + 1) % 4);
          for (int i = 0; i < 2; i++)
            for (int j = 0; j < 16; j++) begin
              acc[id][i * 16 + j] = 32'd0;
              for (int k = 0; k < 4; k++)
                acc[id][i * 16 + j] = fadd(acc[id][i * 16 + j], fmul(act[id][i * 4 + k], wgt[id][k * 16 + j]));
            end
          h = '0; h.op = OP_MATMUL; h.m = 8'd2; h.n = 8'd4; h.p = 8'd16; h.flag = 1'b1;
          to_pe(cr, cc, n / 4, n % 4, h, '0);
          to_pe(cr, cc, n / 4, n % 4,
                send_hdr(1'b1, 0, 32, OP_WR_ACT, 100, addr_of(cr, cc, n / 4, (n % 4 + 1) % 4)), '0);
        end
    for (int id = 0; id < NPE; id++) begin
      int nb;
      nb = (id & ~3) | ((id + 1) & 3);
      for (int w = 0; w < 32; w++) act[nb][100 + w] = acc[id][w];
    end
    barrier();
    layer_end(CC_MATMUL, CC_REDUCE);
    check_modes(TOPO_MESH, TOPO_CMESH, "matmul layer");

    // ---------------- L2: ReLU, statistics, reduction (mixed)
    for (int cr = 0; cr < R; cr++)
      for (int cc = 0; cc < C; cc++)
        for (int n = 0; n < 16; n++) begin
          int id;
          header_t h;
          id = pid(cr, cc, n / 4, n % 4);
          h = '0; h.op = OP_RELU; h.addr = 8'd0; h.addr2 = 8'd8; h.m = 8'd32;
          to_pe(cr, cc, n / 4, n % 4, h, '0);
          h = '0; h.op = OP_STATS; h.addr = 8'd0; h.m = 8'd32; h.flag = 1'b1;
          to_pe(cr, cc, n / 4, n % 4, h, '0);
          ssum[id] = 0; ssq[id] = 0;
          for (int w = 0; w < 32; w++) begin
            act[id][8 + w] = acc[id][w][31] ? 32'd0 : acc[id][w];
            ssum[id] = fadd(ssum[id], acc[id][w]);
            ssq[id]  = fadd(ssq[id], fmul(acc[id][w], acc[id][w]));
          end
        end
    barrier();
    // odd columns send their statistics to the PE on their left
    for (int cr = 0; cr < R; cr++)
      for (int cc = 0; cc < C; cc++)
        for (int n = 0; n < 16; n += 2) begin
          header_t h;
          h = '0; h.op = OP_SEND_STAT; h.rdst = addr_of(cr, cc, n / 4, n % 4);
          to_pe(cr, cc, n / 4, n % 4 + 1, h, '0);
        end
    for (int id = 0; id < NPE; id += 2) begin
      ssum[id] = fadd(ssum[id], ssum[id + 1]);
      ssq[id]  = fadd(ssq[id], ssq[id + 1]);
    end
    barrier();
    layer_end(CC_CHIPLET, CC_CHIPLET);
    check_modes(TOPO_CMESH, TOPO_CMESH, "reduction layer");

    // ---------------- L3: chiplet-to-chiplet traffic (C-Mesh, express links)
    // one transfer per PE at a time: a PE takes no packet while its own waits for the network
    for (int kind = 0; kind < 4; kind++) begin
      for (int cr = 0; cr < R; cr++)
        for (int cc = 0; cc < C; cc++)
          for (int n = 0; n < 16; n++) begin
            int nr, nc, tr, tc, tnr, tnc, base;
            nr = n / 4; nc = n % 4;
            tr = cr; tc = cc; tnr = nr; tnc = nc;
            case (kind)
              0: begin tnr = (nr + 2) % 4; tnc = (nc + 2) % 4; base = 40; end
              1: begin tr = (cr + 1) % R; base = 140; end
              2: begin tc = (cc + 1) % C; base = 180; end
              default: begin tr = (cr + 1) % R; tc = (cc + 1) % C; base = 212; end
            endcase
            to_pe(cr, cc, nr, nc, send_hdr(1'b1, 0, 32, OP_WR_ACT, base, addr_of(tr, tc, tnr, tnc)), '0);
            for (int w = 0; w < 32; w++) act[pid(tr, tc, tnr, tnc)][base + w] = acc[pid(cr, cc, nr, nc)][w];
          end
      barrier();
      $display("chiplet traffic %0d done at cycle %0d", kind, $time / 10);
    end

    // ---------------- read back
    for (int cr = 0; cr < R; cr++)
      for (int cc = 0; cc < C; cc++)
        for (int n = 0; n < 16; n++) begin
          int nr, nc;
          node_addr_t hs;
          header_t h;
          nr = n / 4; nc = n % 4;
          hs = host_of(cr, cc, nr, nc);
          to_pe(cr, cc, nr, nc, send_hdr(1'b0, 8, 32, OP_RESP, 1, hs), '0);
          to_pe(cr, cc, nr, nc, send_hdr(1'b0, 40, 32, OP_RESP, 2, hs), '0);
          to_pe(cr, cc, nr, nc, send_hdr(1'b0, 100, 32, OP_RESP, 3, hs), '0);
          to_pe(cr, cc, nr, nc, send_hdr(1'b0, 140, 32, OP_RESP, 4, hs), '0);
          to_pe(cr, cc, nr, nc, send_hdr(1'b0, 180, 32, OP_RESP, 5, hs), '0);
          to_pe(cr, cc, nr, nc, send_hdr(1'b0, 212, 32, OP_RESP, 6, hs), '0);
          h = '0; h.op = OP_SEND_STAT; h.rdst = hs;
          if (nc % 2 == 0) to_pe(cr, cc, nr, nc, h, '0);
        end
    barrier();
    for (int cr = 0; cr < R; cr++)
      for (int cc = 0; cc < C; cc++)
        for (int n = 0; n < 16; n++) begin
          int nr, nc, id;
          string k;
          nr = n / 4; nc = n % 4; id = pid(cr, cc, nr, nc);
          expect_words(cr, cc, nr, nc, 1, 8, "ReLU");
          expect_words(cr, cc, nr, nc, 2, 40, "in-chiplet express");
          expect_words(cr, cc, nr, nc, 3, 100, "mesh neighbour");
          expect_words(cr, cc, nr, nc, 4, 140, "chiplet below");
          expect_words(cr, cc, nr, nc, 5, 180, "chiplet right");
          expect_words(cr, cc, nr, nc, 6, 212, "diagonal chiplet");
          if (nc % 2 == 0) begin
            k = key(addr_of(cr, cc, nr, nc), OP_STAT_ACC, 0);
            checks++;
            if (!resp.exists(k)) begin
              failures++; $display("FAIL no statistics from PE %s", k);
            end else if (resp[k].payload[31:0] !== ssum[id] || resp[k].payload[63:32] !== ssq[id]) begin
              failures++; $display("FAIL reduced statistics of PE %s", k);
            end
          end
        end

    // ---------------- mechanisms
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int q = 0; q < 4; q++) begin
      checks++;
      if (viol[r][c][q] != 0) begin failures++; $display("FAIL packet framing at memory port %0d.%0d.%0d", r, c, q); end
    end
    $display("mechanisms: topology switches %0d, switch stall cycles %0d, express reconfigurations %0d,",
             topo_switches, topo_stalls, n_express_toggles);
    $display("            express flits %0d, passive flits %0d, active flits %0d,",
             express_flits, passive_flits, active_flits);
    $display("            chiplet-cycles in mesh %0d, C-Mesh %0d, mixed %0d",
             n_mesh_cycles, n_cmesh_cycles, n_mixed_cycles);
    checks++;
    if (topo_switches != 32'(8 * R * C)) begin
      failures++; $display("FAIL %0d topology switches, expected %0d", topo_switches, 8 * R * C);
    end
    checks++; if (topo_stalls == 0)       begin failures++; $display("FAIL no switch ever stalled"); end
    checks++; if (n_express_toggles == 0) begin failures++; $display("FAIL express links never reconfigured"); end
    checks++; if (express_flits == 0)     begin failures++; $display("FAIL express links never used"); end
    checks++; if (passive_flits == 0)     begin failures++; $display("FAIL passive links never used"); end
    checks++; if (active_flits == 0)      begin failures++; $display("FAIL active links never used"); end
    checks++; if (n_mesh_cycles == 0)     begin failures++; $display("FAIL no chiplet ever in mesh"); end
    checks++; if (n_cmesh_cycles == 0)    begin failures++; $display("FAIL no chiplet ever in C-Mesh"); end
    checks++; if (n_mixed_cycles == 0)    begin failures++; $display("FAIL no chiplet ever mixed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        $display("  chiplet %0d.%0d busy PEs %b, memory ports idle %0d%0d%0d%0d", r, c, pe_busy[r][c],
                 tx_idle[r][c][0], tx_idle[r][c][1], tx_idle[r][c][2], tx_idle[r][c][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
