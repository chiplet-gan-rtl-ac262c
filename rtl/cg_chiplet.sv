// One chiplet: 16 PEs with their network interfaces, a 4x4 NoC of routers that adapts
// between a mesh and a 2x2 concentrated mesh (C-Mesh), four regional topology controllers,
// and the four corner routers' memory and interposer ports.
//
// Organisation (published): the PEs form four concentration regions of 2x2 PEs, one per
// quadrant; each region's corner router also serves the memory interface and the interposer.
// In mesh, every PE talks to its own router. In C-Mesh the region's four PEs are
// multiplexed onto four local ports of the corner router, and when all four regions are in
// C-Mesh the corner routers are joined directly by express links that skip the other routers
// (the inward X and Y ports of each corner are re-pointed by multiplexer/demultiplexer pairs,
// cg_link_mux). Each region's controller chooses its topology layer by layer.
// This design's choices: the routers of a chiplet share one module (corner routers have four
// PE ports, the others one); the express links are used only when all four regions are in
// C-Mesh, and that choice (express_en) changes, like the region topologies, only while the whole
// chiplet network is drained (no flit buffered or in flight for DRAIN_CYCLES cycles). At reset
// all regions are in C-Mesh, the configuration for loading the PE memories.
// Interface: corner index q = 2*(row==3) + (col==3); interposer ports per corner and direction
// (0: outward X, 1: outward Y), memory ports per corner; all are flit links with per-VC credit
// pulses in the opposite direction. chip_r/chip_c give the chiplet's place in the package.
// Status: region topologies, express_en, per-region switch and stall counts of the topology
// controllers, busy PEs, and a count of the flits that used the express links.
module cg_chiplet
  import cg_pkg::*;
#(
  parameter int DRAIN_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        chip_r,
  input  logic [7:0]        chip_c,
  input  link_t             ipo_in         [4][2],
  output logic [NUM_VC-1:0] ipo_in_credit  [4][2],
  output link_t             ipo_out        [4][2],
  input  logic [NUM_VC-1:0] ipo_out_credit [4][2],
  input  link_t             mem_in         [4],
  output logic [NUM_VC-1:0] mem_in_credit  [4],
  output link_t             mem_out        [4],
  input  logic [NUM_VC-1:0] mem_out_credit [4],
  output topo_e             region_mode    [4],
  output logic              express_en,
  output logic [15:0]       topo_switches  [4],
  output logic [15:0]       topo_stalls    [4],
  output logic [15:0]       pe_busy_mask,
  output logic [31:0]       express_flits  // flits sent on the express links so far
);
  localparam int NPMAX = P_LOC + NUM_LOCAL;   // 9

  // router port nets: out = leaving the router, cr_out = credits the router returns upstream
  link_t             r_in     [4][4][NPMAX];
  link_t             r_out    [4][4][NPMAX];
  logic [NUM_VC-1:0] r_cr_in  [4][4][NPMAX];
  logic [NUM_VC-1:0] r_cr_out [4][4][NPMAX];
  logic              r_idle   [4][4];

  // network interface nets
  link_t             ni_out    [4][4];
  link_t             ni_in     [4][4];
  logic [NUM_VC-1:0] ni_cr_out [4][4];
  logic [NUM_VC-1:0] ni_cr_in  [4][4];
  logic              ni_idle   [4][4];

  // PE attachment multiplexers (partner 0: own router, partner 1: corner router)
  link_t             pm_p_out [4][4][2];
  link_t             pm_p_in  [4][4][2];
  logic [NUM_VC-1:0] pm_cr_out[4][4][2];
  logic [NUM_VC-1:0] pm_cr_in [4][4][2];

  // express multiplexers at the corners' inward ports, d = 0: X, 1: Y
  // (partner 0: mesh neighbour, partner 1: the other corner in that direction)
  link_t             xm_p_out [4][2][2];
  link_t             xm_p_in  [4][2][2];
  logic [NUM_VC-1:0] xm_cr_out[4][2][2];
  logic [NUM_VC-1:0] xm_cr_in [4][2][2];
  link_t             xm_e_in  [4][2];
  logic [NUM_VC-1:0] xm_e_cr_in [4][2];

  logic [3:0]        region_cmesh;
  topo_e             mode_next [4];
  logic [3:0]        lend_req [4];
  comm_class_e       lend_cls [4][4];
  logic              region_ack [4];
  logic              drained;
  logic [$clog2(DRAIN_CYCLES + 1)-1:0] quiet;

  function automatic bit is_corner(input int r, input int c);
    return (r == 0 || r == 3) && (c == 0 || c == 3);
  endfunction
  function automatic int cidx(input int r, input int c);
    return (r == 3 ? 2 : 0) + (c == 3 ? 1 : 0);
  endfunction
  function automatic int inward(input int r, input int c, input int d);
    if (d == 0) return (c == 0) ? P_XP : P_XN;
    return (r == 0) ? P_YP : P_YN;
  endfunction
  function automatic int outward(input int r, input int c, input int d);
    if (d == 0) return (c == 0) ? P_XN : P_XP;
    return (r == 0) ? P_YN : P_YP;
  endfunction
  function automatic int opposite(input int p);
    return (p == P_XP) ? P_XN : (p == P_XN) ? P_XP : (p == P_YP) ? P_YN : P_YP;
  endfunction

  // ------------------------------------------------------------------ routers
  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      localparam int NP = is_corner(r, c) ? NPMAX : P_LOC + 1;
      link_t             li [NP];
      link_t             lo [NP];
      logic [NUM_VC-1:0] ci [NP];
      logic [NUM_VC-1:0] co [NP];
      logic [NUM_VC-1:0] ve [NP];
      always_comb
        for (int p = 0; p < NP; p++) begin
          li[p] = r_in[r][c][p];
          ci[p] = r_cr_in[r][c][p];
        end
      always_comb
        for (int p = 0; p < NPMAX; p++) begin
          r_out[r][c][p]    = (p < NP) ? lo[p] : '0;
          r_cr_out[r][c][p] = (p < NP) ? co[p] : '0;
        end
      cg_router #(.NP(NP), .IS_NOP(1'b0)) u_router (
        .clk, .rst_n, .pos_r(chip_r), .pos_c(chip_c), .node_r(2'(r)), .node_c(2'(c)),
        .region_cmesh, .in_link(li), .in_credit(co), .out_link(lo), .out_credit(ci),
        .vc_empty(ve), .idle(r_idle[r][c]));

      // PE, network interface and, except at the corner itself, the attachment multiplexer
      packet_t rx_pkt, tx_pkt;
      logic    rx_valid, rx_ready, tx_valid, tx_ready, lreq, busy, ni_empty;
      comm_class_e lcls;
      node_addr_t  me;
      assign me = '{chip_r: chip_r, chip_c: chip_c, node_r: 2'(r), node_c: 2'(c), mem: 1'b0};

      cg_ni u_ni (
        .clk, .rst_n, .tx_valid, .tx_ready, .tx_pkt, .rx_valid, .rx_ready, .rx_pkt,
        .out_link(ni_out[r][c]), .out_credit(ni_cr_in[r][c]), .in_link(ni_in[r][c]),
        .in_credit(ni_cr_out[r][c]), .vc_empty(ni_empty), .idle(ni_idle[r][c]));

      cg_pe u_pe (
        .clk, .rst_n, .my_addr(me), .rx_valid, .rx_ready, .rx_pkt, .tx_valid, .tx_ready, .tx_pkt,
        .layer_end_req(lreq), .layer_end_class(lcls),
        .layer_end_ack(region_ack[(r >= 2 ? 2 : 0) + (c >= 2 ? 1 : 0)]), .busy(busy));
      assign pe_busy_mask[r * 4 + c] = busy;
      assign lend_req[(r >= 2 ? 2 : 0) + (c >= 2 ? 1 : 0)][(r % 2) * 2 + (c % 2)] = lreq;
      assign lend_cls[(r >= 2 ? 2 : 0) + (c >= 2 ? 1 : 0)][(r % 2) * 2 + (c % 2)] = lcls;

      if (!is_corner(r, c)) begin : g_pmux
        cg_link_mux u_pmux (
          .sel(region_cmesh[(r >= 2 ? 2 : 0) + (c >= 2 ? 1 : 0)]),
          .e_out(ni_out[r][c]), .e_in(ni_in[r][c]),
          .e_credit_out(ni_cr_out[r][c]), .e_credit_in(ni_cr_in[r][c]),
          .p_out(pm_p_out[r][c]), .p_in(pm_p_in[r][c]),
          .p_credit_out(pm_cr_out[r][c]), .p_credit_in(pm_cr_in[r][c]));
      end
    end
  end

  // express multiplexers
  for (genvar q = 0; q < 4; q++) begin : g_corner
    for (genvar d = 0; d < 2; d++) begin : g_dir
      localparam int R = (q / 2) * 3;
      localparam int C = (q % 2) * 3;
      cg_link_mux u_xmux (
        .sel(express_en),
        .e_out(r_out[R][C][inward(R, C, d)]), .e_in(xm_e_in[q][d]),
        .e_credit_out(r_cr_out[R][C][inward(R, C, d)]), .e_credit_in(xm_e_cr_in[q][d]),
        .p_out(xm_p_out[q][d]), .p_in(xm_p_in[q][d]),
        .p_credit_out(xm_cr_out[q][d]), .p_credit_in(xm_cr_in[q][d]));
    end
  end

  // ------------------------------------------------------------------ wiring
  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        for (int p = 0; p < NPMAX; p++) begin
          r_in[r][c][p]    = '0;
          r_cr_in[r][c][p] = '0;
        end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        pm_p_out[r][c][0] = '0; pm_p_out[r][c][1] = '0;
        pm_cr_out[r][c][0] = '0; pm_cr_out[r][c][1] = '0;
      end

    // mesh links between neighbours; a corner's inward port goes through its express mux
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        for (int p = P_XP; p <= P_YN; p++) begin
          int nr, nc, np;
          nr = r + ((p == P_YP) ? 1 : (p == P_YN) ? -1 : 0);
          nc = c + ((p == P_XP) ? 1 : (p == P_XN) ? -1 : 0);
          np = opposite(p);
          if (nr >= 0 && nr < 4 && nc >= 0 && nc < 4) begin
            if (is_corner(r, c)) begin
              // handled by the express mux below
            end else if (is_corner(nr, nc)) begin
              r_in[r][c][p]    = xm_p_in[cidx(nr, nc)][(p == P_XP || p == P_XN) ? 0 : 1][0];
              r_cr_in[r][c][p] = xm_cr_in[cidx(nr, nc)][(p == P_XP || p == P_XN) ? 0 : 1][0];
            end else begin
              r_in[r][c][p]    = r_out[nr][nc][np];
              r_cr_in[r][c][p] = r_cr_out[nr][nc][np];
            end
          end
        end

    for (int q = 0; q < 4; q++) begin
      int R, C;
      R = (q / 2) * 3;
      C = (q % 2) * 3;
      for (int d = 0; d < 2; d++) begin
        int nr, nc, oq;
        nr = (d == 1) ? ((R == 0) ? 1 : 2) : R;
        nc = (d == 0) ? ((C == 0) ? 1 : 2) : C;
        oq = (d == 0) ? (q ^ 1) : (q ^ 2);
        r_in[R][C][inward(R, C, d)]    = xm_e_in[q][d];
        r_cr_in[R][C][inward(R, C, d)] = xm_e_cr_in[q][d];
        xm_p_out[q][d][0]  = r_out[nr][nc][opposite(inward(R, C, d))];
        xm_cr_out[q][d][0] = r_cr_out[nr][nc][opposite(inward(R, C, d))];
        xm_p_out[q][d][1]  = xm_p_in[oq][d][1];
        xm_cr_out[q][d][1] = xm_cr_in[oq][d][1];
        // interposer and memory ports
        r_in[R][C][outward(R, C, d)]    = ipo_in[q][d];
        r_cr_in[R][C][outward(R, C, d)] = ipo_out_credit[q][d];
        ipo_out[q][d]       = r_out[R][C][outward(R, C, d)];
        ipo_in_credit[q][d] = r_cr_out[R][C][outward(R, C, d)];
      end
      r_in[R][C][P_MEM]    = mem_in[q];
      r_cr_in[R][C][P_MEM] = mem_out_credit[q];
      mem_out[q]       = r_out[R][C][P_MEM];
      mem_in_credit[q] = r_cr_out[R][C][P_MEM];
    end

    // PEs: the corner PE is always on local port 0 of its corner router; the others go through
    // their attachment mux to their own router (mesh) or to corner port P_LOC + slot (C-Mesh)
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        int cr, cc, slot;
        cr = (r >= 2) ? 3 : 0;
        cc = (c >= 2) ? 3 : 0;
        slot = ((r % 2) != (r / 2) ? 2 : 0) + ((c % 2) != (c / 2) ? 1 : 0);
        if (is_corner(r, c)) begin
          r_in[r][c][P_LOC]    = ni_out[r][c];
          r_cr_in[r][c][P_LOC] = ni_cr_out[r][c];
        end else begin
          r_in[r][c][P_LOC]        = pm_p_in[r][c][0];
          r_cr_in[r][c][P_LOC]     = pm_cr_in[r][c][0];
          r_in[cr][cc][P_LOC + slot]    = pm_p_in[r][c][1];
          r_cr_in[cr][cc][P_LOC + slot] = pm_cr_in[r][c][1];
          pm_p_out[r][c][0]  = r_out[r][c][P_LOC];
          pm_cr_out[r][c][0] = r_cr_out[r][c][P_LOC];
          pm_p_out[r][c][1]  = r_out[cr][cc][P_LOC + slot];
          pm_cr_out[r][c][1] = r_cr_out[cr][cc][P_LOC + slot];
        end
      end
  end

  for (genvar r = 0; r < 4; r++) begin : g_cni
    for (genvar c = 0; c < 4; c++) begin : g_cnc
      if (is_corner(r, c)) begin : g_direct
        assign ni_in[r][c]    = r_out[r][c][P_LOC];
        assign ni_cr_in[r][c] = r_cr_out[r][c][P_LOC];
      end
    end
  end

  // ------------------------------------------------------------------ topology control
  always_comb begin
    logic all_idle;
    all_idle = 1'b1;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!r_idle[r][c] || !ni_idle[r][c]) all_idle = 1'b0;
    drained = all_idle && (int'(quiet) >= DRAIN_CYCLES);
  end

  for (genvar g = 0; g < 4; g++) begin : g_region
    cg_topo_ctrl u_ctrl (
      .clk, .rst_n, .layer_end_req(lend_req[g]), .layer_end_class(lend_cls[g]),
      .drained, .mode(region_mode[g]), .mode_next(mode_next[g]), .ack(region_ack[g]),
      .switches(topo_switches[g]), .stalls(topo_stalls[g]));
    assign region_cmesh[g] = (region_mode[g] == TOPO_CMESH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quiet         <= '0;
      express_en    <= 1'b1;
      express_flits <= '0;
    end else begin
      logic [31:0] xf;
      logic        all_idle;
      xf = express_flits;
      for (int q = 0; q < 4; q++)
        for (int d = 0; d < 2; d++)
          if (express_en && r_out[(q / 2) * 3][(q % 2) * 3][inward((q / 2) * 3, (q % 2) * 3, d)].valid)
            xf = xf + 32'd1;
      express_flits <= xf;
      all_idle = 1'b1;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          if (!r_idle[r][c] || !ni_idle[r][c]) all_idle = 1'b0;
      if (!all_idle) quiet <= '0;
      else if (int'(quiet) < DRAIN_CYCLES) quiet <= quiet + 1'b1;
      if (drained)
        express_en <= (mode_next[0] == TOPO_CMESH) && (mode_next[1] == TOPO_CMESH) &&
                      (mode_next[2] == TOPO_CMESH) && (mode_next[3] == TOPO_CMESH);
    end
  end
endmodule
