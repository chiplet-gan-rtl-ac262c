// System package: CHIP_ROWS x CHIP_COLS chiplets on an interposer, grouped in 2x2 chiplet
// tiles, each tile with a NoP router on the (active) interposer.
//
// Published organisation: each chiplet tile's four chiplets connect through their corner
// routers to the tile's NoP router by active links, the NoP routers of neighbouring tiles are
// joined by active links for long-distance traffic, and adjacent chiplets are joined by
// passive links between the corner routers facing each other, for short-distance traffic.
// The 4x4 chiplet default is the published configuration. Which corner takes which link is
// this design's choice (see cg_route_pkg): the corner facing the tile centre carries the
// active link on its outward Y port, horizontal passive links use the corners on the tile's
// outer row, vertical ones those on the tile's outer column. A passive link is plain wiring
// between two corner routers; an active link ends in the NoP router, which is the same
// five-stage virtual-channel router as inside the chiplets, with four tile ports and four
// chiplet ports.
// Interface: the memory port of every corner router of every chiplet (flit link and credits
// in both directions, indices [chiplet row][chiplet column][corner]), which is where DRAM
// traffic and host commands enter; status: topology of every region, express links in use,
// busy PEs, flit counts of the passive, active and express links, and the totals of topology
// switches and of cycles a switch waited for its chiplet to drain.
module cg_system
  import cg_pkg::*;
#(
  parameter int CHIP_ROWS = 4,
  parameter int CHIP_COLS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  link_t             mem_in         [CHIP_ROWS][CHIP_COLS][4],
  output logic [NUM_VC-1:0] mem_in_credit  [CHIP_ROWS][CHIP_COLS][4],
  output link_t             mem_out        [CHIP_ROWS][CHIP_COLS][4],
  input  logic [NUM_VC-1:0] mem_out_credit [CHIP_ROWS][CHIP_COLS][4],
  output topo_e             region_mode    [CHIP_ROWS][CHIP_COLS][4],
  output logic              express_en     [CHIP_ROWS][CHIP_COLS],
  output logic [15:0]       pe_busy        [CHIP_ROWS][CHIP_COLS],
  output logic [31:0]       passive_flits,
  output logic [31:0]       active_flits,
  output logic [31:0]       express_flits,
  output logic [31:0]       topo_switches,
  output logic [31:0]       topo_stalls
);
  localparam int TR = (CHIP_ROWS + 1) / 2;   // chiplet tile rows
  localparam int TC = (CHIP_COLS + 1) / 2;
  localparam int NOP_NP = P_CHIPLET + 4;

  link_t             c_in      [CHIP_ROWS][CHIP_COLS][4][2];
  logic [NUM_VC-1:0] c_in_cr   [CHIP_ROWS][CHIP_COLS][4][2];
  link_t             c_out     [CHIP_ROWS][CHIP_COLS][4][2];
  logic [NUM_VC-1:0] c_out_cr  [CHIP_ROWS][CHIP_COLS][4][2];
  link_t             n_in      [TR][TC][NOP_NP];
  logic [NUM_VC-1:0] n_in_cr   [TR][TC][NOP_NP];
  link_t             n_out     [TR][TC][NOP_NP];
  logic [NUM_VC-1:0] n_out_cr  [TR][TC][NOP_NP];

  logic [15:0]       sw_cnt    [CHIP_ROWS][CHIP_COLS][4];
  logic [15:0]       st_cnt    [CHIP_ROWS][CHIP_COLS][4];
  logic [31:0]       xp_cnt    [CHIP_ROWS][CHIP_COLS];

  for (genvar r = 0; r < CHIP_ROWS; r++) begin : g_cr
    for (genvar c = 0; c < CHIP_COLS; c++) begin : g_cc
      cg_chiplet u_chiplet (
        .clk, .rst_n, .chip_r(8'(r)), .chip_c(8'(c)),
        .ipo_in(c_in[r][c]), .ipo_in_credit(c_out_cr[r][c]),
        .ipo_out(c_out[r][c]), .ipo_out_credit(c_in_cr[r][c]),
        .mem_in(mem_in[r][c]), .mem_in_credit(mem_in_credit[r][c]),
        .mem_out(mem_out[r][c]), .mem_out_credit(mem_out_credit[r][c]),
        .region_mode(region_mode[r][c]), .express_en(express_en[r][c]),
        .topo_switches(sw_cnt[r][c]), .topo_stalls(st_cnt[r][c]), .pe_busy_mask(pe_busy[r][c]),
        .express_flits(xp_cnt[r][c]));
    end
  end

  for (genvar tr = 0; tr < TR; tr++) begin : g_tr
    for (genvar tc = 0; tc < TC; tc++) begin : g_tc
      logic [NUM_VC-1:0] ve [NOP_NP];
      logic              idle;
      cg_router #(.NP(NOP_NP), .IS_NOP(1'b1)) u_nop (
        .clk, .rst_n, .pos_r(8'(tr)), .pos_c(8'(tc)), .node_r(2'd0), .node_c(2'd0),
        .region_cmesh(4'd0), .in_link(n_in[tr][tc]), .in_credit(n_out_cr[tr][tc]),
        .out_link(n_out[tr][tc]), .out_credit(n_in_cr[tr][tc]), .vc_empty(ve), .idle(idle));
    end
  end

  // c_in / n_in: flits into a chiplet port / NoP port; c_in_cr / n_in_cr: credits into it for
  // the flits it sends; c_out_cr / n_out_cr: credits it returns for the flits it received.
  always_comb begin
    for (int r = 0; r < CHIP_ROWS; r++)
      for (int c = 0; c < CHIP_COLS; c++)
        for (int q = 0; q < 4; q++)
          for (int d = 0; d < 2; d++) begin
            c_in[r][c][q][d] = '0;
            c_in_cr[r][c][q][d] = '0;
          end
    for (int tr = 0; tr < TR; tr++)
      for (int tc = 0; tc < TC; tc++)
        for (int p = 0; p < NOP_NP; p++) begin
          n_in[tr][tc][p] = '0;
          n_in_cr[tr][tc][p] = '0;
        end

    for (int r = 0; r < CHIP_ROWS; r++)
      for (int c = 0; c < CHIP_COLS; c++) begin
        int qin, qh, qhn, qv, qvn, np;
        // active link: inner corner, outward Y, to the tile's NoP router
        qin = ((r % 2 == 0) ? 2 : 0) + ((c % 2 == 0) ? 1 : 0);
        np  = P_CHIPLET + (r % 2) * 2 + (c % 2);
        n_in[r / 2][c / 2][np]    = c_out[r][c][qin][1];
        n_in_cr[r / 2][c / 2][np] = c_out_cr[r][c][qin][1];
        c_in[r][c][qin][1]    = n_out[r / 2][c / 2][np];
        c_in_cr[r][c][qin][1] = n_out_cr[r / 2][c / 2][np];
        // passive link to the right-hand neighbour: outer-row corners, X ports
        if (c + 1 < CHIP_COLS) begin
          qh  = ((r % 2 == 0) ? 0 : 2) + 1;
          qhn = ((r % 2 == 0) ? 0 : 2);
          c_in[r][c + 1][qhn][0]    = c_out[r][c][qh][0];
          c_in_cr[r][c + 1][qhn][0] = c_out_cr[r][c][qh][0];
          c_in[r][c][qh][0]         = c_out[r][c + 1][qhn][0];
          c_in_cr[r][c][qh][0]      = c_out_cr[r][c + 1][qhn][0];
        end
        // passive link to the neighbour below: outer-column corners, Y ports
        if (r + 1 < CHIP_ROWS) begin
          qv  = 2 + ((c % 2 == 0) ? 0 : 1);
          qvn = ((c % 2 == 0) ? 0 : 1);
          c_in[r + 1][c][qvn][1]    = c_out[r][c][qv][1];
          c_in_cr[r + 1][c][qvn][1] = c_out_cr[r][c][qv][1];
          c_in[r][c][qv][1]         = c_out[r + 1][c][qvn][1];
          c_in_cr[r][c][qv][1]      = c_out_cr[r + 1][c][qvn][1];
        end
      end

    // active links between the NoP routers of neighbouring tiles
    for (int tr = 0; tr < TR; tr++)
      for (int tc = 0; tc < TC; tc++) begin
        if (tc + 1 < TC) begin
          n_in[tr][tc + 1][P_XN]    = n_out[tr][tc][P_XP];
          n_in_cr[tr][tc + 1][P_XN] = n_out_cr[tr][tc][P_XP];
          n_in[tr][tc][P_XP]        = n_out[tr][tc + 1][P_XN];
          n_in_cr[tr][tc][P_XP]     = n_out_cr[tr][tc + 1][P_XN];
        end
        if (tr + 1 < TR) begin
          n_in[tr + 1][tc][P_YN]    = n_out[tr][tc][P_YP];
          n_in_cr[tr + 1][tc][P_YN] = n_out_cr[tr][tc][P_YP];
          n_in[tr][tc][P_YP]        = n_out[tr + 1][tc][P_YN];
          n_in_cr[tr][tc][P_YP]     = n_out_cr[tr + 1][tc][P_YN];
        end
      end
  end

  // sums of the per-chiplet counters
  always_comb begin
    express_flits = '0; topo_switches = '0; topo_stalls = '0;
    for (int r = 0; r < CHIP_ROWS; r++)
      for (int c = 0; c < CHIP_COLS; c++) begin
        express_flits = express_flits + xp_cnt[r][c];
        for (int g = 0; g < 4; g++) begin
          topo_switches = topo_switches + 32'(sw_cnt[r][c][g]);
          topo_stalls   = topo_stalls + 32'(st_cnt[r][c][g]);
        end
      end
  end

  // link usage counters: flits sent on passive links and on active links (both directions)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      passive_flits <= '0;
      active_flits  <= '0;
    end else begin
      logic [31:0] pn, an;
      pn = '0; an = '0;
      for (int r = 0; r < CHIP_ROWS; r++)
        for (int c = 0; c < CHIP_COLS; c++) begin
          int qin;
          qin = ((r % 2 == 0) ? 2 : 0) + ((c % 2 == 0) ? 1 : 0);
          for (int q = 0; q < 4; q++)
            for (int d = 0; d < 2; d++)
              if (c_out[r][c][q][d].valid) begin
                if (q == qin && d == 1) an = an + 1;
                else                    pn = pn + 1;
              end
        end
      for (int tr = 0; tr < TR; tr++)
        for (int tc = 0; tc < TC; tc++)
          for (int p = 0; p < NOP_NP; p++)
            if (n_out[tr][tc][p].valid) an = an + 1;
      passive_flits <= passive_flits + pn;
      active_flits  <= active_flits + an;
    end
  end
endmodule
