// Routing functions of the NoC routers (inside a chiplet) and the NoP routers (on the
// interposer). Both are deterministic dimension-order (X first, then Y) routing; the choice
// of exit corner for chiplet-to-chiplet traffic follows the package organisation:
//   * a chiplet (R, C) sits at position (R%2, C%2) of a 2x2 chiplet tile; its "inner" corner
//     router, the one that faces the tile centre, has an active link to the tile's NoP router
//     on its outward Y port;
//   * horizontally adjacent chiplets are joined by a passive link between the X ports of their
//     corner routers in the row on the tile's outer side, vertically adjacent ones by a passive
//     link between the Y ports of their corner routers in the column on the tile's outer side.
// Traffic to an adjacent chiplet takes the passive link; all other chiplet-to-chiplet traffic
// goes up the active link, across the NoP and down to the destination's inner corner.
// Inside a chiplet a packet for a PE of a region in C-Mesh is delivered by the region's
// corner router on local port P_LOC + k, k being the PE's place in the region.
package cg_route_pkg;
  import cg_pkg::*;

  function automatic int region_of(input logic [1:0] r, input logic [1:0] c);
    return int'(r[1]) * 2 + int'(c[1]);
  endfunction

  // corner router that serves the region containing (r, c)
  function automatic logic [1:0] corner_r(input logic [1:0] r); return r[1] ? 2'd3 : 2'd0; endfunction
  function automatic logic [1:0] corner_c(input logic [1:0] c); return c[1] ? 2'd3 : 2'd0; endfunction

  // place of PE (r, c) in its region, 0 for the PE at the corner router
  function automatic int region_slot(input logic [1:0] r, input logic [1:0] c);
    return (r[0] != r[1] ? 2 : 0) + (c[0] != c[1] ? 1 : 0);
  endfunction

  // output port of the NoC router at (my_r, my_c) of chiplet (chip_r, chip_c)
  function automatic int noc_route(input node_addr_t dst,
                                   input logic [7:0] chip_r, input logic [7:0] chip_c,
                                   input logic [1:0] my_r,   input logic [1:0] my_c,
                                   input logic [3:0] region_cmesh);
    logic [1:0] tr, tc;
    int ep;
    if (dst.chip_r == chip_r && dst.chip_c == chip_c) begin
      if (dst.mem) begin
        tr = dst.node_r; tc = dst.node_c; ep = P_MEM;
      end else if (region_cmesh[region_of(dst.node_r, dst.node_c)]) begin
        tr = corner_r(dst.node_r); tc = corner_c(dst.node_c);
        ep = P_LOC + region_slot(dst.node_r, dst.node_c);
      end else begin
        tr = dst.node_r; tc = dst.node_c; ep = P_LOC;
      end
    end else begin
      logic [1:0] orow, ocol, irow, icol;
      orow = chip_r[0] ? 2'd3 : 2'd0;  ocol = chip_c[0] ? 2'd3 : 2'd0;
      irow = chip_r[0] ? 2'd0 : 2'd3;  icol = chip_c[0] ? 2'd0 : 2'd3;
      if (dst.chip_r == chip_r && dst.chip_c == chip_c + 8'd1) begin
        tr = orow; tc = 2'd3; ep = P_XP;
      end else if (dst.chip_r == chip_r && dst.chip_c + 8'd1 == chip_c) begin
        tr = orow; tc = 2'd0; ep = P_XN;
      end else if (dst.chip_c == chip_c && dst.chip_r == chip_r + 8'd1) begin
        tr = 2'd3; tc = ocol; ep = P_YP;
      end else if (dst.chip_c == chip_c && dst.chip_r + 8'd1 == chip_r) begin
        tr = 2'd0; tc = ocol; ep = P_YN;
      end else begin
        tr = irow; tc = icol; ep = (irow == 2'd3) ? P_YP : P_YN;
      end
    end
    if (my_r == tr && my_c == tc) return ep;
    if (tc > my_c) return P_XP;
    if (tc < my_c) return P_XN;
    if (tr > my_r) return P_YP;
    return P_YN;
  endfunction

  // output port of the NoP router of chiplet tile (tile_r, tile_c)
  function automatic int nop_route(input node_addr_t dst,
                                   input logic [7:0] tile_r, input logic [7:0] tile_c);
    logic [7:0] dr, dc;
    dr = dst.chip_r >> 1;
    dc = dst.chip_c >> 1;
    if (dc > tile_c) return P_XP;
    if (dc < tile_c) return P_XN;
    if (dr > tile_r) return P_YP;
    if (dr < tile_r) return P_YN;
    return P_CHIPLET + int'(dst.chip_r[0]) * 2 + int'(dst.chip_c[0]);
  endfunction

endpackage
