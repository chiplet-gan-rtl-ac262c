// Full-size test of the system package: the end-to-end environment (cg_tb_sys_env) on the
// system at its default size, 4x4 chiplets (four chiplet tiles, four NoP routers, 256 PEs).
module tb_cg_system_full;
  import cg_pkg::*;
  localparam int R = 4, C = 4;
  logic clk, rst_n;
  link_t             mem_in  [R][C][4], mem_out [R][C][4];
  logic [NUM_VC-1:0] mem_in_credit [R][C][4], mem_out_credit [R][C][4];
  topo_e             region_mode [R][C][4];
  logic              express_en [R][C];
  logic [15:0]       pe_busy [R][C];
  logic [31:0]       passive_flits, active_flits, express_flits, topo_switches, topo_stalls;

  cg_system dut (
    .clk, .rst_n, .mem_in, .mem_in_credit, .mem_out, .mem_out_credit, .region_mode,
    .express_en, .pe_busy, .passive_flits, .active_flits, .express_flits, .topo_switches,
    .topo_stalls);
  cg_tb_sys_env #(.R(R), .C(C)) env (
    .clk, .rst_n, .mem_in, .mem_in_credit, .mem_out, .mem_out_credit, .region_mode,
    .express_en, .pe_busy, .passive_flits, .active_flits, .express_flits, .topo_switches,
    .topo_stalls);
endmodule
