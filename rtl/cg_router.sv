// Virtual-channel router with a five-stage pipeline, used for every router of the NoC inside a
// chiplet and for the NoP routers on the active interposer.
//
// A head flit goes through route calculation (RC), virtual-channel allocation (VA), switch
// allocation (SA), switch traversal (ST) and link traversal (LT), one cycle each; body and
// tail flits of an allocated packet go through SA, ST and LT. The five stages, the virtual
// channels and the crossbar follow the published router; the rest is this design's choice:
//   * each input port has NUM_VC virtual channels of VC_DEPTH flits, written when a flit
//     arrives (the LT cycle of the upstream router);
//   * credit-based flow control: one credit pulse per virtual channel travels upstream when a
//     flit leaves an input buffer; an output VC is held by one packet from its head to its tail;
//   * VA grants one output VC per output port per cycle; a packet keeps its virtual channel
//     number on every hop (cg_pkg::vc_of), which keeps the packets of one destination in order;
//   * SA is separable (one VC per input, then one input per output), arbiters round-robin;
//   * routing is deterministic X-then-Y, computed by cg_route_pkg: IS_NOP selects the NoP
//     routing function.
// The position inputs (chiplet / tile and router coordinates) are wired to constants by the
// parent so one module serves every router. region_cmesh gives, per concentration region of
// the chiplet, whether it is in C-Mesh; the routing function sends packets for those PEs to
// the region's corner router.
// Timing: a head flit written into an input buffer in cycle t is written into the next
// router's buffer in cycle t+5. vc_empty reports empty input buffers and idle an empty router,
// for the topology controllers.
module cg_router
  import cg_pkg::*;
  import cg_route_pkg::*;
#(
  parameter int NP     = 6,     // number of ports
  parameter bit IS_NOP = 1'b0   // 1: NoP router on the interposer
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        pos_r,        // NoC: chiplet row;    NoP: tile row
  input  logic [7:0]        pos_c,        // NoC: chiplet column; NoP: tile column
  input  logic [1:0]        node_r,       // NoC: router row in the chiplet
  input  logic [1:0]        node_c,       // NoC: router column in the chiplet
  input  logic [3:0]        region_cmesh, // NoC: regions currently in C-Mesh
  input  link_t             in_link   [NP],
  output logic [NUM_VC-1:0] in_credit [NP],
  output link_t             out_link  [NP],
  input  logic [NUM_VC-1:0] out_credit[NP],
  output logic [NUM_VC-1:0] vc_empty  [NP],
  output logic              idle          // no flit buffered or in the switch / link registers
);
  localparam int PW = (NP > 1) ? $clog2(NP) : 1;
  localparam int DW = $clog2(VC_DEPTH);
  localparam int CW = $clog2(VC_DEPTH + 1);

  typedef enum logic [1:0] {IV_IDLE, IV_VA, IV_ACTIVE} ivc_state_e;

  // input virtual channels
  flit_t          buffer  [NP][NUM_VC][VC_DEPTH];
  logic [DW-1:0]  wr_ptr  [NP][NUM_VC];
  logic [DW-1:0]  rd_ptr  [NP][NUM_VC];
  logic [CW-1:0]  count   [NP][NUM_VC];
  ivc_state_e     state   [NP][NUM_VC];
  logic [PW-1:0]  route   [NP][NUM_VC];
  logic [VCW-1:0] out_vc  [NP][NUM_VC];

  // output side
  logic           ovc_busy[NP][NUM_VC];
  logic [CW-1:0]  credits [NP][NUM_VC];
  link_t          sa_reg  [NP];          // flit that won switch allocation
  logic [PW-1:0]  va_ptr  [NP];
  logic [PW-1:0]  sa_out_ptr [NP];
  logic [VCW-1:0] sa_in_ptr  [NP];

  // --------------------------------------------------------------- allocation (combinational)
  logic           va_gnt  [NP];
  logic [PW-1:0]  va_in   [NP];
  logic [VCW-1:0] va_vc   [NP];
  logic [VCW-1:0] va_ovc  [NP];
  logic           in_pick [NP];
  logic [VCW-1:0] in_pick_vc [NP];
  logic           sa_gnt  [NP];
  logic [PW-1:0]  sa_in   [NP];
  logic [PW-1:0]  rc_port [NP][NUM_VC];

  function automatic flit_t front(input int i, input int v);
    return buffer[i][v][rd_ptr[i][v]];
  endfunction

  always_comb begin
    header_t h;
    int      idx, ii, vv;
    h = '0; idx = 0; ii = 0; vv = 0;
    for (int i = 0; i < NP; i++) begin
      va_gnt[i] = 1'b0; va_in[i] = '0; va_vc[i] = '0; va_ovc[i] = '0;
      in_pick[i] = 1'b0; in_pick_vc[i] = '0;
      sa_gnt[i] = 1'b0; sa_in[i] = '0;
    end

    // RC: route of the head flit at the front of each idle VC
    for (int i = 0; i < NP; i++)
      for (int v = 0; v < NUM_VC; v++) begin
        h = header_t'(buffer[i][v][rd_ptr[i][v]].data[HDR_W-1:0]);
        if (IS_NOP) rc_port[i][v] = PW'(nop_route(h.dst, pos_r, pos_c));
        else        rc_port[i][v] = PW'(noc_route(h.dst, pos_r, pos_c, node_r, node_c, region_cmesh));
      end

    // VA: per output port, one waiting input VC gets the output VC of the same number if free
    for (int o = 0; o < NP; o++)
      for (int k = 0; k < NP * NUM_VC; k++) begin
        idx = (int'(va_ptr[o]) * NUM_VC + k) % (NP * NUM_VC);
        ii  = idx / NUM_VC;
        vv  = idx % NUM_VC;
        if (!va_gnt[o] && state[ii][vv] == IV_VA && int'(route[ii][vv]) == o && !ovc_busy[o][vv]) begin
          va_gnt[o] = 1'b1;
          va_in[o]  = PW'(ii);
          va_vc[o]  = VCW'(vv);
          va_ovc[o] = VCW'(vv);
        end
      end

    // SA, input stage: one ready VC per input port
    for (int i = 0; i < NP; i++)
      for (int k = 0; k < NUM_VC; k++) begin
        vv = (int'(sa_in_ptr[i]) + k) % NUM_VC;
        if (!in_pick[i] && state[i][vv] == IV_ACTIVE && count[i][vv] != 0 &&
            credits[route[i][vv]][out_vc[i][vv]] != 0) begin
          in_pick[i]    = 1'b1;
          in_pick_vc[i] = VCW'(vv);
        end
      end
    // SA, output stage: one input port per output port
    for (int o = 0; o < NP; o++)
      for (int k = 0; k < NP; k++) begin
        ii = (int'(sa_out_ptr[o]) + k) % NP;
        if (!sa_gnt[o] && in_pick[ii] && int'(route[ii][in_pick_vc[ii]]) == o) begin
          sa_gnt[o] = 1'b1;
          sa_in[o]  = PW'(ii);
        end
      end
  end

  // --------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NP; i++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          wr_ptr[i][v]   <= '0;
          rd_ptr[i][v]   <= '0;
          count[i][v]    <= '0;
          state[i][v]    <= IV_IDLE;
          route[i][v]    <= '0;
          out_vc[i][v]   <= '0;
          ovc_busy[i][v] <= 1'b0;
          credits[i][v]  <= CW'(VC_DEPTH);
        end
        sa_reg[i]     <= '0;
        out_link[i]   <= '0;
        in_credit[i]  <= '0;
        va_ptr[i]     <= '0;
        sa_out_ptr[i] <= '0;
        sa_in_ptr[i]  <= '0;
      end
    end else begin
      logic [CW-1:0] cnt_next [NP][NUM_VC];
      logic [CW-1:0] cr_next  [NP][NUM_VC];
      for (int i = 0; i < NP; i++)
        for (int v = 0; v < NUM_VC; v++) begin
          cnt_next[i][v] = count[i][v];
          cr_next[i][v]  = credits[i][v];
        end

      // buffer write (link traversal of the upstream router ends here)
      for (int i = 0; i < NP; i++)
        if (in_link[i].valid) begin
          int v;
          v = int'(in_link[i].flit.vc);
          wr_ptr[i][v] <= DW'(wr_ptr[i][v] + 1'b1);
          cnt_next[i][v] = cnt_next[i][v] + 1'b1;
        end

      // RC
      for (int i = 0; i < NP; i++)
        for (int v = 0; v < NUM_VC; v++)
          if (state[i][v] == IV_IDLE && count[i][v] != 0 && front(i, v).ftype == FT_HEAD) begin
            route[i][v] <= rc_port[i][v];
            state[i][v] <= IV_VA;
          end

      // VA
      for (int o = 0; o < NP; o++)
        if (va_gnt[o]) begin
          state[va_in[o]][va_vc[o]]  <= IV_ACTIVE;
          out_vc[va_in[o]][va_vc[o]] <= va_ovc[o];
          ovc_busy[o][va_ovc[o]]     <= 1'b1;
          va_ptr[o] <= (int'(va_in[o]) == NP - 1) ? '0 : PW'(va_in[o] + 1'b1);
        end

      // SA: the winner leaves its input buffer; ST: sa_reg -> output register
      for (int i = 0; i < NP; i++) in_credit[i] <= '0;
      for (int o = 0; o < NP; o++) begin
        out_link[o] <= sa_reg[o];
        sa_reg[o].valid <= 1'b0;
        if (sa_gnt[o]) begin
          int i, v;
          flit_t f;
          i = int'(sa_in[o]);
          v = int'(in_pick_vc[i]);
          f = front(i, v);
          f.vc = out_vc[i][v];
          sa_reg[o].valid <= 1'b1;
          sa_reg[o].flit  <= f;
          rd_ptr[i][v] <= DW'(rd_ptr[i][v] + 1'b1);
          cnt_next[i][v] = cnt_next[i][v] - 1'b1;
          cr_next[o][out_vc[i][v]] = cr_next[o][out_vc[i][v]] - 1'b1;
          in_credit[i][v] <= 1'b1;
          if (f.ftype == FT_TAIL) begin
            state[i][v] <= IV_IDLE;
            ovc_busy[o][out_vc[i][v]] <= 1'b0;
          end
          sa_out_ptr[o] <= (i == NP - 1) ? '0 : PW'(i + 1);
          sa_in_ptr[i]  <= (v == NUM_VC - 1) ? '0 : VCW'(v + 1);
        end
      end

      // credits returned by the downstream routers
      for (int o = 0; o < NP; o++)
        for (int v = 0; v < NUM_VC; v++)
          if (out_credit[o][v]) cr_next[o][v] = cr_next[o][v] + 1'b1;

      for (int i = 0; i < NP; i++)
        for (int v = 0; v < NUM_VC; v++) begin
          count[i][v]   <= cnt_next[i][v];
          credits[i][v] <= cr_next[i][v];
        end
    end
  end

  // buffer storage, not reset: a slot is only read after it has been written
  always_ff @(posedge clk)
    for (int i = 0; i < NP; i++)
      if (in_link[i].valid)
        buffer[i][in_link[i].flit.vc][wr_ptr[i][in_link[i].flit.vc]] <= in_link[i].flit;

  always_comb begin
    idle = 1'b1;
    for (int i = 0; i < NP; i++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        vc_empty[i][v] = (count[i][v] == 0);
        if (count[i][v] != 0) idle = 1'b0;
      end
      if (sa_reg[i].valid || out_link[i].valid) idle = 1'b0;
    end
  end

  // a flit may only arrive on a virtual channel that has room (credit protocol)
  always_ff @(posedge clk)
    if (rst_n)
      for (int i = 0; i < NP; i++)
        assert (!in_link[i].valid || count[i][in_link[i].flit.vc] < CW'(VC_DEPTH))
          else $error("router: input %0d VC %0d overflow", i, in_link[i].flit.vc);
endmodule
