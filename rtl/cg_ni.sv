// Network interface between a PE and its router port.
//
// Transmit: a whole packet (header and 48 payload words) is taken from the PE with a
// valid/ready handshake and sent as four flits (head flit carrying the header, then three
// payload flits, the last one marked tail), one flit per cycle while the router's input
// virtual channel has credit. The virtual channel is fixed by the destination (cg_pkg::vc_of).
// Receive: flits from the router land in one buffer per virtual channel (credit flow control,
// a credit goes back for every flit taken out); the interface rebuilds one packet at a time
// from a single virtual channel and hands it to the PE with a valid/ready handshake.
// The packet format (4 x 512-bit flits, 3 of payload) is the published one; the rest is this
// design's choice. vc_empty tells the topology controller that no flit waits here.
// Timing: the head flit leaves two cycles after the handshake when credit is available; a
// received packet is offered to the PE one cycle after its tail flit leaves the buffer.
module cg_ni
  import cg_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // PE side
  input  logic              tx_valid,
  output logic              tx_ready,
  input  packet_t           tx_pkt,
  output logic              rx_valid,
  input  logic              rx_ready,
  output packet_t           rx_pkt,
  // router side
  output link_t             out_link,
  input  logic [NUM_VC-1:0] out_credit,
  input  link_t             in_link,
  output logic [NUM_VC-1:0] in_credit,
  output logic              vc_empty,
  output logic              idle       // nothing buffered or being sent or rebuilt
);
  localparam int DW = $clog2(VC_DEPTH);
  localparam int CW = $clog2(VC_DEPTH + 1);

  // ------------------------------------------------------------------ transmit
  packet_t        tx_q;
  logic           tx_busy;
  logic [1:0]     tx_idx;
  logic [VCW-1:0] tx_vc;
  logic [CW-1:0]  credits [NUM_VC];
  logic           tx_fire;

  assign tx_ready = !tx_busy;
  assign tx_fire  = tx_busy && credits[tx_vc] != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_q <= '0; tx_busy <= 1'b0; tx_idx <= '0; tx_vc <= '0; out_link <= '0;
      for (int v = 0; v < NUM_VC; v++) credits[v] <= CW'(VC_DEPTH);
    end else begin
      out_link.valid <= 1'b0;
      if (tx_valid && tx_ready) begin
        tx_q    <= tx_pkt;
        tx_busy <= 1'b1;
        tx_idx  <= '0;
        tx_vc   <= VCW'(vc_of(tx_pkt.hdr.dst));
      end
      if (tx_fire) begin
        out_link.valid      <= 1'b1;
        out_link.flit.vc    <= tx_vc;
        out_link.flit.ftype <= (tx_idx == 2'd0) ? FT_HEAD : (tx_idx == 2'd3) ? FT_TAIL : FT_BODY;
        if (tx_idx == 2'd0) out_link.flit.data <= FLIT_W'(tx_q.hdr);
        else                out_link.flit.data <= tx_q.payload[(int'(tx_idx) - 1) * FLIT_W +: FLIT_W];
        tx_idx <= tx_idx + 2'd1;
        if (tx_idx == 2'd3) tx_busy <= 1'b0;
      end
      for (int v = 0; v < NUM_VC; v++)
        credits[v] <= credits[v] + CW'(out_credit[v]) - CW'(tx_fire && int'(tx_vc) == v);
    end
  end

  // ------------------------------------------------------------------ receive
  flit_t          rbuf   [NUM_VC][VC_DEPTH];
  logic [DW-1:0]  rwr    [NUM_VC];
  logic [DW-1:0]  rrd    [NUM_VC];
  logic [CW-1:0]  rcnt   [NUM_VC];
  logic           rx_act;          // a packet is being rebuilt
  logic [VCW-1:0] rx_vc;
  logic [1:0]     rx_idx;
  logic           pop;
  logic [VCW-1:0] pop_vc;
  flit_t          pop_flit;

  always_comb begin
    pop = 1'b0; pop_vc = rx_vc;
    if (!rx_valid) begin
      if (rx_act) begin
        pop = (rcnt[rx_vc] != 0);
      end else begin
        for (int v = NUM_VC - 1; v >= 0; v--)
          if (rcnt[v] != 0 && rbuf[v][rrd[v]].ftype == FT_HEAD) begin
            pop = 1'b1; pop_vc = VCW'(v);
          end
      end
    end
    pop_flit = rbuf[pop_vc][rrd[pop_vc]];
  end

  always_ff @(posedge clk)
    if (in_link.valid) rbuf[in_link.flit.vc][rwr[in_link.flit.vc]] <= in_link.flit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) begin rwr[v] <= '0; rrd[v] <= '0; rcnt[v] <= '0; end
      rx_act <= 1'b0; rx_vc <= '0; rx_idx <= '0; rx_valid <= 1'b0; rx_pkt <= '0; in_credit <= '0;
    end else begin
      in_credit <= '0;
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      if (in_link.valid) rwr[in_link.flit.vc] <= rwr[in_link.flit.vc] + 1'b1;
      for (int v = 0; v < NUM_VC; v++)
        rcnt[v] <= rcnt[v] + CW'(in_link.valid && int'(in_link.flit.vc) == v)
                           - CW'(pop && pop_vc == VCW'(v));
      if (pop) begin
        rrd[pop_vc] <= rrd[pop_vc] + 1'b1;
        in_credit[pop_vc] <= 1'b1;
        rx_vc <= pop_vc;
        if (!rx_act) begin
          rx_act <= 1'b1;
          rx_idx <= 2'd1;
          rx_pkt.hdr <= header_t'(pop_flit.data[HDR_W-1:0]);
        end else begin
          rx_pkt.payload[(int'(rx_idx) - 1) * FLIT_W +: FLIT_W] <= pop_flit.data;
          rx_idx <= rx_idx + 2'd1;
          if (pop_flit.ftype == FT_TAIL) begin
            rx_act   <= 1'b0;
            rx_valid <= 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    vc_empty = 1'b1;
    for (int v = 0; v < NUM_VC; v++) if (rcnt[v] != 0) vc_empty = 1'b0;
  end
  assign idle = vc_empty && !rx_act && !tx_busy && !out_link.valid;
endmodule
