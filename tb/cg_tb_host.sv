// Testbench endpoint for one flit link: stands in for a memory interface or host at a router
// port. Packets queued with send() go out as four flits with credit flow control, on the virtual
// channel of their destination; every arriving flit is accepted at once (its credit goes
// back the next cycle) and complete packets are collected in rxq, per virtual channel.
module cg_tb_host
  import cg_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  output link_t             out_link,
  input  logic [NUM_VC-1:0] out_credit,
  input  link_t             in_link,
  output logic [NUM_VC-1:0] in_credit
);
  packet_t txq[$];
  packet_t rxq[$];
  int      credits [NUM_VC];
  packet_t cur;
  int      idx, vc, sent_pkts;
  bit      busy;
  packet_t asm_pkt [NUM_VC];
  int      asm_idx [NUM_VC];
  int      credit_violations;

  task automatic send(input packet_t p);
    txq.push_back(p);
  endtask

  function automatic int rx_count();
    return rxq.size();
  endfunction

  function automatic packet_t rx_pop();
    return rxq.pop_front();
  endfunction

  function automatic bit tx_empty();
    return txq.size() == 0 && !busy;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_link <= '0; in_credit <= '0; busy = 0; idx = 0; vc = 0; sent_pkts = 0;
      credit_violations = 0;
      for (int v = 0; v < NUM_VC; v++) begin credits[v] = VC_DEPTH; asm_idx[v] = 0; end
    end else begin
      for (int v = 0; v < NUM_VC; v++) if (out_credit[v]) credits[v]++;
      out_link <= '0;
      if (!busy && txq.size() > 0) begin
        cur = txq.pop_front();
        busy = 1; idx = 0; vc = vc_of(cur.hdr.dst); sent_pkts++;
      end
      if (busy && credits[vc] > 0) begin
        link_t l;
        l.valid = 1'b1;
        l.flit.vc = VCW'(vc);
        l.flit.ftype = (idx == 0) ? FT_HEAD : (idx == 3) ? FT_TAIL : FT_BODY;
        l.flit.data = (idx == 0) ? FLIT_W'(cur.hdr) : cur.payload[(idx - 1) * FLIT_W +: FLIT_W];
        out_link <= l;
        credits[vc]--;
        idx++;
        if (idx == 4) busy = 0;
      end
      // receive
      in_credit <= '0;
      if (in_link.valid) begin
        int v;
        v = int'(in_link.flit.vc);
        in_credit[v] <= 1'b1;
        if (asm_idx[v] == 0) begin
          if (in_link.flit.ftype != FT_HEAD) credit_violations++;
          asm_pkt[v] = '0;
          asm_pkt[v].hdr = header_t'(in_link.flit.data[HDR_W-1:0]);
        end else
          asm_pkt[v].payload[(asm_idx[v] - 1) * FLIT_W +: FLIT_W] = in_link.flit.data;
        asm_idx[v]++;
        if (in_link.flit.ftype == FT_TAIL) begin
          rxq.push_back(asm_pkt[v]);
          asm_idx[v] = 0;
        end
      end
    end
  end
endmodule
