// Processing element: PE controller, activation SRAM, weight SRAM, multiplier array with its
// crossbar and accumulation buffer, and the activation computation unit.
//
// The PE controller executes one received packet (command) at a time:
//   OP_WR_ACT / OP_WR_WGT / OP_WR_ACC  store len payload words from addr on, one per cycle
//   OP_MATMUL   acc[addr3 + i*P + j] += sum_k act[addr + i*N + k] * wgt[addr2 + k*P + j]
//               for an M x N by N x P product (m, n, p); flag clears the buffer first.
//               Output stationary: for each output row i and each group of 16 output
//               columns, the controller walks k, broadcasting one activation and reading 16
//               weights, so the partial sums never leave the accumulation buffer.
//               M * ceil(P/16) * N cycles.
//   OP_RELU / OP_NORM / OP_STATS / OP_UPSAMPLE / OP_RESHAPE  run the activation unit
//               (source addr in the buffer, destination addr2 in the activation SRAM)
//   OP_STAT_ACC add the (sum, sum of squares) pair in payload words 0 and 1 to the statistics
//   OP_SEND     send len words of the activation SRAM (flag 0) or accumulation buffer (flag 1)
//               from addr to node rdst, as a packet with opcode rop and address addr2
//   OP_SEND_STAT send the statistics to rdst as an OP_STAT_ACC packet
//   OP_LAYER_END report the end of a layer and the communication class (m) of the next one
//               to the regional topology controller, and wait for its acknowledgement
// The blocks inside the PE, the output-stationary dataflow and the sizes (16 multipliers,
// 144-word accumulation buffer, 244-word SRAMs) follow the published PE. The command set, the
// packet-per-command interface and the sequencing are this design's choices.
// Interface: packets in from the network interface (rx_*), packets out (tx_*), both
// valid/ready; layer_end_req / layer_end_class / layer_end_ack to the topology controller.
module cg_pe
  import cg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  node_addr_t  my_addr,
  input  logic        rx_valid,
  output logic        rx_ready,
  input  packet_t     rx_pkt,
  output logic        tx_valid,
  input  logic        tx_ready,
  output packet_t     tx_pkt,
  output logic        layer_end_req,
  output comm_class_e layer_end_class,
  input  logic        layer_end_ack,
  output logic        busy
);
  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_MATMUL, S_ACT, S_GATHER, S_TX, S_LAYER_END} state_e;

  state_e      state;
  header_t     h;
  logic [PAYLOAD_WORDS*WORD_W-1:0] pl;
  logic [7:0]  idx, mi, mj, mk;
  logic        stat_pending, act_started;

  // memories and units
  logic        act_we, wgt_we;
  logic [7:0]  act_waddr, wgt_waddr;
  logic [31:0] act_wdata, wgt_wdata;
  logic [7:0]  act_raddr [1];
  logic [31:0] act_rdata [1];
  logic [7:0]  wgt_raddr [NUM_LANES];
  logic [31:0] wgt_rdata [NUM_LANES];
  logic        mac_en, mac_clear, acc_we;
  logic [NUM_LANES-1:0] lane_en;
  logic [7:0]  acc_waddr, acc_raddr, mac_base;
  logic [31:0] acc_wdata, acc_rdata;
  logic        au_start, au_busy, au_done, au_act_we, stat_add;
  logic [7:0]  au_acc_raddr, au_act_waddr;
  logic [31:0] au_act_wdata, stat_sum, stat_sq;

  cg_sram #(.WORDS(SRAM_WORDS), .NRD(1)) u_act (
    .clk, .we(act_we), .waddr(act_waddr), .wdata(act_wdata), .raddr(act_raddr), .rdata(act_rdata));
  cg_sram #(.WORDS(SRAM_WORDS), .NRD(NUM_LANES)) u_wgt (
    .clk, .we(wgt_we), .waddr(wgt_waddr), .wdata(wgt_wdata), .raddr(wgt_raddr), .rdata(wgt_rdata));

  cg_mac_array u_mac (
    .clk, .rst_n, .clear(mac_clear), .en(mac_en), .a(act_rdata[0]), .b(wgt_rdata),
    .lane_en, .base(mac_base), .wr_en(acc_we), .wr_addr(acc_waddr), .wr_data(acc_wdata),
    .rd_addr(acc_raddr), .rd_data(acc_rdata));

  cg_act_unit u_au (
    .clk, .rst_n, .start(au_start), .op(h.op), .src(h.addr), .dst(h.addr2), .m(h.m), .n(h.n),
    .f(h.p), .zero_ins(h.flag), .clear_stats(h.flag), .a(h.a), .b(h.b),
    .acc_raddr(au_acc_raddr), .acc_rdata(acc_rdata),
    .act_we(au_act_we), .act_waddr(au_act_waddr), .act_wdata(au_act_wdata),
    .stat_add, .stat_add_sum(pl[31:0]), .stat_add_sq(pl[63:32]),
    .stat_sum, .stat_sq, .busy(au_busy), .done(au_done));

  function automatic logic [31:0] word(input logic [PAYLOAD_WORDS*WORD_W-1:0] p, input logic [7:0] k);
    return p[int'(k) * WORD_W +: WORD_W];
  endfunction

  // ------------------------------------------------------------------ datapath control
  always_comb begin
    logic [7:0] col;
    rx_ready  = (state == S_IDLE);
    busy      = (state != S_IDLE);
    act_we    = 1'b0; act_waddr = h.addr + idx; act_wdata = word(pl, idx);
    wgt_we    = 1'b0; wgt_waddr = h.addr + idx; wgt_wdata = word(pl, idx);
    acc_we    = 1'b0; acc_waddr = h.addr + idx; acc_wdata = word(pl, idx);
    act_raddr[0] = h.addr + idx;
    acc_raddr    = h.addr + idx;
    mac_en    = 1'b0;
    mac_clear = 1'b0;
    mac_base  = h.addr3 + 8'(mi * h.p) + mj;
    lane_en   = '0;
    for (int l = 0; l < NUM_LANES; l++) begin
      col = mj + 8'(l);
      wgt_raddr[l] = h.addr2 + 8'(mk * h.p) + col;
      lane_en[l]   = (col < h.p);
    end
    unique case (state)
      S_WRITE: begin
        act_we = (h.op == OP_WR_ACT);
        wgt_we = (h.op == OP_WR_WGT);
        acc_we = (h.op == OP_WR_ACC);
      end
      S_MATMUL: begin
        act_raddr[0] = h.addr + 8'(mi * h.n) + mk;
        mac_en = 1'b1;
      end
      S_ACT: begin
        acc_raddr = au_acc_raddr;
        act_we    = au_act_we;
        act_waddr = au_act_waddr;
        act_wdata = au_act_wdata;
      end
      default: ;
    endcase
    if (state == S_IDLE && rx_valid && rx_pkt.hdr.op == OP_MATMUL) mac_clear = rx_pkt.hdr.flag;
    // OP_STAT_ACC is applied in the cycle after the packet is latched, from the payload register
    stat_add = stat_pending;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; h <= '0; pl <= '0; idx <= '0; mi <= '0; mj <= '0; mk <= '0;
      tx_valid <= 1'b0; tx_pkt <= '0; layer_end_req <= 1'b0; layer_end_class <= CC_LOAD;
      stat_pending <= 1'b0;
    end else begin
      stat_pending <= 1'b0;
      unique case (state)
        S_IDLE: if (rx_valid) begin
          h <= rx_pkt.hdr; pl <= rx_pkt.payload; idx <= '0; mi <= '0; mj <= '0; mk <= '0;
          unique case (rx_pkt.hdr.op)
            OP_WR_ACT, OP_WR_WGT, OP_WR_ACC:
              state <= (rx_pkt.hdr.len == 0) ? S_IDLE : S_WRITE;
            OP_MATMUL:
              state <= (rx_pkt.hdr.m == 0 || rx_pkt.hdr.n == 0 || rx_pkt.hdr.p == 0) ? S_IDLE : S_MATMUL;
            OP_RELU, OP_NORM, OP_STATS, OP_UPSAMPLE, OP_RESHAPE:
              state <= S_ACT;
            OP_SEND: begin
              tx_pkt.hdr      <= '0;
              tx_pkt.hdr.dst  <= rx_pkt.hdr.rdst;
              tx_pkt.hdr.src  <= my_addr;
              tx_pkt.hdr.op   <= opcode_e'(rx_pkt.hdr.rop);
              tx_pkt.hdr.len  <= rx_pkt.hdr.len;
              tx_pkt.hdr.addr <= rx_pkt.hdr.addr2;
              tx_pkt.payload  <= '0;
              state <= (rx_pkt.hdr.len == 0) ? S_TX : S_GATHER;
            end
            OP_SEND_STAT: begin
              tx_pkt.hdr      <= '0;
              tx_pkt.hdr.dst  <= rx_pkt.hdr.rdst;
              tx_pkt.hdr.src  <= my_addr;
              tx_pkt.hdr.op   <= OP_STAT_ACC;
              tx_pkt.hdr.len  <= 8'd2;
              tx_pkt.payload  <= {{(PAYLOAD_WORDS - 2) * WORD_W{1'b0}}, stat_sq, stat_sum};
              state <= S_TX;
            end
            OP_LAYER_END: begin
              layer_end_req   <= 1'b1;
              layer_end_class <= comm_class_e'(rx_pkt.hdr.m[2:0]);
              state <= S_LAYER_END;
            end
            OP_STAT_ACC: stat_pending <= 1'b1;
            default: state <= S_IDLE;   // OP_RESP is not for a PE
          endcase
        end
        S_WRITE: begin
          idx <= idx + 8'd1;
          if (idx + 8'd1 >= h.len || idx + 8'd1 >= 8'(PAYLOAD_WORDS)) state <= S_IDLE;
        end
        S_MATMUL: begin
          if (mk + 8'd1 < h.n) mk <= mk + 8'd1;
          else begin
            mk <= '0;
            if (mj + 8'(NUM_LANES) < h.p) mj <= mj + 8'(NUM_LANES);
            else begin
              mj <= '0;
              if (mi + 8'd1 < h.m) mi <= mi + 8'd1;
              else state <= S_IDLE;
            end
          end
        end
        S_ACT: if (au_done) state <= S_IDLE;
        S_GATHER: begin
          tx_pkt.payload[int'(idx) * WORD_W +: WORD_W] <= h.flag ? acc_rdata : act_rdata[0];
          idx <= idx + 8'd1;
          if (idx + 8'd1 >= h.len || idx + 8'd1 >= 8'(PAYLOAD_WORDS)) state <= S_TX;
        end
        S_TX: begin
          if (!tx_valid) tx_valid <= 1'b1;
          else if (tx_ready) begin
            tx_valid <= 1'b0;
            state    <= S_IDLE;
          end
        end
        S_LAYER_END: if (layer_end_ack) begin
          layer_end_req <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the activation unit starts in the cycle after the command is latched
  assign au_start = (state == S_ACT) && !au_busy && !au_done && !act_started;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) act_started <= 1'b0;
    else if (state != S_ACT) act_started <= 1'b0;
    else if (au_start) act_started <= 1'b1;
endmodule
