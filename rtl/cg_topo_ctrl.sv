// Regional topology controller: selects mesh or C-Mesh for one concentration region (four PEs)
// of a chiplet and switches the region's multiplexers only when no packet can be cut.
//
// The controller watches the four PEs of its region. Each PE raises layer_end_req when it has
// finished a layer, together with the communication class of its next layer. When all four
// have done so, the controller picks the next topology: C-Mesh for loading from DRAM,
// reductions, up-sampling / reshape and chiplet-to-chiplet traffic, mesh for the neighbour
// exchange of a matrix multiplication (any PE asking for a C-Mesh class wins). If the topology
// does not change the PEs are released at once. Otherwise the switch waits until the network
// reports drained (no flit buffered or in flight), then mode flips and the PEs are released.
// Choosing the topology per layer from the layer's communication, one controller per region,
// and delaying the switch until no packet can be split are the published behaviour. Waiting
// for a drained network is this design's stricter form of the published rule (switch a
// virtual channel once its last flit is a tail flit): it also keeps the credit counters on
// both sides of a multiplexer correct.
// Timing: mode changes and ack pulses in the cycle after the condition holds; stalls counts
// the cycles spent waiting for the network to drain.
module cg_topo_ctrl
  import cg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  layer_end_req,
  input  comm_class_e layer_end_class [4],
  input  logic        drained,
  output topo_e       mode,
  output topo_e       mode_next,    // the mode after this clock edge
  output logic        ack,          // one-cycle pulse releasing the four PEs
  output logic [15:0] switches,     // topology changes so far
  output logic [15:0] stalls        // cycles a switch waited for the network to drain
);
  typedef enum logic [1:0] {C_RUN, C_WAIT} cstate_e;
  cstate_e state;
  topo_e   target, next_topo;

  always_comb begin
    next_topo = TOPO_MESH;
    for (int i = 0; i < 4; i++)
      if (layer_end_class[i] != CC_MATMUL) next_topo = TOPO_CMESH;
  end

  assign mode_next = (state == C_WAIT && drained) ? target : mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_RUN; mode <= TOPO_CMESH; target <= TOPO_CMESH; ack <= 1'b0;
      switches <= '0; stalls <= '0;
    end else begin
      ack <= 1'b0;
      unique case (state)
        C_RUN: if (&layer_end_req && !ack) begin
          if (next_topo == mode) ack <= 1'b1;
          else begin
            target <= next_topo;
            state  <= C_WAIT;
          end
        end
        C_WAIT: begin
          if (drained) begin
            mode     <= target;
            switches <= switches + 16'd1;
            ack      <= 1'b1;
            state    <= C_RUN;
          end else begin
            stalls <= stalls + 16'd1;
          end
        end
        default: state <= C_RUN;
      endcase
    end
  end
endmodule
