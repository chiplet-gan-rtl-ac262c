// Topology multiplexer / demultiplexer pair of the adaptive network.
//
// Connects one link endpoint E (a router port or a PE network interface) to one of two
// partner endpoints: partner 0 in the mesh topology, partner 1 in the C-Mesh topology. The
// forward flit link and the reverse credit pulses are both steered by sel: the demultiplexer
// sends E's flits and credits to the selected partner only, the multiplexer passes only the
// selected partner's flits and credits to E. The unselected partner sees an idle link.
// The multiplexers and demultiplexers in front of the routers are the published mechanism;
// carrying credits through them is this design's choice (the network uses credit flow
// control). sel may only change while the link is idle, which the regional topology
// controller guarantees. Purely combinational.
module cg_link_mux
  import cg_pkg::*;
(
  input  logic              sel,          // 0: mesh partner, 1: C-Mesh partner
  // endpoint E
  input  link_t             e_out,        // flits leaving E
  output link_t             e_in,         // flits arriving at E
  input  logic [NUM_VC-1:0] e_credit_out, // credits E returns for flits it received
  output logic [NUM_VC-1:0] e_credit_in,  // credits E receives for flits it sent
  // partners
  input  link_t             p_out        [2],
  output link_t             p_in         [2],
  input  logic [NUM_VC-1:0] p_credit_out [2],
  output logic [NUM_VC-1:0] p_credit_in  [2]
);
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      p_in[k]        = (int'(sel) == k) ? e_out : '0;
      p_credit_in[k] = (int'(sel) == k) ? e_credit_out : '0;
    end
    e_in        = p_out[sel];
    e_credit_in = p_credit_out[sel];
  end
endmodule
