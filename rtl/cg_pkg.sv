// Shared constants and types of the chiplet GAN accelerator.
//
// Flits are 512 bits wide (link width), a packet is four flits: one head flit that carries
// a packet header and three payload flits (3 x 512 bit = 48 words of 32 bits). Link width,
// packet size, payload size, the 4x4 PE array per chiplet, the 4x4 chiplets, the 16
// multipliers / adders and the SRAM depths are the published configuration. The header
// layout, the command set of a PE and the virtual-channel counts are this design's choices.
package cg_pkg;

  // ---------------------------------------------------------------- configuration
  localparam int FLIT_W        = 512;   // link width
  localparam int PKT_FLITS     = 4;     // flits per packet
  localparam int PAYLOAD_FLITS = 3;     // payload flits per packet
  localparam int WORD_W        = 32;    // FP32 data words
  localparam int WORDS_PER_FLIT = FLIT_W / WORD_W;                 // 16
  localparam int PAYLOAD_WORDS  = PAYLOAD_FLITS * WORDS_PER_FLIT;  // 48
  localparam int NUM_VC        = 2;     // virtual channels per port
  localparam int VC_DEPTH      = 4;     // flits per virtual channel buffer
  localparam int VCW           = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;
  localparam int PE_DIM        = 4;     // 4x4 PEs per chiplet
  localparam int NUM_LANES     = 16;    // multipliers / adders per PE
  localparam int ACC_WORDS     = 144;   // accumulation buffer words
  localparam int SRAM_WORDS    = 244;   // activation and weight SRAM words
  localparam int NUM_LOCAL     = 4;     // local ports of a router (PE ports in C-Mesh)

  // ---------------------------------------------------------------- flits
  typedef enum logic [1:0] {FT_HEAD = 2'd0, FT_BODY = 2'd1, FT_TAIL = 2'd2} flit_type_e;

  typedef struct packed {
    flit_type_e         ftype;
    logic [VCW-1:0]     vc;
    logic [FLIT_W-1:0]  data;
  } flit_t;

  // forward half of a link; the reverse half is one credit pulse per virtual channel
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  // ---------------------------------------------------------------- packet header
  typedef enum logic [3:0] {
    OP_WR_ACT    = 4'd0,   // payload -> activation SRAM
    OP_WR_WGT    = 4'd1,   // payload -> weight SRAM
    OP_WR_ACC    = 4'd2,   // payload -> accumulation buffer
    OP_MATMUL    = 4'd3,   // acc[M x P] += act[M x N] * wgt[N x P]
    OP_RELU      = 4'd4,   // act[dst..] = relu(acc[src..])
    OP_STATS     = 4'd5,   // stats += (sum x, sum x^2) over acc[src..]
    OP_UPSAMPLE  = 4'd6,   // act = up-sampled acc (nearest or zero insertion)
    OP_RESHAPE   = 4'd7,   // act = transpose of acc
    OP_NORM      = 4'd8,   // act = (acc - a) * b
    OP_STAT_ACC  = 4'd9,   // payload words 0,1 added to stats (reduction)
    OP_SEND      = 4'd10,  // send act/acc words to another node
    OP_SEND_STAT = 4'd11,  // send stats to another node as OP_STAT_ACC
    OP_LAYER_END = 4'd12,  // layer finished; arg m = next communication class
    OP_RESP      = 4'd13   // data returned to a memory port / host
  } opcode_e;

  // communication class of the next layer, used by the regional topology controller
  typedef enum logic [2:0] {
    CC_LOAD      = 3'd0,   // load PE SRAMs from DRAM
    CC_MATMUL    = 3'd1,   // neighbour exchange during matrix multiplication
    CC_REDUCE    = 3'd2,   // reduction of activation statistics
    CC_RESHAPE   = 3'd3,   // up-sampling / matrix reshape
    CC_CHIPLET   = 3'd4    // chiplet-to-chiplet or DRAM traffic
  } comm_class_e;

  typedef enum logic {TOPO_MESH = 1'b0, TOPO_CMESH = 1'b1} topo_e;

  typedef struct packed {
    logic [7:0] chip_r;    // chiplet row in the package
    logic [7:0] chip_c;    // chiplet column in the package
    logic [1:0] node_r;    // router / PE row in the chiplet
    logic [1:0] node_c;    // router / PE column in the chiplet
    logic       mem;       // 1: the memory port of corner router (node_r, node_c)
  } node_addr_t;

  typedef struct packed {
    node_addr_t dst;
    node_addr_t src;
    opcode_e    op;
    logic [7:0] len;       // payload words used
    logic [7:0] addr;      // first word in the target memory
    logic [7:0] addr2;     // second address (destination of an operation)
    logic [7:0] addr3;     // OP_MATMUL: first accumulation buffer word
    logic [7:0] m;         // rows / element count / communication class
    logic [7:0] n;         // inner dimension / columns
    logic [7:0] p;         // output columns / up-sampling factor
    logic       flag;      // OP_UPSAMPLE: 1 zero insertion, 0 nearest neighbour; OP_SEND: 1 from acc
    logic [3:0] rop;       // OP_SEND: opcode of the packet that is sent
    node_addr_t rdst;      // OP_SEND / OP_SEND_STAT: where to send
    logic [31:0] a;        // OP_NORM: subtrahend (FP32)
    logic [31:0] b;        // OP_NORM: scale (FP32)
  } header_t;

  localparam int HDR_W = $bits(header_t);

  // router port numbers. NoC router: four directions, the memory port, then the local PE
  // ports (one, or four at a corner router that concentrates its region in C-Mesh).
  // NoP router: four directions to other chiplet tiles, then one port per chiplet of the tile.
  localparam int P_XP  = 0;   // +X: next column
  localparam int P_XN  = 1;   // -X: previous column
  localparam int P_YP  = 2;   // +Y: next row
  localparam int P_YN  = 3;   // -Y: previous row
  localparam int P_MEM = 4;   // NoC: memory interface
  localparam int P_LOC = 5;   // NoC: first PE port
  localparam int P_CHIPLET = 4;   // NoP: first chiplet port

  // Virtual channel of a packet, fixed from source to destination: every router keeps a packet
  // on the virtual channel it arrived on, so the packets of one destination follow one chain of
  // FIFOs and arrive in the order they were sent.
  function automatic int vc_of(input node_addr_t dst);
    logic [1:0] x;
    x = dst.node_r ^ dst.node_c ^ dst.chip_r[1:0] ^ dst.chip_c[1:0];
    return int'(x) % NUM_VC;
  endfunction

  typedef struct packed {
    header_t                       hdr;
    logic [PAYLOAD_WORDS*WORD_W-1:0] payload;   // word i at bits [32*i +: 32]
  } packet_t;

endpackage
