// Multiplier array, product crossbar and accumulation buffer of a PE (output stationary).
//
// Each enabled cycle the 16 FP32 multipliers form a * b[l] for lanes l = 0..15, where the
// activation a is broadcast and b[l] are 16 weights. Lane l contributes to output element
// o = base + l of the accumulation buffer. The buffer is 16 banks of 9 words (144 words,
// element o in bank o % 16, entry o / 16), each bank with its own FP32 adder, so 16
// consecutive elements always fall into 16 different banks. The crossbar rotates the lane
// products by base % 16 onto the banks, and each bank adds its product to the addressed word
// in the same cycle. The multiplier and adder counts, the 144-word buffer, FP32 arithmetic,
// the crossbar and the output-stationary dataflow follow the published PE; the bank
// organisation and the rotation are this design's choice.
// Other ports: a write port (wr_*) that overwrites one word, a clear that zeroes the buffer, and
// one combinational read port. Timing: one multiply-accumulate step per cycle, visible on
// the read port in the next cycle. Write and accumulate in the same cycle are not allowed.
module cg_mac_array
  import cg_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  logic [31:0]         a,
  input  logic [31:0]         b        [NUM_LANES],
  input  logic [NUM_LANES-1:0] lane_en,
  input  logic [7:0]          base,
  input  logic                wr_en,
  input  logic [7:0]          wr_addr,
  input  logic [31:0]         wr_data,
  input  logic [7:0]          rd_addr,
  output logic [31:0]         rd_data
);
  localparam int ENTRIES = ACC_WORDS / NUM_LANES;   // 9

  logic [31:0] acc  [NUM_LANES][ENTRIES];
  logic [31:0] prod [NUM_LANES];
  logic [31:0] xb_prod  [NUM_LANES];   // crossbar outputs, one per bank
  logic [3:0]  xb_entry [NUM_LANES];
  logic        xb_valid [NUM_LANES];
  logic [31:0] sum  [NUM_LANES];

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_mul
    cg_fp_mul u_mul (.a(a), .b(b[l]), .y(prod[l]));
  end

  // crossbar: bank k takes the lane whose element falls into bank k
  always_comb
    for (int k = 0; k < NUM_LANES; k++) begin
      logic [3:0] lane;
      logic [8:0] o;
      lane = 4'(k) - base[3:0];
      o    = {1'b0, base} + {5'd0, lane};
      xb_prod[k]  = prod[lane];
      xb_entry[k] = o[7:4];
      xb_valid[k] = en && lane_en[lane] && (int'(o) < ACC_WORDS);
    end

  for (genvar k = 0; k < NUM_LANES; k++) begin : g_add
    cg_fp_add u_add (.a(acc[k][xb_entry[k] < 4'(ENTRIES) ? xb_entry[k] : 4'd0]), .b(xb_prod[k]), .y(sum[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_LANES; k++)
        for (int e = 0; e < ENTRIES; e++) acc[k][e] <= '0;
    end else if (clear) begin
      for (int k = 0; k < NUM_LANES; k++)
        for (int e = 0; e < ENTRIES; e++) acc[k][e] <= '0;
    end else begin
      for (int k = 0; k < NUM_LANES; k++)
        if (xb_valid[k]) acc[k][xb_entry[k]] <= sum[k];
      if (wr_en && int'(wr_addr) < ACC_WORDS) acc[wr_addr[3:0]][wr_addr[7:4]] <= wr_data;
    end
  end

  assign rd_data = (int'(rd_addr) < ACC_WORDS) ? acc[rd_addr[3:0]][rd_addr[7:4]] : 32'd0;
endmodule
