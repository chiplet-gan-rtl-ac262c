// Word-addressed on-PE SRAM (the activation SRAM and the weight SRAM of a PE).
//
// WORDS words of 32 bits, one write port and NRD read ports. Depth 244 words is the published
// size; the number of read ports and the asynchronous (same-cycle) read are this design's
// choice so that the PE can feed its 16 multipliers with 16 weights per cycle. Timing: a write
// takes effect at the clock edge; reads are combinational. Contents are not reset.
module cg_sram #(
  parameter int WORDS = 244,
  parameter int NRD   = 1,
  parameter int AW    = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr [NRD],
  output logic [31:0]   rdata [NRD]
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we && int'(waddr) < WORDS) mem[waddr] <= wdata;

  always_comb
    for (int i = 0; i < NRD; i++)
      rdata[i] = (int'(raddr[i]) < WORDS) ? mem[raddr[i]] : 32'd0;
endmodule
