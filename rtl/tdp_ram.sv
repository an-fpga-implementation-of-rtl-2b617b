// tdp_ram: two-port synchronous RAM, the storage element of the decoder.
//
// The decoder uses it for the received-symbol RAMs (128 x 32: I1,I2,Q1,Q2 of
// one trellis pair), the forward and backward state metric RAMs (64 x 72:
// eight 9-bit metrics) and the extrinsic RAMs (128 x 36: Ex0..Ex3), the sizes
// given for the design; the phase-sector and decision buffers are this
// design's own additions of the same kind.
//
// Both ports can read and write. A write is split into LANES equal lanes
// with one enable each, so a word can be filled in parts. Reads are
// registered: rdata shows the word at the address presented one clock
// earlier (old data when the same port writes it in that clock). Writing the
// same address from both ports in one clock is not allowed; port B wins.
// The array has no reset, as a block RAM has none.
module tdp_ram #(
  parameter int DEPTH = 128,
  parameter int WIDTH = 32,
  parameter int LANES = 1,
  localparam int AW = $clog2(DEPTH),
  localparam int LW = WIDTH / LANES
) (
  input  logic             clk,
  input  logic [LANES-1:0] a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic [LANES-1:0] b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
    for (int l = 0; l < LANES; l++) begin
      if (a_we[l]) mem[a_addr][l*LW +: LW] <= a_wdata[l*LW +: LW];
      if (b_we[l]) mem[b_addr][l*LW +: LW] <= b_wdata[l*LW +: LW];
    end
  end

  initial assert (WIDTH % LANES == 0) else $error("WIDTH must be a multiple of LANES");

endmodule
