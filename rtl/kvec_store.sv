// kvec_store: block-RAM store of DEPTH words, each word a k-vector of LANES
// elements of W bits.
//
// A whole k-vector is written per clock cycle (wr_en, wr_addr, wr_data), which
// is how the solver loads x, b and ptr: one k-vector per cycle. NRD read ports
// each return a whole word one cycle after its address (synchronous read, as a
// block RAM does); callers pick a lane from it. Element e of a vector lives in
// word e / LANES, lane e % LANES, so the lanes of one word are the k separate
// block RAMs the vector is strided across. A read of the word being written
// returns the old contents. The store itself is not reset. LANES = 1 gives a
// plain one-value-per-word store (used for D^-1).
module kvec_store #(
  parameter int unsigned LANES = 8,
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NRD   = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                            clk,
  input  logic                            wr_en,
  input  logic [AW-1:0]                   wr_addr,
  input  logic [LANES-1:0][W-1:0]         wr_data,
  input  logic [NRD-1:0][AW-1:0]          rd_addr,
  output logic [NRD-1:0][LANES-1:0][W-1:0] rd_data
);

  logic [LANES-1:0][W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  for (genvar p = 0; p < int'(NRD); p++) begin : g_rd
    always_ff @(posedge clk) rd_data[p] <= mem[rd_addr[p]];
  end

endmodule
