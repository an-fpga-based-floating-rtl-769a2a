// fp_mul: pipelined IEEE-754 binary64 multiplier, y = a * b.
//
// One operation is accepted every clock cycle; its result appears LAT cycles
// later (LAT = alpha_m = 10 by default, the latency of the multiply core the
// solver was built with). The product is formed and rounded (nearest, ties to
// even; subnormals read and flushed as zero, see jacobi_pkg) in the first
// stage and then carried through LAT-1 more registers; only the latency and
// the one-per-cycle rate are taken from the solver's cores, the inside of the
// pipeline is this design's own. A tag of TAG_W bits travels with each
// operation and leaves with its result.
module fp_mul
  import jacobi_pkg::*;
#(
  parameter int unsigned LAT   = 10,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp64_t            a,
  input  fp64_t            b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp64_t            y,
  output logic [TAG_W-1:0] out_tag
);

  initial assert (LAT >= 1) else $error("fp_mul: LAT must be at least 1");

  fp64_t prod;
  always_comb prod = fp_mul_f(a, b);

  delay_line #(.W(1 + 64 + TAG_W), .DEPTH(LAT)) u_pipe (
    .clk  (clk),
    .rst_n(rst_n),
    .d    ({in_valid, prod, in_tag}),
    .q    ({out_valid, y, out_tag})
  );

endmodule
