// fp_add: pipelined IEEE-754 binary64 adder/subtractor, y = a + b, or a - b
// when sub is set.
//
// One operation per clock cycle; the result appears LAT cycles later
// (LAT = alpha_a = 14 by default, the latency of the add core the solver was
// built with). The same unit serves as the tree adders, the reduce adders and
// the subtraction unit. The sum is formed and rounded (nearest, ties to even;
// subnormals read and flushed as zero, see jacobi_pkg) in the first stage and
// carried through LAT-1 more registers: latency and rate follow the solver,
// the inside of the pipeline is this design's own. A TAG_W-bit tag travels
// with each operation.
module fp_add
  import jacobi_pkg::*;
#(
  parameter int unsigned LAT   = 14,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp64_t            a,
  input  fp64_t            b,
  input  logic             sub,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp64_t            y,
  output logic [TAG_W-1:0] out_tag
);

  initial assert (LAT >= 1) else $error("fp_add: LAT must be at least 1");

  fp64_t sum;
  always_comb sum = fp_add_f(a, sub ? {~b[63], b[62:0]} : b);

  delay_line #(.W(1 + 64 + TAG_W), .DEPTH(LAT)) u_pipe (
    .clk  (clk),
    .rst_n(rst_n),
    .d    ({in_valid, sum, in_tag}),
    .q    ({out_valid, y, out_tag})
  );

endmodule
