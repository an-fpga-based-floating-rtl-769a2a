// fp_div: pipelined IEEE-754 binary64 divider, y = a / b.
//
// In the solver it is the "1/a" unit: a is the constant 1.0 and b a diagonal
// element a_ii, and the tag carries the row index i so that the reciprocal can
// be written to the D^-1 store. One operation per clock cycle; the result
// appears LAT cycles later (LAT = alpha_d = 58 by default, the latency of the
// divide core the solver was built with). The quotient is formed by integer
// division of the significands and rounded (nearest, ties to even; subnormals
// read and flushed as zero) in the first stage, then carried through LAT-1
// registers: latency and rate follow the solver, the inside is this design's.
module fp_div
  import jacobi_pkg::*;
#(
  parameter int unsigned LAT   = 58,
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

  initial assert (LAT >= 1) else $error("fp_div: LAT must be at least 1");

  fp64_t quo;
  always_comb quo = fp_div_f(a, b);

  delay_line #(.W(1 + 64 + TAG_W), .DEPTH(LAT)) u_pipe (
    .clk  (clk),
    .rst_n(rst_n),
    .d    ({in_valid, quo, in_tag}),
    .q    ({out_valid, y, out_tag})
  );

endmodule
