// reduction_tree: the binary reduction tree of the Jacobi solver.
//
// K leaf multipliers form a_h * x_h for the K lanes of one k-vector; lg K
// levels of adders sum them pairwise, lane 2j with lane 2j+1, into one partial
// sum. A new k-vector is accepted every clock cycle and its partial sum leaves
// the root ALPHA_M + ALPHA_A * lg K cycles later (52 cycles for K = 8,
// ALPHA_M = 10, ALPHA_A = 14). Lanes flagged in ign are ignored: their matrix
// value is replaced by zero before the multiplier, which is how the row
// counter removes the diagonal term a_ii x_i (and, in the sparse circuit,
// unused lanes). The tag (row-end flag) travels in step with the data. K must
// be a power of two. Structure and latency follow the solver's specification;
// zeroing the matrix operand to ignore a lane is this design's own choice.
module reduction_tree
  import jacobi_pkg::*;
#(
  parameter int unsigned K       = 8,
  parameter int unsigned ALPHA_M = 10,
  parameter int unsigned ALPHA_A = 14,
  parameter int unsigned TAG_W   = 1,
  localparam int unsigned LGK    = (K > 1) ? $clog2(K) : 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp64_t [K-1:0]    a,
  input  fp64_t [K-1:0]    x,
  input  logic  [K-1:0]    ign,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp64_t            sum,
  output logic [TAG_W-1:0] out_tag
);

  initial assert (K == (1 << LGK)) else $error("reduction_tree: K must be a power of two");

  // node values per level; level 0 holds the products
  fp64_t node  [LGK+1][K];
  logic  nodev [LGK+1][K];

  for (genvar h = 0; h < int'(K); h++) begin : g_leaf
    fp_mul #(.LAT(ALPHA_M), .TAG_W(1)) u_mul (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .a        (ign[h] ? FP_ZERO : a[h]),
      .b        (x[h]),
      .in_tag   (1'b0),
      .out_valid(nodev[0][h]),
      .y        (node[0][h]),
      .out_tag  ()
    );
  end

  for (genvar l = 0; l < int'(LGK); l++) begin : g_lvl
    for (genvar j = 0; j < int'(K >> (l + 1)); j++) begin : g_node
      fp_add #(.LAT(ALPHA_A), .TAG_W(1)) u_add (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (nodev[l][2*j]),
        .a        (node[l][2*j]),
        .b        (node[l][2*j+1]),
        .sub      (1'b0),
        .in_tag   (1'b0),
        .out_valid(nodev[l+1][j]),
        .y        (node[l+1][j]),
        .out_tag  ()
      );
    end
  end

  assign out_valid = nodev[LGK][0];
  assign sum       = node[LGK][0];

  delay_line #(.W(TAG_W), .DEPTH(ALPHA_M + ALPHA_A * LGK)) u_tag (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (in_tag),
    .q    (out_tag)
  );

endmodule
