// jacobi_top: floating-point Jacobi iterative solver, dense and sparse.
//
// Two independent circuits share one clock and reset:
// * the dense circuit (jac_core, ports jac_*) for an N x N matrix streamed
//   row by row, K values per cycle;
// * the sparse circuit (sjac_core, ports sjac_*) for an SN x SN matrix in
//   compressed sparse row form, K values per cycle, rows of up to SM*K
//   non-zeros.
// Each circuit computes one Jacobi step x^(d+1) = D^-1 (b - (L+U) x^(d)) in
// IEEE-754 double precision and returns x^(d+1) one element per row. The host
// loads x^(d) and b (and ptr for the sparse circuit) one k-vector per cycle,
// pulses start, streams the matrix and collects the results; for another
// iteration it reloads x with the values just returned. See jac_core and
// sjac_core for the port protocols and the cycle counts. The defaults are the
// dense circuit's published configuration (n = 64, k = 8, m = 8, multiplier,
// adder and divider latencies 10, 14 and 58); SN = 4929 is this design's
// choice, the largest matrix the sparse circuit was sized against.
module jacobi_top
  import jacobi_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter int unsigned K       = 8,
  parameter int unsigned M       = 8,
  parameter int unsigned ALPHA_M = 10,
  parameter int unsigned ALPHA_A = 14,
  parameter int unsigned ALPHA_D = 58,
  parameter int unsigned SN      = 4929,
  parameter int unsigned SM      = 8,
  localparam int unsigned IW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NB     = N / K,
  localparam int unsigned BAW    = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned SIW    = (SN > 1) ? $clog2(SN) : 1,
  localparam int unsigned SNW    = (SN + K - 1) / K,
  localparam int unsigned SXAW   = (SNW > 1) ? $clog2(SNW) : 1,
  localparam int unsigned SPW    = (SN + 1 + K - 1) / K,
  localparam int unsigned SPAW   = (SPW > 1) ? $clog2(SPW) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // dense circuit
  input  logic                 jac_start,
  input  logic                 jac_x_wr_en,
  input  logic [BAW-1:0]       jac_x_wr_addr,
  input  fp64_t [K-1:0]        jac_x_wr_data,
  input  logic                 jac_b_wr_en,
  input  logic [BAW-1:0]       jac_b_wr_addr,
  input  fp64_t [K-1:0]        jac_b_wr_data,
  input  logic                 jac_a_valid,
  input  fp64_t [K-1:0]        jac_a_data,
  output logic                 jac_x_new_valid,
  output logic [IW-1:0]        jac_x_new_idx,
  output fp64_t                jac_x_new_data,
  output logic                 jac_done,
  // sparse circuit
  input  logic                 sjac_start,
  input  logic                 sjac_x_wr_en,
  input  logic [SXAW-1:0]      sjac_x_wr_addr,
  input  fp64_t [K-1:0]        sjac_x_wr_data,
  input  logic                 sjac_b_wr_en,
  input  logic [SXAW-1:0]      sjac_b_wr_addr,
  input  fp64_t [K-1:0]        sjac_b_wr_data,
  input  logic                 sjac_ptr_wr_en,
  input  logic [SPAW-1:0]      sjac_ptr_wr_addr,
  input  logic [K-1:0][15:0]   sjac_ptr_wr_data,
  input  logic                 sjac_val_valid,
  input  fp64_t [K-1:0]        sjac_val_data,
  input  logic [K-1:0][15:0]   sjac_col_data,
  output logic                 sjac_x_new_valid,
  output logic [SIW-1:0]       sjac_x_new_idx,
  output fp64_t                sjac_x_new_data,
  output logic                 sjac_done
);

  jac_core #(
    .N(N), .K(K), .M(M), .ALPHA_M(ALPHA_M), .ALPHA_A(ALPHA_A), .ALPHA_D(ALPHA_D)
  ) u_jac (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (jac_start),
    .x_wr_en    (jac_x_wr_en),
    .x_wr_addr  (jac_x_wr_addr),
    .x_wr_data  (jac_x_wr_data),
    .b_wr_en    (jac_b_wr_en),
    .b_wr_addr  (jac_b_wr_addr),
    .b_wr_data  (jac_b_wr_data),
    .a_valid    (jac_a_valid),
    .a_data     (jac_a_data),
    .x_new_valid(jac_x_new_valid),
    .x_new_idx  (jac_x_new_idx),
    .x_new_data (jac_x_new_data),
    .done       (jac_done)
  );

  sjac_core #(
    .N(SN), .K(K), .M(SM), .ALPHA_M(ALPHA_M), .ALPHA_A(ALPHA_A), .ALPHA_D(ALPHA_D)
  ) u_sjac (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (sjac_start),
    .x_wr_en    (sjac_x_wr_en),
    .x_wr_addr  (sjac_x_wr_addr),
    .x_wr_data  (sjac_x_wr_data),
    .b_wr_en    (sjac_b_wr_en),
    .b_wr_addr  (sjac_b_wr_addr),
    .b_wr_data  (sjac_b_wr_data),
    .ptr_wr_en  (sjac_ptr_wr_en),
    .ptr_wr_addr(sjac_ptr_wr_addr),
    .ptr_wr_data(sjac_ptr_wr_data),
    .val_valid  (sjac_val_valid),
    .val_data   (sjac_val_data),
    .col_data   (sjac_col_data),
    .x_new_valid(sjac_x_new_valid),
    .x_new_idx  (sjac_x_new_idx),
    .x_new_data (sjac_x_new_data),
    .done       (sjac_done)
  );

endmodule
