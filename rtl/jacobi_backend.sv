// jacobi_backend: the part of the Jacobi solver after the binary tree, shared
// by the dense and the sparse circuit:
//
//   partial sums -> reduce -> (b_i - sum) -> * (1/a_ii) -> x_i^(d+1)
//
// * The reduce unit turns each row's partial sums (last one flagged ps_last)
//   into sum_j!=i a_ij x_j.
// * The b store holds b, loaded one k-vector per cycle (b_wr_*).
// * The reciprocal path: each diagonal element a_ii (diag_*) is sent through
//   the divider as 1.0 / a_ii while the row is still in the tree, and the
//   result is written to the D^-1 store at address i. This hides the long
//   divider latency behind the reduction, as the solver specifies.
// * Rows leave the reduce unit in order, so a row counter (cleared by start)
//   names the row of each sum. b_i and 1/a_ii are read ahead from their stores
//   each cycle at the counter's next value, so they are ready the same cycle
//   the sum arrives and add no cycle to the pipeline.
// * The subtraction unit (ALPHA_A cycles) forms b_i - sum while 1/a_ii rides
//   along in its tag; the output multiplier (ALPHA_M cycles) then delivers
//   x_i^(d+1) with its index on x_valid/x_idx/x_data. done pulses with row N-1.
//
// Timing: a row's value leaves ALPHA_R + ALPHA_A + ALPHA_M cycles after its
// first partial sum, when its partial sums arrive on consecutive cycles.
// Requirement (checked by an assertion): 1/a_ii must be written before row i
// leaves the reduce unit, which holds by a wide margin at the default sizes.
// The read-ahead and the counter are this design's own choices.
module jacobi_backend
  import jacobi_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter int unsigned K       = 8,
  parameter int unsigned M       = 8,
  parameter int unsigned ALPHA_M = 10,
  parameter int unsigned ALPHA_A = 14,
  parameter int unsigned ALPHA_D = 58,
  localparam int unsigned IW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NW     = (N + K - 1) / K,
  localparam int unsigned BAW    = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned KW     = (K > 1) ? $clog2(K) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  // b vector load, one k-vector per cycle
  input  logic            b_wr_en,
  input  logic [BAW-1:0]  b_wr_addr,
  input  fp64_t [K-1:0]   b_wr_data,
  // partial sums from the tree
  input  logic            ps_valid,
  input  fp64_t           ps_data,
  input  logic            ps_last,
  // diagonal elements for the reciprocal path
  input  logic            diag_valid,
  input  logic [IW-1:0]   diag_idx,
  input  fp64_t           diag_data,
  // new solution vector, one element at a time
  output logic            x_valid,
  output logic [IW-1:0]   x_idx,
  output fp64_t           x_data,
  output logic            done
);

  // ---------------------------------------------------------------- reduce
  logic  red_valid;
  fp64_t red_sum;

  reduce_unit #(.M(M), .ALPHA_A(ALPHA_A)) u_reduce (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (ps_valid),
    .in_data  (ps_data),
    .in_last  (ps_last),
    .out_valid(red_valid),
    .out_data (red_sum)
  );

  // ------------------------------------------------------ 1/a_ii -> D^-1
  logic          rcp_valid;
  fp64_t         rcp_data;
  logic [IW-1:0] rcp_idx;

  fp_div #(.LAT(ALPHA_D), .TAG_W(IW)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (diag_valid),
    .a        (FP_ONE),
    .b        (diag_data),
    .in_tag   (diag_idx),
    .out_valid(rcp_valid),
    .y        (rcp_data),
    .out_tag  (rcp_idx)
  );

  // ------------------------------------------------- row counter, read-ahead
  logic [IW-1:0] out_row, rd_row;
  logic [KW-1:0] b_lane_q;
  fp64_t [0:0][K-1:0] b_word;
  fp64_t [0:0][0:0]   dinv_word;
  logic [N-1:0]  dinv_ok;  // reciprocal of row i written since start

  always_comb begin
    if (start)          rd_row = '0;
    else if (red_valid) rd_row = out_row + IW'(1);
    else                rd_row = out_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_row  <= '0;
      b_lane_q <= '0;
      dinv_ok  <= '0;
    end else begin
      out_row  <= rd_row;
      b_lane_q <= KW'(rd_row % K);
      if (start) dinv_ok <= '0;
      if (rcp_valid) dinv_ok[rcp_idx] <= 1'b1;
    end
  end

  kvec_store #(.LANES(K), .W(64), .DEPTH(NW), .NRD(1)) u_bstore (
    .clk    (clk),
    .wr_en  (b_wr_en),
    .wr_addr(b_wr_addr),
    .wr_data(b_wr_data),
    .rd_addr(BAW'(rd_row / K)),
    .rd_data(b_word)
  );

  kvec_store #(.LANES(1), .W(64), .DEPTH(N), .NRD(1)) u_dinv (
    .clk    (clk),
    .wr_en  (rcp_valid),
    .wr_addr(rcp_idx),
    .wr_data(rcp_data),
    .rd_addr(rd_row),
    .rd_data(dinv_word)
  );

  assert property (@(posedge clk) disable iff (!rst_n) red_valid |-> dinv_ok[out_row])
    else $error("jacobi_backend: 1/a_ii of row %0d not ready", out_row);

  // ------------------------------------------------ subtract and multiply
  logic            sub_valid;
  fp64_t           sub_data;
  logic [IW+63:0]  sub_tag;
  fp64_t           b_i;

  assign b_i = b_word[0][b_lane_q];

  fp_add #(.LAT(ALPHA_A), .TAG_W(64 + IW)) u_sub (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (red_valid),
    .a        (b_i),
    .b        (red_sum),
    .sub      (1'b1),
    .in_tag   ({dinv_word[0][0], out_row}),
    .out_valid(sub_valid),
    .y        (sub_data),
    .out_tag  (sub_tag)
  );

  fp_mul #(.LAT(ALPHA_M), .TAG_W(IW)) u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sub_valid),
    .a        (sub_data),
    .b        (sub_tag[IW+63:IW]),
    .in_tag   (sub_tag[IW-1:0]),
    .out_valid(x_valid),
    .y        (x_data),
    .out_tag  (x_idx)
  );

  assign done = x_valid && (x_idx == IW'(N - 1));

endmodule
