// jac_core: dense Jacobi circuit. For an N x N matrix A it computes one
// Jacobi step,
//
//   x_i^(d+1) = (1/a_ii) * (b_i - sum_{j != i} a_ij x_j^(d)),  i = 0..N-1,
//
// with a data path K values wide.
//
// Operation:
// 1. Initialisation. x^(d) and b are loaded one k-vector per cycle
//    (x_wr_* and b_wr_*, word address w holds elements w*K .. w*K+K-1). x is
//    strided across K stores: lane h of every word is the store feeding leaf
//    multiplier h, so each leaf always reads the same subset of x.
// 2. A pulse on start clears the row counters.
// 3. A is streamed row by row, one k-vector per a_valid cycle (N/K per row;
//    a_valid may have gaps). The k-vector is first registered at the input
//    ("input a" cycle). From that register the control issues the x read for
//    block t, and the matrix values wait one more cycle in a second register
//    so that both meet at the leaf multipliers ("fetch x" cycle). The control
//    (i counter and block counter) marks lane h of block t as ignored when
//    t*K+h = i, which removes a_ii x_i, and flags the row's last block. The
//    diagonal mux picks a_ii out of its block and sends it to the reciprocal
//    unit of the back end.
// 4. The tree, the reduce unit, the subtraction and the output multiplier
//    (jacobi_backend) deliver x_i^(d+1) on x_new_valid/x_new_idx/x_new_data.
//
// Timing with contiguous input: x_0^(d+1) leaves 2 + (ALPHA_M + ALPHA_A lg K)
// + ALPHA_R + ALPHA_A + ALPHA_M cycles after the first a_valid (139 at the
// defaults), and one value follows every N/K cycles (last after 139 + 504).
// Structure and cycle counts follow the solver's specification; the port
// protocol (write addresses, start pulse, valid strobes) and 0-based indices
// are this design's own. K must be a power of two and N a multiple of K.
module jac_core
  import jacobi_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter int unsigned K       = 8,
  parameter int unsigned M       = N / K,
  parameter int unsigned ALPHA_M = 10,
  parameter int unsigned ALPHA_A = 14,
  parameter int unsigned ALPHA_D = 58,
  localparam int unsigned IW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NB     = N / K,
  localparam int unsigned BAW    = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned BKW    = (K > 1) ? $clog2(K) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           x_wr_en,
  input  logic [BAW-1:0] x_wr_addr,
  input  fp64_t [K-1:0]  x_wr_data,
  input  logic           b_wr_en,
  input  logic [BAW-1:0] b_wr_addr,
  input  fp64_t [K-1:0]  b_wr_data,
  input  logic           a_valid,
  input  fp64_t [K-1:0]  a_data,
  output logic           x_new_valid,
  output logic [IW-1:0]  x_new_idx,
  output fp64_t          x_new_data,
  output logic           done
);

  initial assert (N % K == 0 && M >= NB && K == (1 << BKW)) else $error("jac_core: need N multiple of K and M >= N/K");

  // ------------------------------------------------- control: i and block counters
  logic [IW-1:0]  row;
  logic [BAW-1:0] blk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0;
      blk <= '0;
    end else if (start) begin
      row <= '0;
      blk <= '0;
    end else if (a_valid) begin
      if (blk == BAW'(NB - 1)) begin
        blk <= '0;
        row <= row + IW'(1);
      end else begin
        blk <= blk + BAW'(1);
      end
    end
  end

  // ------------------------------------------------- stage 1: input registers
  logic           s1_valid;
  fp64_t [K-1:0]  s1_a;
  logic [IW-1:0]  s1_row;
  logic [BAW-1:0] s1_blk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_a     <= '0;
      s1_row   <= '0;
      s1_blk   <= '0;
    end else begin
      s1_valid <= a_valid && !start;
      s1_a     <= a_data;
      s1_row   <= row;
      s1_blk   <= blk;
    end
  end

  // diagonal mux: a_ii is in block i / K, lane i % K
  logic  diag_hit;
  fp64_t diag_val;
  assign diag_hit = s1_valid && (BAW'(s1_row >> BKW) == s1_blk);
  assign diag_val = s1_a[s1_row[BKW-1:0]];

  // ------------------------------------------------- x stores, strided
  fp64_t [0:0][K-1:0] x_word;

  kvec_store #(.LANES(K), .W(64), .DEPTH(NB), .NRD(1)) u_xstore (
    .clk    (clk),
    .wr_en  (x_wr_en),
    .wr_addr(x_wr_addr),
    .wr_data(x_wr_data),
    .rd_addr(s1_blk),
    .rd_data(x_word)
  );

  // ------------------------------------------------- stage 2: leaf registers
  logic          s2_valid;
  fp64_t [K-1:0] s2_a;
  logic  [K-1:0] s2_ign;
  logic          s2_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_a     <= '0;
      s2_ign   <= '0;
      s2_last  <= 1'b0;
    end else begin
      s2_valid <= s1_valid;
      s2_a     <= s1_a;
      s2_last  <= (s1_blk == BAW'(NB - 1));
      for (int h = 0; h < int'(K); h++)
        s2_ign[h] <= diag_hit && (s1_row[BKW-1:0] == BKW'(h));
    end
  end

  // ------------------------------------------------- tree and back end
  logic  ps_valid, ps_last;
  fp64_t ps_data;

  reduction_tree #(.K(K), .ALPHA_M(ALPHA_M), .ALPHA_A(ALPHA_A), .TAG_W(1)) u_tree (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s2_valid),
    .a        (s2_a),
    .x        (x_word[0]),
    .ign      (s2_ign),
    .in_tag   (s2_last),
    .out_valid(ps_valid),
    .sum      (ps_data),
    .out_tag  (ps_last)
  );

  jacobi_backend #(
    .N(N), .K(K), .M(M), .ALPHA_M(ALPHA_M), .ALPHA_A(ALPHA_A), .ALPHA_D(ALPHA_D)
  ) u_back (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .b_wr_en   (b_wr_en),
    .b_wr_addr (b_wr_addr),
    .b_wr_data (b_wr_data),
    .ps_valid  (ps_valid),
    .ps_data   (ps_data),
    .ps_last   (ps_last),
    .diag_valid(diag_hit),
    .diag_idx  (s1_row),
    .diag_data (diag_val),
    .x_valid   (x_new_valid),
    .x_idx     (x_new_idx),
    .x_data    (x_new_data),
    .done      (done)
  );

endmodule
