// sjac_core: large sparse matrix Jacobi circuit. It performs the same Jacobi
// step as jac_core,
//
//   x_i^(d+1) = (1/a_ii) * (b_i - sum_{j != i} a_ij x_j^(d)),
//
// for a matrix held in compressed sparse row (CSR) form: val (the non-zeros,
// row by row), col (the column of each non-zero) and ptr (where each row
// starts in val; row i has len_i = ptr[i+1] - ptr[i] non-zeros).
//
// Operation:
// 1. Initialisation, one k-vector per cycle: x^(d) (x_wr_*), b (b_wr_*) and
//    ptr (ptr_wr_*, N+1 entries, 16 bits each). Because a leaf may need any
//    element of x, every one of the K leaves has its own complete copy of x;
//    one write fills all K copies in the same cycle.
// 2. A pulse on start clears the row counter. The first k-group may follow in
//    the next cycle at the earliest.
// 3. Each row is streamed as ceil(len_i / K) k-groups of (val, col) pairs on
//    val_valid cycles; the row's last group is padded to K lanes with any
//    values. The control reads ptr[i] and ptr[i+1] (read ahead, so they are
//    ready when the row's first group arrives), counts the groups of the row,
//    marks lanes past len_i as ignored and flags the row's last group. A
//    group is registered at the input; from that register leaf h reads
//    x[col_h] from its copy while the group waits in a second register. A lane
//    whose col equals the row index holds a_ii: the lane is ignored in the
//    tree and a_ii is sent to the reciprocal unit.
// 4. Tree, reduce unit, subtraction and output multiplier are those of the
//    dense circuit, so the cycle counts are the same with N/K replaced by the
//    number of groups per row.
//
// Limits: every row must hold its diagonal element (so len_i >= 1) and at
// most M*K non-zeros. Only differences of ptr entries are used, so ptr may
// start at 0 or 1 and may wrap past 2^16. col and the row index are 0-based.
// Structure and timing follow the solver's specification; the port protocol,
// the per-row padding of k-groups and the use of ptr for lane masking are
// this design's own choices.
module sjac_core
  import jacobi_pkg::*;
#(
  parameter int unsigned N       = 4929,
  parameter int unsigned K       = 8,
  parameter int unsigned M       = 8,
  parameter int unsigned ALPHA_M = 10,
  parameter int unsigned ALPHA_A = 14,
  parameter int unsigned ALPHA_D = 58,
  localparam int unsigned CW     = 16,
  localparam int unsigned IW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NW     = (N + K - 1) / K,
  localparam int unsigned XAW    = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned PW     = (N + 1 + K - 1) / K,
  localparam int unsigned PAW    = (PW > 1) ? $clog2(PW) : 1,
  localparam int unsigned KW     = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned GW     = (M > 1) ? $clog2(M) + 1 : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    x_wr_en,
  input  logic [XAW-1:0]          x_wr_addr,
  input  fp64_t [K-1:0]           x_wr_data,
  input  logic                    b_wr_en,
  input  logic [XAW-1:0]          b_wr_addr,
  input  fp64_t [K-1:0]           b_wr_data,
  input  logic                    ptr_wr_en,
  input  logic [PAW-1:0]          ptr_wr_addr,
  input  logic [K-1:0][CW-1:0]    ptr_wr_data,
  input  logic                    val_valid,
  input  fp64_t [K-1:0]           val_data,
  input  logic [K-1:0][CW-1:0]    col_data,
  output logic                    x_new_valid,
  output logic [IW-1:0]           x_new_idx,
  output fp64_t                   x_new_data,
  output logic                    done
);

  // ------------------------------------------------- ptr store, read ahead
  logic [IW-1:0]                 row, row_next;
  logic [GW-1:0]                 grp;
  logic [1:0][PAW-1:0]           ptr_rd_addr;
  logic [1:0][K-1:0][CW-1:0]     ptr_word;
  logic [KW-1:0]                 lane_lo_q, lane_hi_q;
  logic [CW-1:0]                 row_len;
  logic                          grp_last;
  logic [K-1:0]                  lane_used;

  kvec_store #(.LANES(K), .W(CW), .DEPTH(PW), .NRD(2)) u_ptr (
    .clk    (clk),
    .wr_en  (ptr_wr_en),
    .wr_addr(ptr_wr_addr),
    .wr_data(ptr_wr_data),
    .rd_addr(ptr_rd_addr),
    .rd_data(ptr_word)
  );

  always_comb begin
    if (start)                     row_next = '0;
    else if (val_valid && grp_last) row_next = row + IW'(1);
    else                           row_next = row;
    ptr_rd_addr[0] = PAW'(row_next / K);
    ptr_rd_addr[1] = PAW'((32'(row_next) + 1) / K);
  end

  assign row_len  = ptr_word[1][lane_hi_q] - ptr_word[0][lane_lo_q];
  assign grp_last = (32'(grp) + 1) * K >= 32'(row_len);

  always_comb begin
    for (int h = 0; h < int'(K); h++)
      lane_used[h] = (32'(grp) * K + 32'(h)) < 32'(row_len);
  end

  // ------------------------------------------------- control: row and group counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      grp       <= '0;
      lane_lo_q <= '0;
      lane_hi_q <= '0;
    end else begin
      row       <= row_next;
      lane_lo_q <= KW'(row_next % K);
      lane_hi_q <= KW'((32'(row_next) + 1) % K);
      if (start)                      grp <= '0;
      else if (val_valid && grp_last) grp <= '0;
      else if (val_valid)             grp <= grp + GW'(1);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) val_valid |-> row_len != '0)
    else $error("sjac_core: row %0d has no non-zeros", row);
  assert property (@(posedge clk) disable iff (!rst_n) val_valid |-> 32'(grp) < M)
    else $error("sjac_core: row %0d has more than M*K non-zeros", row);

  // ------------------------------------------------- stage 1: input registers
  logic                 s1_valid, s1_last;
  fp64_t [K-1:0]        s1_val;
  logic [K-1:0][CW-1:0] s1_col;
  logic [K-1:0]         s1_used;
  logic [IW-1:0]        s1_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_val   <= '0;
      s1_col   <= '0;
      s1_used  <= '0;
      s1_row   <= '0;
    end else begin
      s1_valid <= val_valid && !start;
      s1_last  <= grp_last;
      s1_val   <= val_data;
      s1_col   <= col_data;
      s1_used  <= lane_used;
      s1_row   <= row;
    end
  end

  // diagonal detection and mux
  logic [K-1:0] s1_diag;
  logic         diag_hit;
  fp64_t        diag_val;

  always_comb begin
    diag_val = FP_ZERO;
    for (int h = K - 1; h >= 0; h--) begin
      s1_diag[h] = s1_used[h] && (s1_col[h] == CW'(s1_row));
      if (s1_diag[h]) diag_val = s1_val[h];
    end
    diag_hit = s1_valid && (|s1_diag);
  end

  // ------------------------------------------------- x copies, one per leaf
  fp64_t [K-1:0] x_leaf;
  logic  [K-1:0][KW-1:0] s2_xlane;

  for (genvar h = 0; h < int'(K); h++) begin : g_xcopy
    fp64_t [0:0][K-1:0] xw;
    kvec_store #(.LANES(K), .W(64), .DEPTH(NW), .NRD(1)) u_xcopy (
      .clk    (clk),
      .wr_en  (x_wr_en),
      .wr_addr(x_wr_addr),
      .wr_data(x_wr_data),
      .rd_addr(XAW'(s1_col[h] / K)),
      .rd_data(xw)
    );
    assign x_leaf[h] = xw[0][s2_xlane[h]];
  end

  // ------------------------------------------------- stage 2: leaf registers
  logic          s2_valid, s2_last;
  fp64_t [K-1:0] s2_a;
  logic  [K-1:0] s2_ign;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_last  <= 1'b0;
      s2_a     <= '0;
      s2_ign   <= '0;
      s2_xlane <= '0;
    end else begin
      s2_valid <= s1_valid;
      s2_last  <= s1_last;
      s2_a     <= s1_val;
      s2_ign   <= ~s1_used | s1_diag;
      for (int h = 0; h < int'(K); h++) s2_xlane[h] <= KW'(s1_col[h] % K);
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
    .x        (x_leaf),
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
