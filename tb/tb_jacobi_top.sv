// tb_jacobi_top: end-to-end testbench of jacobi_top at its default sizes:
// the dense circuit with n = 64 and the sparse circuit with n = 4929, both
// with k = 8, m = 8 and latencies 10/14/58.
//
// Dense circuit: a random diagonally dominant 64 x 64 system, two Jacobi
// iterations, the second fed with the results of the first. The first
// follows the specification's schedule and must finish in 659 cycles (first
// result 139 cycles after A's first k-vector, then one every 8 cycles); the
// second streams A with idle cycles.
// Sparse circuit: a random diagonally dominant 4929 x 4929 CSR matrix with
// 1 to 64 non-zeros per row, ptr starting at 60000 so that it wraps past
// 2^16, streamed without gaps; each result must appear a fixed 132 cycles
// after its row's last k-group.
// All results are compared bit for bit with a model that adds in the
// circuit's order. The test also counts how often each mechanism of the
// design was exercised and fails if one never was: diagonal removal,
// reciprocals written to D^-1, reduce rows ending on an odd value (added to
// zero), single- and multi-group rows, lanes masked by row length, idle
// cycles in the input stream, and the ptr wrap.
module tb_jacobi_top;
  import jacobi_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 64, K = 8, NB = N / K;
  localparam int SN = 4929, SM = 8, SNW = (SN + K - 1) / K, SPW = (SN + 1 + K - 1) / K;
  localparam int T_FIRST = 139, T_TOTAL = 659;
  localparam int ALPHA_R = SM + 2 ** ($clog2(SM) + 1) + 13 * $clog2(SM) - 2;
  localparam int T_ROW = 2 + 10 + 14 * 3 + ALPHA_R - (SM - 1) + 14 + 10;

  logic clk = 0, rst_n = 0;
  // dense
  logic jac_start = 0, jac_x_wr_en = 0, jac_b_wr_en = 0, jac_a_valid = 0;
  logic [2:0] jac_x_wr_addr = '0, jac_b_wr_addr = '0;
  fp64_t [K-1:0] jac_x_wr_data = '0, jac_b_wr_data = '0, jac_a_data = '0;
  logic jac_x_new_valid, jac_done;
  logic [5:0] jac_x_new_idx;
  fp64_t jac_x_new_data;
  // sparse
  logic sjac_start = 0, sjac_x_wr_en = 0, sjac_b_wr_en = 0, sjac_ptr_wr_en = 0;
  logic sjac_val_valid = 0;
  logic [9:0] sjac_x_wr_addr = '0, sjac_b_wr_addr = '0, sjac_ptr_wr_addr = '0;
  fp64_t [K-1:0] sjac_x_wr_data = '0, sjac_b_wr_data = '0, sjac_val_data = '0;
  logic [K-1:0][15:0] sjac_ptr_wr_data = '0, sjac_col_data = '0;
  logic sjac_x_new_valid, sjac_done;
  logic [12:0] sjac_x_new_idx;
  fp64_t sjac_x_new_data;

  jacobi_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_diag_jac = 0, n_diag_sjac = 0, n_rcp = 0, n_odd = 0, n_mask = 0;
  int n_single = 0, n_multi = 0, n_gap = 0, n_wrap = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_jac.diag_hit) n_diag_jac++;
    if (dut.u_sjac.diag_hit) n_diag_sjac++;
    if (dut.u_jac.u_back.rcp_valid || dut.u_sjac.u_back.rcp_valid) n_rcp++;
    if (dut.u_sjac.u_back.u_reduce.g_lvl[0].fire && !dut.u_sjac.u_back.u_reduce.g_lvl[0].held_v)
      n_odd++;
    if (dut.u_sjac.s1_valid && !(&dut.u_sjac.s1_used)) n_mask++;
  end

  // ------------------------------------------------------------ dense circuit
  real A [N][N];
  real b [N], x [N], xn [N];
  fp64_t want [N];
  int nout = 0, t0 = 0, tload = 0;
  bit timed = 0;

  always @(posedge clk) begin
    if (rst_n && jac_x_new_valid) begin
      checks++;
      if (int'(jac_x_new_idx) != nout || jac_x_new_data !== want[nout]) begin
        failures++;
        $display("dense x_new %0d: got %h want %h", jac_x_new_idx, jac_x_new_data, want[nout]);
      end
      if (timed) begin
        checks++;
        if (cycle - t0 != T_FIRST + NB * nout) begin
          failures++;
          $display("dense x_new %0d at %0d, want %0d", nout, cycle - t0, T_FIRST + NB * nout);
        end
        if (nout == N - 1) begin
          checks++;
          if (cycle - tload != T_TOTAL || !jac_done) begin
            failures++;
            $display("dense iteration took %0d cycles, want %0d", cycle - tload, T_TOTAL);
          end
        end
      end
      xn[jac_x_new_idx] = $bitstoreal(jac_x_new_data);
      nout++;
    end
  end

  task automatic jac_iteration(bit gaps);
    for (int i = 0; i < N; i++) begin
      real ra[$];
      int rc[$];
      bit ru[$];
      for (int j = 0; j < N; j++) begin ra.push_back(A[i][j]); rc.push_back(j); ru.push_back(1); end
      want[i] = $realtobits(jacobi_row(i, K, ra, rc, ru, x, b[i], A[i][i]));
    end
    nout = 0;
    timed = !gaps;
    tload = cycle + 1;
    for (int w = 0; w < NB; w++) begin
      for (int h = 0; h < K; h++) jac_x_wr_data[h] <= $realtobits(x[w*K+h]);
      jac_x_wr_en <= 1; jac_x_wr_addr <= 3'(w);
      @(posedge clk);
    end
    jac_x_wr_en <= 0;
    for (int w = 0; w < NB; w++) begin
      for (int h = 0; h < K; h++) jac_b_wr_data[h] <= $realtobits(b[w*K+h]);
      jac_b_wr_en <= 1; jac_b_wr_addr <= 3'(w);
      jac_start <= (w == NB - 1);
      @(posedge clk);
    end
    jac_b_wr_en <= 0; jac_start <= 0;
    t0 = cycle + 1;
    for (int i = 0; i < N; i++)
      for (int t = 0; t < NB; t++) begin
        for (int h = 0; h < K; h++) jac_a_data[h] <= $realtobits(A[i][t*K+h]);
        jac_a_valid <= 1;
        @(posedge clk);
        if (gaps && $urandom % 4 == 0) begin
          jac_a_valid <= 0;
          n_gap++;
          repeat (1 + $urandom % 3) @(posedge clk);
        end
      end
    jac_a_valid <= 0;
    repeat (T_FIRST + 20) @(posedge clk);
    checks++;
    if (nout != N) begin failures++; $display("dense: %0d results, want %0d", nout, N); end
  endtask

  // ------------------------------------------------------------ sparse circuit
  real  va [SN][$];
  int   vc [SN][$];
  bit   vu [SN][$];
  int   ptr [SN+1];
  real  sb [SN], sx [SN];
  fp64_t swant [SN];
  int   t_last [SN];
  int   snout = 0;

  always @(posedge clk) begin
    if (rst_n && sjac_x_new_valid) begin
      checks++;
      if (int'(sjac_x_new_idx) != snout || sjac_x_new_data !== swant[snout] ||
          cycle - t_last[snout] != T_ROW) begin
        failures++;
        if (failures < 20)
          $display("sparse x_new %0d: got %h want %h, %0d cycles after last group (want %0d)",
                   sjac_x_new_idx, sjac_x_new_data, swant[snout], cycle - t_last[snout], T_ROW);
      end
      if (snout == SN - 1) begin
        checks++;
        if (!sjac_done) begin failures++; $display("sparse done missing"); end
      end
      snout++;
    end
  end

  task automatic sjac_make();
    ptr[0] = 60000;
    for (int i = 0; i < SN; i++) begin
      int len, cols[$], pos;
      real s, aii;
      case ($urandom % 4)
        0: len = 1 + $urandom % (SM * K);
        1: len = 1 + $urandom % K;
        default: len = 1 + $urandom % 16;
      endcase
      cols.delete();
      cols.push_back(i);
      while (cols.size() < len) begin
        int c;
        bit dup;
        c = $urandom % SN;
        dup = 0;
        foreach (cols[q]) if (cols[q] == c) dup = 1;
        if (!dup) cols.push_back(c);
      end
      cols.shuffle();
      s = 0.0;
      pos = 0;
      foreach (cols[q]) begin
        real v;
        v = rnd_val(0.001, 1.0, 1);
        if (cols[q] != i) s += (v < 0.0) ? -v : v;
        else pos = q;
        va[i].push_back(v); vc[i].push_back(cols[q]); vu[i].push_back(1);
      end
      va[i][pos] = s + rnd_val(0.5, 2.0, 1);
      if (len > K) n_multi++; else n_single++;
      while (va[i].size() % K != 0) begin
        va[i].push_back(rnd_val(1.0, 100.0, 1));
        vc[i].push_back($urandom % SN);
        vu[i].push_back(0);
      end
      ptr[i+1] = ptr[i] + len;
      if ((ptr[i] < 65536) != (ptr[i+1] < 65536)) n_wrap++;
      sb[i] = rnd_val(0.1, 10.0, 1);
      sx[i] = rnd_val(0.1, 10.0, 1);
    end
    for (int i = 0; i < SN; i++) begin
      real aii;
      foreach (vc[i][q]) if (vu[i][q] && vc[i][q] == i) aii = va[i][q];
      swant[i] = $realtobits(jacobi_row(i, K, va[i], vc[i], vu[i], sx, sb[i], aii));
    end
  endtask

  task automatic sjac_iteration();
    for (int w = 0; w < SNW; w++) begin
      for (int h = 0; h < K; h++)
        sjac_x_wr_data[h] <= $realtobits((w*K+h < SN) ? sx[w*K+h] : 0.0);
      sjac_x_wr_en <= 1; sjac_x_wr_addr <= 10'(w);
      @(posedge clk);
    end
    sjac_x_wr_en <= 0;
    for (int w = 0; w < SNW; w++) begin
      for (int h = 0; h < K; h++)
        sjac_b_wr_data[h] <= $realtobits((w*K+h < SN) ? sb[w*K+h] : 0.0);
      sjac_b_wr_en <= 1; sjac_b_wr_addr <= 10'(w);
      @(posedge clk);
    end
    sjac_b_wr_en <= 0;
    for (int w = 0; w < SPW; w++) begin
      for (int h = 0; h < K; h++)
        sjac_ptr_wr_data[h] <= 16'((w*K+h <= SN) ? ptr[w*K+h] : 0);
      sjac_ptr_wr_en <= 1; sjac_ptr_wr_addr <= 10'(w);
      sjac_start <= (w == SPW - 1);
      @(posedge clk);
    end
    sjac_ptr_wr_en <= 0; sjac_start <= 0;
    for (int i = 0; i < SN; i++)
      for (int g = 0; g < va[i].size() / K; g++) begin
        for (int h = 0; h < K; h++) begin
          sjac_val_data[h] <= $realtobits(va[i][g*K+h]);
          sjac_col_data[h] <= 16'(vc[i][g*K+h]);
        end
        sjac_val_valid <= 1;
        t_last[i] = cycle + 1;
        @(posedge clk);
      end
    sjac_val_valid <= 0;
    repeat (T_ROW + 20) @(posedge clk);
    checks++;
    if (snout != SN) begin failures++; $display("sparse: %0d results, want %0d", snout, SN); end
  endtask

  // ------------------------------------------------------------ main
  initial begin
    for (int i = 0; i < N; i++) begin
      real s;
      s = 0.0;
      for (int j = 0; j < N; j++) if (j != i) begin
        A[i][j] = rnd_val(0.001, 1.0, 1);
        s += (A[i][j] < 0.0) ? -A[i][j] : A[i][j];
      end
      A[i][i] = s + rnd_val(0.5, 2.0, 1);
      b[i] = rnd_val(0.1, 10.0, 1);
      x[i] = rnd_val(0.1, 10.0, 1);
    end
    sjac_make();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    jac_iteration(0);
    x = xn;
    jac_iteration(1);
    sjac_iteration();
    $display("mechanisms: dense diagonal %0d, sparse diagonal %0d, reciprocals %0d, odd reduce %0d,",
             n_diag_jac, n_diag_sjac, n_rcp, n_odd);
    $display("            masked groups %0d, single-group rows %0d, multi-group rows %0d, gaps %0d, ptr wraps %0d",
             n_mask, n_single, n_multi, n_gap, n_wrap);
    checks++;
    if (n_diag_jac != 2 * N || n_diag_sjac != SN || n_rcp != 2 * N + SN) begin
      failures++;
      $display("diagonal/reciprocal counts wrong");
    end
    checks++;
    if (n_odd == 0 || n_mask == 0 || n_single == 0 || n_multi == 0 || n_gap == 0 || n_wrap == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
