// tb_sjac_core: self-checking testbench of the sparse circuit sjac_core,
// at reduced size: N = 45 (not a multiple of K, so the last x/b/ptr words are
// partly used), K = 8, M = 4 (rows of up to 32 non-zeros), latencies 10/14/58.
//
// Builds a random diagonally dominant sparse matrix in CSR form whose rows
// hold 1 to 32 non-zeros in random column order, the diagonal at a random
// place, and ptr starting at 1. Pad lanes of each row's last k-group carry
// random values and columns, which must be ignored. Runs two iterations: the
// first streams the k-groups without gaps, the second reloads x with the
// results of the first and streams with random idle cycles. Every x_i^(d+1) is
// compared bit for bit with a model that adds in the circuit's order, and,
// in the first iteration, must appear 2 + 52 + (alpha_r - (M-1)) + 14 + 10
// cycles after its row's last k-group (alpha_r from Equation 6 of the
// specification).
module tb_sjac_core;
  import jacobi_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 45, K = 8, M = 4, NW = (N + K - 1) / K, PW = (N + 1 + K - 1) / K;
  localparam int AM = 10, AA = 14, AD = 58;
  localparam int ALPHA_R = M + 2 ** ($clog2(M) + 1) + (AA - 1) * $clog2(M) - 2;
  localparam int T_ROW = 2 + AM + AA * 3 + ALPHA_R - (M - 1) + AA + AM;

  logic clk = 0, rst_n = 0, start = 0;
  logic x_wr_en = 0, b_wr_en = 0, ptr_wr_en = 0, val_valid = 0;
  logic [2:0] x_wr_addr = '0, b_wr_addr = '0, ptr_wr_addr = '0;
  fp64_t [K-1:0] x_wr_data = '0, b_wr_data = '0, val_data = '0;
  logic [K-1:0][15:0] ptr_wr_data = '0, col_data = '0;
  logic x_new_valid, done;
  logic [5:0] x_new_idx;
  fp64_t x_new_data;

  sjac_core #(.N(N), .K(K), .M(M), .ALPHA_M(AM), .ALPHA_A(AA), .ALPHA_D(AD)) dut (.*);

  // CSR matrix, rows padded to whole k-groups
  real  va [N][$];
  int   vc [N][$];
  bit   vu [N][$];
  int   ptr [N+1];
  real  b [N], x [N], xn [N];
  fp64_t want [N];
  int   t_last [N];
  int checks = 0, failures = 0, cycle = 0, nout = 0, nmulti = 0, npart = 0;
  bit timed = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && x_new_valid) begin
      checks++;
      if (int'(x_new_idx) != nout || x_new_data !== want[nout]) begin
        failures++;
        $display("x_new %0d (expected index %0d): got %h want %h", x_new_idx, nout,
                 x_new_data, want[nout]);
      end
      if (timed) begin
        checks++;
        if (cycle - t_last[nout] != T_ROW) begin
          failures++;
          $display("x_new %0d %0d cycles after its last group, want %0d", nout,
                   cycle - t_last[nout], T_ROW);
        end
      end
      if (nout == N - 1) begin
        checks++;
        if (!done) begin failures++; $display("done missing"); end
      end
      xn[x_new_idx] = $bitstoreal(x_new_data);
      nout++;
    end
  end

  task automatic make_matrix();
    ptr[0] = 1;
    for (int i = 0; i < N; i++) begin
      int len, cols[$], pos;
      real s;
      len = ($urandom % 3 == 0) ? 1 + $urandom % (M * K) : 1 + $urandom % 12;
      if (len > N) len = N;
      cols.push_back(i);
      while (cols.size() < len) begin
        int c;
        bit dup;
        c = $urandom % N;
        dup = 0;
        foreach (cols[q]) if (cols[q] == c) dup = 1;
        if (!dup) cols.push_back(c);
      end
      cols.shuffle();
      s = 0.0;
      va[i].delete(); vc[i].delete(); vu[i].delete();
      pos = 0;
      foreach (cols[q]) begin
        real v;
        v = rnd_val(0.001, 1.0, 1);
        if (cols[q] != i) s += (v < 0.0) ? -v : v;
        else pos = q;
        va[i].push_back(v); vc[i].push_back(cols[q]); vu[i].push_back(1);
      end
      va[i][pos] = s + rnd_val(0.5, 2.0, 1);
      if (len % K != 0) npart++;
      if (len > K) nmulti++;
      while (va[i].size() % K != 0) begin
        va[i].push_back(rnd_val(1.0, 100.0, 1));
        vc[i].push_back($urandom % N);
        vu[i].push_back(0);
      end
      ptr[i+1] = ptr[i] + len;
      b[i] = rnd_val(0.1, 10.0, 1);
      x[i] = rnd_val(0.1, 10.0, 1);
    end
  endtask

  task automatic run_iteration(bit gaps);
    for (int i = 0; i < N; i++) begin
      real aii;
      foreach (vc[i][q]) if (vu[i][q] && vc[i][q] == i) aii = va[i][q];
      want[i] = $realtobits(jacobi_row(i, K, va[i], vc[i], vu[i], x, b[i], aii));
    end
    nout = 0;
    timed = !gaps;
    for (int w = 0; w < NW; w++) begin
      for (int h = 0; h < K; h++)
        x_wr_data[h] <= $realtobits((w*K+h < N) ? x[w*K+h] : 0.0);
      x_wr_en <= 1; x_wr_addr <= 3'(w);
      @(posedge clk);
    end
    x_wr_en <= 0;
    for (int w = 0; w < NW; w++) begin
      for (int h = 0; h < K; h++)
        b_wr_data[h] <= $realtobits((w*K+h < N) ? b[w*K+h] : 0.0);
      b_wr_en <= 1; b_wr_addr <= 3'(w);
      @(posedge clk);
    end
    b_wr_en <= 0;
    for (int w = 0; w < PW; w++) begin
      for (int h = 0; h < K; h++) ptr_wr_data[h] <= 16'((w*K+h <= N) ? ptr[w*K+h] : 0);
      ptr_wr_en <= 1; ptr_wr_addr <= 3'(w);
      start <= (w == PW - 1);
      @(posedge clk);
    end
    ptr_wr_en <= 0; start <= 0;
    for (int i = 0; i < N; i++) begin
      for (int g = 0; g < va[i].size() / K; g++) begin
        for (int h = 0; h < K; h++) begin
          val_data[h] <= $realtobits(va[i][g*K+h]);
          col_data[h] <= 16'(vc[i][g*K+h]);
        end
        val_valid <= 1;
        t_last[i] = cycle + 1;
        @(posedge clk);
        if (gaps && $urandom % 4 == 0) begin
          val_valid <= 0;
          repeat (1 + $urandom % 3) @(posedge clk);
        end
      end
    end
    val_valid <= 0;
    repeat (T_ROW + 20) @(posedge clk);
    checks++;
    if (nout != N) begin failures++; $display("got %0d results, want %0d", nout, N); end
  endtask

  initial begin
    make_matrix();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_iteration(0);
    x = xn;
    run_iteration(1);
    checks++;
    if (nmulti == 0 || npart == 0) begin
      failures++;
      $display("stimulus lacks multi-group rows (%0d) or partial groups (%0d)", nmulti, npart);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
