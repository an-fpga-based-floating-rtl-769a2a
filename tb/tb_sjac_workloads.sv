// tb_sjac_workloads: runs the sparse circuit sjac_core, at its default sizes
// (N = 4929, K = 8, M = 8, latencies 10/14/58), on eight sparse systems with
// the order n and non-zero count n_z of the benchmark matrices the circuit
// was evaluated with: rdist1, gemat11, lns_3937, sherman5, mcfe, jpwh_991,
// bp_1600 and str_600.
//
// The matrices themselves are not available here, and they have zero
// diagonal entries, which a Jacobi step cannot use. So each system is
// synthetic: n rows and exactly n_z non-zeros, row lengths spread around
// n_z / n (between 1 and M*K = 64), random columns, the diagonal always
// present and made dominant, ptr starting at a random value (it may wrap past
// 2^16). Each system gets one Jacobi step, streamed without gaps. Every
// x_i^(d+1) is compared bit for bit with a model that adds in the circuit's
// order, and must appear a fixed 132 cycles after its row's last k-group
// (2 input/fetch registers + 52 tree + 54 reducer after its last input + 14
// subtract + 10 multiply). The number of streaming cycles must equal the sum
// of ceil(len_i / K) over the rows. The testbench also prints the cycle count
// estimated as n*nz_av/K + the fixed fill, for comparison.
module tb_sjac_workloads;
  import jacobi_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 4929, K = 8, M = 8;
  localparam int NW = (N + K - 1) / K, PW = (N + 1 + K - 1) / K;
  localparam int XAW = $clog2(NW), PAW = $clog2(PW), IW = $clog2(N);
  localparam int T_ROW = 2 + 52 + 54 + 14 + 10;
  localparam int NMAT = 8;
  localparam string NAME [NMAT] = '{"rdist1", "gemat11", "lns_3937", "sherman5",
                                    "mcfe", "jpwh_991", "bp_1600", "str_600"};
  localparam int MAT_N  [NMAT] = '{4134, 4929, 3937, 3312, 765, 991, 822, 363};
  localparam int MAT_NZ [NMAT] = '{94408, 33108, 25407, 20793, 24382, 6027, 4841, 3279};

  logic clk = 0, rst_n = 0, start = 0;
  logic x_wr_en = 0, b_wr_en = 0, ptr_wr_en = 0, val_valid = 0;
  logic [XAW-1:0] x_wr_addr = '0, b_wr_addr = '0;
  logic [PAW-1:0] ptr_wr_addr = '0;
  fp64_t [K-1:0] x_wr_data = '0, b_wr_data = '0, val_data = '0;
  logic [K-1:0][15:0] ptr_wr_data = '0, col_data = '0;
  logic x_new_valid, done;
  logic [IW-1:0] x_new_idx;
  fp64_t x_new_data;

  sjac_core dut (.*);

  real   va [N][$];
  int    vc [N][$];
  bit    vu [N][$];
  int    len [N];
  int    ptr [N+1];
  real   b [N], x [N];
  fp64_t want [N];
  int    t_last [N];
  int    n_cur;
  int    checks = 0, failures = 0, cycle = 0, nout = 0, nwrap = 0, nfull = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && x_new_valid) begin
      checks++;
      if (nout >= n_cur || int'(x_new_idx) != nout || x_new_data !== want[nout]) begin
        failures++;
        if (failures < 20)
          $display("x_new %0d (expected index %0d): got %h want %h", x_new_idx, nout,
                   x_new_data, want[nout]);
      end else if (cycle - t_last[nout] != T_ROW) begin
        failures++;
        if (failures < 20)
          $display("x_new %0d %0d cycles after its last group, want %0d", nout,
                   cycle - t_last[nout], T_ROW);
      end
      nout++;
    end
  end

  // row lengths: n_z / n or one more, then random moves between rows that keep
  // the total and the 1..M*K range
  task automatic make_lengths(int n, int nz);
    int q, r;
    q = nz / n;
    r = nz % n;
    for (int i = 0; i < n; i++) len[i] = q + ((i < r) ? 1 : 0);
    for (int t = 0; t < 2 * n; t++) begin
      int i, j, d;
      i = $urandom % n;
      j = $urandom % n;
      d = 1 + $urandom % (q + 1);
      if (i != j && len[i] - d >= 1 && len[j] + d <= M * K) begin
        len[i] -= d;
        len[j] += d;
      end
    end
  endtask

  task automatic make_matrix(int n, int nz);
    make_lengths(n, nz);
    ptr[0] = $urandom % 65536;
    for (int i = 0; i < n; i++) begin
      int cols[$], pos;
      real s;
      bit taken[int];
      cols.push_back(i);
      taken[i] = 1;
      while (cols.size() < len[i]) begin
        int c;
        c = $urandom % n;
        if (!taken.exists(c)) begin
          taken[c] = 1;
          cols.push_back(c);
        end
      end
      cols.shuffle();
      s = 0.0;
      pos = 0;
      va[i].delete(); vc[i].delete(); vu[i].delete();
      foreach (cols[q]) begin
        real v;
        v = rnd_val(0.001, 1.0, 1);
        if (cols[q] != i) s += (v < 0.0) ? -v : v;
        else pos = q;
        va[i].push_back(v); vc[i].push_back(cols[q]); vu[i].push_back(1);
      end
      va[i][pos] = s + rnd_val(0.5, 2.0, 1);
      if (len[i] == M * K) nfull++;
      while (va[i].size() % K != 0) begin
        va[i].push_back(rnd_val(1.0, 100.0, 1));
        vc[i].push_back($urandom % n);
        vu[i].push_back(0);
      end
      ptr[i+1] = ptr[i] + len[i];
      if (ptr[i+1] >= 65536 && ptr[i] < 65536) nwrap++;
      b[i] = rnd_val(0.1, 10.0, 1);
      x[i] = rnd_val(0.1, 10.0, 1);
    end
  endtask

  task automatic run_matrix(int mi);
    int n, nz, groups, t0, t_stream, est;
    n  = MAT_N[mi];
    nz = MAT_NZ[mi];
    make_matrix(n, nz);
    for (int i = 0; i < n; i++) begin
      real aii;
      foreach (vc[i][q]) if (vu[i][q] && vc[i][q] == i) aii = va[i][q];
      want[i] = $realtobits(jacobi_row(i, K, va[i], vc[i], vu[i], x, b[i], aii));
    end
    n_cur = n;
    nout  = 0;
    for (int w = 0; w < (n + K - 1) / K; w++) begin
      for (int h = 0; h < K; h++) begin
        x_wr_data[h] <= $realtobits((w*K+h < n) ? x[w*K+h] : 0.0);
        b_wr_data[h] <= $realtobits((w*K+h < n) ? b[w*K+h] : 0.0);
      end
      x_wr_en <= 1; x_wr_addr <= XAW'(w);
      b_wr_en <= 1; b_wr_addr <= XAW'(w);
      @(posedge clk);
    end
    x_wr_en <= 0; b_wr_en <= 0;
    for (int w = 0; w < (n + 1 + K - 1) / K; w++) begin
      for (int h = 0; h < K; h++) ptr_wr_data[h] <= 16'((w*K+h <= n) ? ptr[w*K+h] : 0);
      ptr_wr_en <= 1; ptr_wr_addr <= PAW'(w);
      @(posedge clk);
    end
    ptr_wr_en <= 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    t0 = cycle;
    groups = 0;
    for (int i = 0; i < n; i++) begin
      for (int g = 0; g < va[i].size() / K; g++) begin
        for (int h = 0; h < K; h++) begin
          val_data[h] <= $realtobits(va[i][g*K+h]);
          col_data[h] <= 16'(vc[i][g*K+h]);
        end
        val_valid <= 1;
        t_last[i] = cycle + 1;
        groups++;
        @(posedge clk);
      end
    end
    val_valid <= 0;
    t_stream = cycle - t0;
    repeat (T_ROW + 20) @(posedge clk);
    checks++;
    if (nout != n) begin
      failures++;
      $display("%s: got %0d results, want %0d", NAME[mi], nout, n);
    end
    checks++;
    if (t_stream != groups) begin
      failures++;
      $display("%s: streaming took %0d cycles for %0d k-groups", NAME[mi], t_stream, groups);
    end
    est = n * ((nz + n - 1) / n) / K + T_ROW;
    $display("%s: n=%0d nz=%0d k-groups=%0d last result at cycle %0d after start (n*nz_av/k estimate %0d)",
             NAME[mi], n, nz, groups, t_last[n-1] - t0 + T_ROW, est);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int mi = 0; mi < NMAT; mi++) run_matrix(mi);
    checks++;
    if (nwrap == 0 || nfull == 0) begin
      failures++;
      $display("stimulus lacks a ptr wrap (%0d) or a full-length row (%0d)", nwrap, nfull);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
