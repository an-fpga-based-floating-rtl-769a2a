// tb_jac_core: self-checking testbench of the dense circuit jac_core at its
// full size (N = 64, K = 8, latencies 10/14/58).
//
// Builds a random diagonally dominant 64 x 64 system and runs two Jacobi
// iterations. Iteration 1 follows the schedule of the specification: x loaded
// in 8 cycles, b in 8 cycles, then A streamed without gaps; x_i^(d+1) must
// appear 139 cycles after A's first k-vector, one value every 8 cycles, the
// last one 659 cycles after the first x load. Iteration 2 reloads x with the
// results of iteration 1 and streams A with random idle cycles. Every result
// is compared bit for bit with a model built from the simulator's own doubles
// that adds in the circuit's order (tb_ref_pkg).
module tb_jac_core;
  import jacobi_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 64, K = 8, NB = N / K;
  localparam int T_FIRST = 139, T_TOTAL = 659;

  logic clk = 0, rst_n = 0, start = 0;
  logic x_wr_en = 0, b_wr_en = 0, a_valid = 0;
  logic [2:0] x_wr_addr = '0, b_wr_addr = '0;
  fp64_t [K-1:0] x_wr_data = '0, b_wr_data = '0, a_data = '0;
  logic x_new_valid, done;
  logic [5:0] x_new_idx;
  fp64_t x_new_data;

  jac_core dut (.*);

  real A [N][N];
  real b [N], x [N], xn [N];
  fp64_t want [N];
  int checks = 0, failures = 0, cycle = 0, nout = 0, t0 = 0, tload = 0;
  bit timed = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #500000;
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
        if (cycle - t0 != T_FIRST + NB * nout) begin
          failures++;
          $display("x_new %0d at cycle %0d after first A, want %0d", nout, cycle - t0,
                   T_FIRST + NB * nout);
        end
      end
      if (nout == N - 1) begin
        checks++;
        if (!done) begin failures++; $display("done missing"); end
        if (timed) begin
          checks++;
          if (cycle - tload != T_TOTAL) begin
            failures++;
            $display("iteration took %0d cycles, want %0d", cycle - tload, T_TOTAL);
          end
        end
      end
      xn[x_new_idx] = $bitstoreal(x_new_data);
      nout++;
    end
  end

  task automatic make_expect();
    for (int i = 0; i < N; i++) begin
      real ra[$];
      int rc[$];
      bit ru[$];
      for (int j = 0; j < N; j++) begin ra.push_back(A[i][j]); rc.push_back(j); ru.push_back(1); end
      want[i] = $realtobits(jacobi_row(i, K, ra, rc, ru, x, b[i], A[i][i]));
    end
  endtask

  task automatic run_iteration(bit gaps);
    make_expect();
    nout = 0;
    timed = !gaps;
    tload = cycle + 1;
    for (int w = 0; w < NB; w++) begin
      for (int h = 0; h < K; h++) x_wr_data[h] <= $realtobits(x[w*K+h]);
      x_wr_en <= 1; x_wr_addr <= 3'(w);
      @(posedge clk);
    end
    x_wr_en <= 0;
    for (int w = 0; w < NB; w++) begin
      for (int h = 0; h < K; h++) b_wr_data[h] <= $realtobits(b[w*K+h]);
      b_wr_en <= 1; b_wr_addr <= 3'(w);
      start <= (w == NB - 1);
      @(posedge clk);
    end
    b_wr_en <= 0; start <= 0;
    t0 = cycle + 1;
    for (int i = 0; i < N; i++)
      for (int t = 0; t < NB; t++) begin
        for (int h = 0; h < K; h++) a_data[h] <= $realtobits(A[i][t*K+h]);
        a_valid <= 1;
        @(posedge clk);
        if (gaps && $urandom % 4 == 0) begin
          a_valid <= 0;
          repeat (1 + $urandom % 3) @(posedge clk);
        end
      end
    a_valid <= 0;
    repeat (T_FIRST + 20) @(posedge clk);
    checks++;
    if (nout != N) begin failures++; $display("got %0d results, want %0d", nout, N); end
  endtask

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
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_iteration(0);
    x = xn;
    run_iteration(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
