// tb_jacobi_backend: self-checking testbench of jacobi_backend at reduced size
// (N = 20, K = 4, M = 4, latencies 10/14/58).
//
// Loads b, sends every diagonal element a_ii (in a shuffled order) to the
// reciprocal path, waits for the divider, then sends each row's partial sums
// (1 to 4 per row, back to back, sometimes with idle cycles) as the tree
// would. Each x_i^(d+1) must equal (b_i - pairwise sum) * (1.0 / a_ii) bit for
// bit, come out in row order with its index, and leave a fixed
// (alpha_r - (M-1)) + ALPHA_A + ALPHA_M = 33 + 24 cycles after the row's last
// partial sum; done must mark row N-1. A second pass after start checks that
// the row counter restarts.
module tb_jacobi_backend;
  import jacobi_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 20, K = 4, M = 4, NW = N / K;
  localparam int ALPHA_R = M + 2 ** ($clog2(M) + 1) + 13 * $clog2(M) - 2;
  localparam int T_OUT = ALPHA_R - (M - 1) + 14 + 10;

  logic clk = 0, rst_n = 0, start = 0;
  logic b_wr_en = 0;
  logic [2:0] b_wr_addr = '0;
  fp64_t [K-1:0] b_wr_data = '0;
  logic ps_valid = 0, ps_last = 0;
  fp64_t ps_data = '0;
  logic diag_valid = 0;
  logic [4:0] diag_idx = '0;
  fp64_t diag_data = '0;
  logic x_valid, done;
  logic [4:0] x_idx;
  fp64_t x_data;

  jacobi_backend #(.N(N), .K(K), .M(M), .ALPHA_M(10), .ALPHA_A(14), .ALPHA_D(58)) dut (.*);

  real b [N], aii [N];
  fp64_t want [N];
  int t_last [N];
  int checks = 0, failures = 0, cycle = 0, nout = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && x_valid) begin
      checks++;
      if (int'(x_idx) != nout || x_data !== want[nout] || cycle - t_last[nout] != T_OUT ||
          done != (nout == N - 1)) begin
        failures++;
        $display("row %0d (index %0d): got %h want %h, %0d cycles after last sum, done %0d",
                 nout, x_idx, x_data, want[nout], cycle - t_last[nout], done);
      end
      nout++;
    end
  end

  task automatic pass(bit gaps);
    int order[$];
    nout = 0;
    for (int i = 0; i < N; i++) begin
      b[i] = rnd_val(0.1, 10.0, 1);
      aii[i] = rnd_val(1.0, 50.0, 1);
      order.push_back(i);
    end
    order.shuffle();
    for (int w = 0; w < NW; w++) begin
      for (int h = 0; h < K; h++) b_wr_data[h] <= $realtobits(b[w*K+h]);
      b_wr_en <= 1; b_wr_addr <= 3'(w);
      start <= (w == 0);
      @(posedge clk);
    end
    b_wr_en <= 0; start <= 0;
    foreach (order[q]) begin
      diag_valid <= 1; diag_idx <= 5'(order[q]); diag_data <= $realtobits(aii[order[q]]);
      @(posedge clk);
    end
    diag_valid <= 0;
    repeat (60) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      automatic real v[$];
      int len;
      len = 1 + $urandom % M;
      for (int j = 0; j < len; j++) begin
        real p;
        p = rnd_val(0.01, 10.0, 1);
        v.push_back(p);
        ps_valid <= 1; ps_data <= $realtobits(p); ps_last <= (j == len - 1);
        t_last[i] = cycle + 1;
        @(posedge clk);
        if (gaps && $urandom % 3 == 0) begin
          ps_valid <= 0;
          @(posedge clk);
        end
      end
      want[i] = $realtobits((b[i] - pair_sum(v)) * (1.0 / aii[i]));
    end
    ps_valid <= 0;
    repeat (T_OUT + 10) @(posedge clk);
    checks++;
    if (nout != N) begin failures++; $display("got %0d rows, want %0d", nout, N); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    pass(0);
    pass(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
