// tb_reduction_tree: self-checking testbench of reduction_tree (K = 8).
//
// Streams random k-vectors of matrix values and x values, one per cycle with
// occasional idle cycles, with random lanes flagged as ignored. Each partial
// sum is compared bit for bit with the pairwise sum of the products, formed
// with the simulator's own doubles (ignored lanes contribute 0.0 * x). Checks
// that every sum leaves exactly ALPHA_M + ALPHA_A lg K = 52 cycles after its
// k-vector and that the tag travels with it.
module tb_reduction_tree;
  import jacobi_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned K = 8, ALPHA_M = 10, ALPHA_A = 14;
  localparam int unsigned LAT = ALPHA_M + ALPHA_A * 3;
  localparam int NOPS = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  fp64_t [K-1:0] a = '0, x = '0;
  logic [K-1:0] ign = '0;
  logic [15:0] in_tag = '0;
  logic out_valid;
  fp64_t sum;
  logic [15:0] out_tag;
  int checks = 0, failures = 0, cycle = 0, nout = 0, nign = 0;
  fp64_t exp_s [NOPS];
  int t_in [NOPS];

  reduction_tree #(.K(K), .ALPHA_M(ALPHA_M), .ALPHA_A(ALPHA_A), .TAG_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (sum !== exp_s[out_tag] || cycle - t_in[out_tag] != int'(LAT)) begin
        failures++;
        $display("op %0d: got %h want %h latency %0d", out_tag, sum, exp_s[out_tag],
                 cycle - t_in[out_tag]);
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NOPS; i++) begin
      automatic real p[$];
      fp64_t [K-1:0] va, vx;
      logic [K-1:0] vi;
      for (int h = 0; h < int'(K); h++) begin
        real ra, rx;
        ra = rnd_val(0.001, 100.0, 1);
        rx = rnd_val(0.001, 100.0, 1);
        vi[h] = ($urandom % 5 == 0);
        if (vi[h]) nign++;
        va[h] = $realtobits(ra);
        vx[h] = $realtobits(rx);
        p.push_back(vi[h] ? 0.0 * rx : ra * rx);
      end
      exp_s[i] = $realtobits(pair_sum(p));
      t_in[i] = cycle + 1;
      a <= va; x <= vx; ign <= vi; in_tag <= 16'(i); in_valid <= 1;
      @(posedge clk);
      if ($urandom % 8 == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (nout != NOPS || nign == 0) begin
      failures++;
      $display("got %0d sums, want %0d; %0d lanes ignored", nout, NOPS, nign);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
