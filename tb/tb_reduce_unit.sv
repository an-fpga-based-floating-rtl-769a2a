// tb_reduce_unit: self-checking testbench of reduce_unit (M = 8, ALPHA_A = 14).
//
// Sends rows (reduction vectors) of 1 to 8 random values, mostly back to back
// and sometimes with idle cycles inside and between rows. Each row's result is
// compared bit for bit with the pairwise sum of its values (odd leftovers
// added to 0.0), formed with the simulator's own doubles, and results must
// come out in row order. Timing: a row of M values sent on consecutive cycles
// must finish alpha_r = 61 cycles after its first value (Equation 6 of the
// solver's specification); any row must finish alpha_r - (M - 1) = 54 cycles
// after its last value.
module tb_reduce_unit;
  import jacobi_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned M = 8, ALPHA_A = 14;
  localparam int ALPHA_R = 61;
  localparam int NROWS = 200;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0;
  fp64_t in_data = '0;
  logic out_valid;
  fp64_t out_data;
  int checks = 0, failures = 0, cycle = 0, nout = 0, nfull = 0;
  fp64_t exp_s [NROWS];
  int t_first [NROWS], t_last [NROWS];
  bit full [NROWS];

  reduce_unit #(.M(M), .ALPHA_A(ALPHA_A)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (nout >= NROWS || out_data !== exp_s[nout] ||
          cycle - t_last[nout] != ALPHA_R - int'(M - 1) ||
          (full[nout] && cycle - t_first[nout] != ALPHA_R)) begin
        failures++;
        $display("row %0d: got %h want %h, %0d cycles after first, %0d after last",
                 nout, out_data, exp_s[nout], cycle - t_first[nout], cycle - t_last[nout]);
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < NROWS; r++) begin
      automatic real v[$];
      int len;
      bit gaps;
      len  = (r % 3 == 0) ? int'(M) : 1 + int'($urandom % M);
      gaps = (r % 5 == 4);
      full[r] = (len == int'(M)) && !gaps;
      if (full[r]) nfull++;
      for (int j = 0; j < len; j++) begin
        real val;
        val = rnd_val(0.01, 1000.0, 1);
        v.push_back(val);
        if (j == 0) t_first[r] = cycle + 1;
        t_last[r] = cycle + 1;
        in_valid <= 1; in_data <= $realtobits(val); in_last <= (j == len - 1);
        @(posedge clk);
        if (gaps) begin
          in_valid <= 0;
          repeat (1 + $urandom % 3) @(posedge clk);
        end
      end
      exp_s[r] = $realtobits(pair_sum(v));
      if (r % 7 == 6) begin
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (ALPHA_R + 5) @(posedge clk);
    checks++;
    if (nout != NROWS || nfull == 0) begin
      failures++;
      $display("got %0d rows, want %0d", nout, NROWS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
