// tb_fp_div: self-checking testbench of fp_div.
//
// Streams random binary64 operand pairs, one per cycle, plus special values
// (zeros, infinities, NaN), and compares every quotient bit for bit with the
// simulator's own IEEE-754 double divide (round to nearest even). Every third
// pair is 1.0 / x, the reciprocal the solver forms of each diagonal element.
// Operands are drawn so that neither operands nor quotients are subnormal. Also checks
// that each result leaves exactly LAT cycles after its operands and that the
// tag travels with it.
module tb_fp_div;
  import jacobi_pkg::*;
  localparam int unsigned LAT = 58;
  localparam int NOPS = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  fp64_t a = '0, b = '0;
  logic [15:0] in_tag = '0;
  logic out_valid;
  fp64_t y;
  logic [15:0] out_tag;
  int checks = 0, failures = 0, cycle = 0;

  fp_div #(.LAT(LAT), .TAG_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp64_t exp_y [NOPS];
  int    t_in  [NOPS];
  int    nout = 0;

  function automatic fp64_t rnd_fp(int emin, int emax);
    logic [10:0] e;
    e = 11'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  function automatic fp64_t ref_div(fp64_t x, fp64_t z);
    real r;
    if (fp_is_nan(x) || fp_is_nan(z)) return FP_QNAN;
    r = $bitstoreal(x) / $bitstoreal(z);
    if (fp_is_nan($realtobits(r))) return FP_QNAN;
    return $realtobits(r);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (y !== exp_y[out_tag] || (cycle - t_in[out_tag]) != LAT) begin
        failures++;
        $display("mismatch op %0d: got %h want %h, latency %0d", out_tag, y, exp_y[out_tag],
                 cycle - t_in[out_tag]);
      end
      nout++;
    end
  end

  initial begin
    fp64_t sa [8], sb [8];
    sa = '{FP_ZERO, 64'h8000_0000_0000_0000, 64'h7FF0_0000_0000_0000, FP_QNAN,
           64'h7FF0_0000_0000_0000, FP_ONE, 64'hC000_0000_0000_0000, 64'h3FF8_0000_0000_0000};
    sb = '{FP_ONE, FP_ONE, 64'h4000_0000_0000_0000, FP_ONE,
           64'h7FF0_0000_0000_0000, 64'h3FF0_0000_0000_0001, 64'h4008_0000_0000_0000, 64'h3FF8_0000_0000_0000};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NOPS; i++) begin
      fp64_t x, z;
      if (i < 8) begin x = sa[i]; z = sb[i]; end
      else begin x = (i % 3 == 0) ? FP_ONE : rnd_fp(700, 1300); z = rnd_fp(700, 1300); end
      exp_y[i] = ref_div(x, z);
      t_in[i]  = cycle + 1;
      a <= x; b <= z; in_tag <= 16'(i); in_valid <= 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (nout != NOPS) begin failures++; $display("got %0d results, want %0d", nout, NOPS); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
