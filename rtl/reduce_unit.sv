// reduce_unit: serial reduction of the tree's partial sums, one row at a time.
//
// The tree delivers a row's reduction vector as up to M values on successive
// cycles, the last one flagged in_last; this unit returns their sum. A plain
// adder loop cannot do this because the adder is deeply pipelined, so the sum
// is built as a binary tree laid out in time: level l holds one value, and
// when the next value of the same row arrives the pair enters that level's
// pipelined adder (ALPHA_A cycles); a row's last value with no partner is
// added to zero. After ceil(lg M) levels each row has become one value. Rows
// may follow one another without gaps and the order of rows is kept.
//
// The solver takes its reduction circuit from other work and specifies only
// its latency, alpha_r = m + 2^(ceil(lg m)+1) + (alpha_a-1) ceil(lg m) - 2
// (61 cycles for m = 8, alpha_a = 14), counted from a row's first value when
// its m values arrive on consecutive cycles. This unit meets that count
// exactly: its own latency from the last value is ceil(lg M) * ALPHA_A, and a
// delay line makes up the rest, so the solver's cycle budget is kept. The
// structure, with ceil(lg M) adders instead of one, is this design's own.
module reduce_unit
  import jacobi_pkg::*;
#(
  parameter int unsigned M        = 8,
  parameter int unsigned ALPHA_A  = 14,
  localparam int unsigned L       = (M > 1) ? $clog2(M) : 0,
  localparam int unsigned ALPHA_R = reduce_latency(M, ALPHA_A),
  localparam int unsigned PAD     = ALPHA_R - (M - 1) - L * ALPHA_A
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp64_t in_data,
  input  logic  in_last,
  output logic  out_valid,
  output fp64_t out_data
);

  // stream between levels: lv[l] enters level l
  logic  lv    [L+1];
  fp64_t ld    [L+1];
  logic  llast [L+1];

  assign lv[0]    = in_valid;
  assign ld[0]    = in_data;
  assign llast[0] = in_last;

  for (genvar l = 0; l < int'(L); l++) begin : g_lvl
    logic  held_v;
    fp64_t held_d;
    logic  fire;

    // a pair is complete when a value is waiting, or the row ends here
    assign fire = lv[l] && (held_v || llast[l]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        held_v <= 1'b0;
        held_d <= FP_ZERO;
      end else if (lv[l]) begin
        if (!held_v && !llast[l]) begin
          held_v <= 1'b1;
          held_d <= ld[l];
        end else begin
          held_v <= 1'b0;
        end
      end
    end

    fp_add #(.LAT(ALPHA_A), .TAG_W(1)) u_add (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (fire),
      .a        (held_v ? held_d : ld[l]),
      .b        (held_v ? ld[l] : FP_ZERO),
      .sub      (1'b0),
      .in_tag   (llast[l]),
      .out_valid(lv[l+1]),
      .y        (ld[l+1]),
      .out_tag  (llast[l+1])
    );
  end

  // after the last level every value closes a row
  assert property (@(posedge clk) disable iff (!rst_n) lv[L] |-> llast[L])
    else $error("reduce_unit: a row had more than %0d values", 2 ** L);

  delay_line #(.W(65), .DEPTH(PAD)) u_pad (
    .clk  (clk),
    .rst_n(rst_n),
    .d    ({lv[L], ld[L]}),
    .q    ({out_valid, out_data})
  );

endmodule
