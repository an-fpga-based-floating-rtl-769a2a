// delay_line: fixed-latency shift register, the "delay unit" that keeps
// operands and side information in step with the floating-point pipelines.
//
// The input word appears at the output DEPTH clock cycles later; one word is
// accepted every cycle. DEPTH = 0 gives a plain wire. All stages are cleared
// by the asynchronous active-low reset, so a valid bit carried in the word
// reads as 0 after reset. How delays are built is this design's own choice;
// the solver only requires values to arrive at the right cycle.
module delay_line #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DEPTH-1];
  end

endmodule
