// tb_kvec_store: self-checking testbench of kvec_store.
//
// Fills a store of 13 words of 4 lanes with random data, one word per cycle,
// then reads it back through two read ports at random addresses, checking that
// each port returns the word written there exactly one cycle after its
// address. Also checks that a word rewritten later reads back the new value,
// and that a read in the same cycle as a write to that word still returns the
// old contents.
module tb_kvec_store;
  localparam int unsigned LANES = 4, W = 16, DEPTH = 13, NRD = 2, AW = 4;
  logic clk = 0;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = '0;
  logic [LANES-1:0][W-1:0] wr_data = '0;
  logic [NRD-1:0][AW-1:0] rd_addr = '0;
  logic [NRD-1:0][LANES-1:0][W-1:0] rd_data;
  logic [LANES-1:0][W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  kvec_store #(.LANES(LANES), .W(W), .DEPTH(DEPTH), .NRD(NRD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [NRD-1:0][AW-1:0] addrs,
                            input logic [NRD-1:0][LANES-1:0][W-1:0] want);
    rd_addr <= addrs;
    @(posedge clk);
    #1;
    for (int p = 0; p < int'(NRD); p++) begin
      checks++;
      if (rd_data[p] !== want[p]) begin
        failures++;
        $display("port %0d addr %0d: got %h want %h", p, addrs[p], rd_data[p], want[p]);
      end
    end
  endtask

  initial begin
    @(posedge clk);
    for (int i = 0; i < int'(DEPTH); i++) begin
      logic [LANES-1:0][W-1:0] d;
      for (int h = 0; h < int'(LANES); h++) d[h] = W'($urandom);
      model[i] = d;
      wr_en <= 1; wr_addr <= AW'(i); wr_data <= d;
      @(posedge clk);
    end
    wr_en <= 0;
    for (int n = 0; n < 60; n++) begin
      logic [NRD-1:0][AW-1:0] ad;
      logic [NRD-1:0][LANES-1:0][W-1:0] want;
      for (int p = 0; p < int'(NRD); p++) begin
        ad[p] = AW'($urandom % DEPTH);
        want[p] = model[ad[p]];
      end
      check_read(ad, want);
    end
    // write and read the same word in one cycle: old data, then new data
    begin
      logic [LANES-1:0][W-1:0] d, old;
      logic [NRD-1:0][LANES-1:0][W-1:0] want;
      for (int h = 0; h < int'(LANES); h++) d[h] = W'($urandom);
      old = model[5];
      model[5] = d;
      wr_en <= 1; wr_addr <= AW'(5); wr_data <= d;
      want[0] = old; want[1] = old;
      check_read({AW'(5), AW'(5)}, want);
      wr_en <= 0;
      want[0] = d; want[1] = model[2];
      check_read({AW'(2), AW'(5)}, want);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
