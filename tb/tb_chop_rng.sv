// tb_chop_rng: statistics of the chopping sequences. Over 200 000 clocks each
// source must be balanced (ones within 49..51 %), the two sources must agree
// on about half the clocks (uncorrelated at lag 0), each source must agree
// with its own previous bit on about half the clocks, and comparator j must
// use the same sequence as comparator j+2 while comparator j+1 differs.
module tb_chop_rng;
  localparam int NQ = 63;
  localparam int K = 200000;

  logic clk = 0, rst_n = 0;
  logic [NQ-1:0] q;
  logic [1:0] prev;
  int ones0 = 0, ones1 = 0, agree = 0, same0 = 0, same1 = 0;
  int checks = 0, failures = 0;

  chop_rng #(.NQ(NQ), .NSRC(2)) dut (.clk(clk), .rst_n(rst_n), .q(q));

  always #5 clk = ~clk;

  task automatic in_range(string what, int v, int lo, int hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s = %0d not in [%0d, %0d]", what, v, lo, hi);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prev = q[1:0];
    for (int k = 0; k < K; k++) begin
      @(negedge clk);
      ones0 += q[0];
      ones1 += q[1];
      agree += (q[0] == q[1]);
      same0 += (q[0] == prev[0]);
      same1 += (q[1] == prev[1]);
      prev = q[1:0];
      if (k % 97 == 0) begin
        for (int j = 2; j < NQ; j++) begin
          checks++;
          if (q[j] !== q[j-2]) begin failures++; $display("FAIL q[%0d] != q[%0d]", j, j - 2); end
        end
      end
    end
    in_range("ones of source 0", ones0, K * 49 / 100, K * 51 / 100);
    in_range("ones of source 1", ones1, K * 49 / 100, K * 51 / 100);
    in_range("agreement of sources", agree, K * 49 / 100, K * 51 / 100);
    in_range("lag-1 agreement source 0", same0, K * 49 / 100, K * 51 / 100);
    in_range("lag-1 agreement source 1", same1, K * 49 / 100, K * 51 / 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
