// tb_acc1: random stimulus for accumulator ACC1 against a reference sum.
// inc/dec/clr are driven at random; the expected value follows
// R_next = (clr ? 0 : R) + U, with U = +1, -1 or 0.
module tb_acc1;
  localparam int NC = 16;
  localparam int RW = $clog2(NC + 2) + 1;

  logic clk = 0, rst_n = 0, inc = 0, dec = 0, clr = 0;
  logic signed [RW-1:0] r;
  int model = 0;
  int checks = 0, failures = 0;

  acc1 #(.NC(NC)) dut (.clk(clk), .rst_n(rst_n), .inc(inc), .dec(dec), .clr(clr), .r(r));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      checks++;
      if (r !== RW'(model)) begin
        failures++;
        $display("FAIL k=%0d r=%0d model=%0d", k, r, model);
      end
      case ($urandom_range(0, 2))
        0: begin inc = 1; dec = 0; end
        1: begin inc = 0; dec = 1; end
        default: begin inc = 0; dec = 0; end
      endcase
      // clear when the reference sum is near the +/-(NC+1) range, or at random
      clr = (model > NC || model < -NC) || ($urandom_range(0, 40) == 0);
      model = (clr ? 0 : model) + (inc ? 1 : 0) - (dec ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
