// tb_gray2bin: exhaustive 6-bit check. For every binary value b the Gray code
// b ^ (b >> 1) is applied and b is expected back.
module tb_gray2bin;
  localparam int N = 6;
  logic [N-1:0] gray, bin;
  int checks = 0, failures = 0;

  gray2bin #(.N(N)) dut (.gray(gray), .bin(bin));

  initial begin
    for (int b = 0; b < (1 << N); b++) begin
      gray = N'(b ^ (b >> 1));
      #1;
      checks++;
      if (bin !== N'(b)) begin
        failures++;
        $display("FAIL gray=%b bin=%b expected %0d", gray, bin, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
