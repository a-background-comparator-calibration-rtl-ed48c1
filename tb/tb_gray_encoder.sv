// tb_gray_encoder: the edge-to-Gray encoder, checked for every one-hot edge
// code and the all-zero code (expected Gray code of the code index), and for
// bubbles that light two adjacent edge bits (expected OR of the two Gray
// codes, which must lie within one code of either index).
module tb_gray_encoder;
  localparam int N = 6;
  localparam int NQ = 63;
  logic [NQ-1:0] de;
  logic [N-1:0] gray;
  int checks = 0, failures = 0;

  gray_encoder #(.N(N)) dut (.de(de), .gray(gray));

  function automatic int to_gray(int v);
    return v ^ (v >> 1);
  endfunction

  function automatic int from_gray(int g);
    int b = 0;
    for (int i = N - 1; i >= 0; i--) b |= ((((b >> (i + 1)) & 1) ^ ((g >> i) & 1)) << i);
    return b;
  endfunction

  initial begin
    de = '0;
    #1;
    checks++;
    if (gray !== '0) begin failures++; $display("FAIL zero code gray=%b", gray); end
    for (int c = 1; c <= NQ; c++) begin
      de = NQ'(64'(1) << (c - 1));
      #1;
      checks++;
      if (gray !== N'(to_gray(c))) begin
        failures++;
        $display("FAIL code %0d gray=%b", c, gray);
      end
    end
    for (int c = 1; c < NQ; c++) begin
      int v;
      de = NQ'(64'(3) << (c - 1));
      #1;
      v = from_gray(int'(gray));
      checks++;
      if (gray !== N'(to_gray(c) | to_gray(c + 1)) || (v != c && v != c + 1)) begin
        failures++;
        $display("FAIL bubble %0d/%0d gray=%b -> %0d", c, c + 1, gray, v);
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
