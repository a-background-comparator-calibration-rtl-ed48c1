// tb_nmt: directed non-monotonic-threshold case on the full converter.
//
// All comparators are ideal except comparator j = 32, whose mismatch offset is
// +1.5 LSB. While its chopping bit is +1 its threshold is V_R,32 + 1.5 LSB,
// above the threshold of comparator 33 (V_R,33 = V_R,32 + 1 LSB). The input is
// held at V_R,32 + 1.25 LSB, between the two. Expected per sample:
//   q_32 = +1: comparator 32 reads 0, comparators 31 and 33 read 1, so the
//              edge bits of 31 and 33 are both set and that of 32 is not;
//   q_32 = -1: threshold V_R,32 - 1.5 LSB, a normal thermometer word with
//              only edge bit 33 set.
// Edge bit 32 is never set in this situation, so calibration of comparator 32
// is stalled while the input stays there. Then a full-scale sine is applied:
// because the neighbours chop with an uncorrelated sequence, comparator 32 is
// reached again and its offset must end below 0.5 LSB.
module tb_nmt;
  import bcc_pkg::*;
  localparam int NQ = 63;
  localparam int J = 31;           // bit index of comparator 32
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  volt_t vin = '0;
  volt_t [NQ-1:0] vos0;
  logic [5:0] dout;
  logic [NQ-1:0] dc, de;
  logic signed [TW_DEF-1:0] trim [NQ];
  logic q_prev;
  int checks = 0, failures = 0, n_double = 0, n_normal = 0;
  int t32, off32;

  flash_adc dut (.clk(clk), .rst_n(rst_n), .vin(vin), .vos0(vos0), .dout(dout),
                 .dc(dc), .de(de), .trim(trim));

  always #5 clk = ~clk;

  initial begin
    vos0 = '0;
    vos0[J] = volt_t'(384);
    vin = volt_t'(0 * 256 + 320);    // V_R,32 = 0 LSB; input at +1.25 LSB
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    q_prev = dut.q[J];
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      // dc/de now hold the decision taken with q_prev
      checks++;
      if (q_prev) begin
        n_double++;
        if (dc[J] !== 1'b0 || de[J-1] !== 1'b1 || de[J+1] !== 1'b1 || de[J] !== 1'b0) begin
          failures++;
          $display("FAIL q=+1: dc[31..33]=%b%b%b de=%b%b%b", dc[J-1], dc[J], dc[J+1], de[J-1], de[J], de[J+1]);
        end
      end else begin
        n_normal++;
        if (dc[J] !== 1'b1 || de[J-1] !== 1'b0 || de[J] !== 1'b0 || de[J+1] !== 1'b1) begin
          failures++;
          $display("FAIL q=-1: dc[31..33]=%b%b%b de=%b%b%b", dc[J-1], dc[J], dc[J+1], de[J-1], de[J], de[J+1]);
        end
      end
      q_prev = dut.q[J];
    end
    checks++;
    if (trim[J] !== '0) begin failures++; $display("FAIL comparator 32 calibrated while stalled"); end
    checks++;
    if (n_double == 0 || n_normal == 0) begin failures++; $display("FAIL chopping state missing"); end
    $display("stalled phase: %0d samples with two edge bits, %0d normal", n_double, n_normal);

    for (int k = 0; k < 60000; k++) begin
      vin = volt_t'($rtoi(32.0 * 256.0 * $sin(2.0 * PI * 0.00731 * k)));
      @(negedge clk);
    end
    t32 = trim[J];
    off32 = 384 + t32 * DV_DEF;
    $display("after sine: comparator 32 offset %0.3f LSB", off32 / 256.0);
    checks++;
    if (off32 >= 128 || off32 <= -128) begin failures++; $display("FAIL comparator 32 not calibrated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
