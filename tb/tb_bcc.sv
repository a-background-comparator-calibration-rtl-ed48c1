// tb_bcc: stand-alone background-calibrated comparator converging from a large
// offset. Setting: comparator in the middle of a 6-bit converter (V_R = 0),
// full-scale sine input of +/-32 LSB, dV = 1/2 LSB, N_C = 64, initial offset
// 5.8 LSB; the calibration input is the comparator's own output. For this
// setting the single-pole estimate of the loop gives a time constant
// tau = N_C * V_FS / (dV * 2/pi) = pi * 64 * 64 ~ 12868 samples, so the
// offset should pass 1 LSB after about tau * ln(5.8) ~ 22600 samples.
// Checks: the trim code only ever moves by one step; V_OS at k = tau lies
// within 1.2..3.5 LSB; |V_OS| first falls below
// 1 LSB within 8000..60000 samples; after 8 tau the offset stays within
// +/-1.5 LSB and its mean is within +/-0.5 LSB of zero.
module tb_bcc;
  import bcc_pkg::*;
  localparam int NC = 64;
  localparam int DV = 128;         // 1/2 LSB
  localparam int TW = 7;
  localparam int V0 = 1485;        // 5.8 LSB in 1/256 LSB
  localparam int K  = 200000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, q = 0, dc;
  volt_t vin = '0;
  logic signed [TW-1:0] trim, trim_prev;
  bpd_s_t s;
  int vos, first_k = -1, n_tail = 0;
  real sum_tail = 0.0, sum2_tail = 0.0, mean, sd;
  int checks = 0, failures = 0;

  bcc #(.NC(NC), .TW(TW), .DV(DV)) dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .vref('0), .vos0(volt_t'(V0)),
    .q(q), .cal_d(dc), .dc(dc), .trim(trim), .s(s));

  always #5 clk = ~clk;

  initial begin
    void'($urandom(7));
    repeat (2) @(posedge clk);
    rst_n = 1;
    trim_prev = '0;
    for (int k = 0; k < K; k++) begin
      @(negedge clk);
      vin = volt_t'($rtoi(32.0 * 256.0 * $sin(2.0 * PI * 0.0123457 * k)));
      q   = $urandom_range(0, 1);
      vos = V0 + int'(trim) * DV;
      checks++;
      if (int'(trim) - int'(trim_prev) > 1 || int'(trim) - int'(trim_prev) < -1) begin
        failures++;
        $display("FAIL trim jumped %0d -> %0d", trim_prev, trim);
      end
      trim_prev = trim;
      if (first_k < 0 && vos < 256 && vos > -256) first_k = k;
      if (k == 12868) begin
        // single-pole estimate: 5.8 / e = 2.13 LSB, quantised to 1/2 LSB steps
        $display("bcc: V_OS at k=tau: %0.2f LSB", vos / 256.0);
        checks++;
        if (vos < 300 || vos > 900) begin failures++; $display("FAIL V_OS at tau %0.2f LSB", vos / 256.0); end
      end
      if (k >= 8 * 12868) begin
        n_tail++;
        sum_tail += vos / 256.0;
        sum2_tail += (vos / 256.0) * (vos / 256.0);
        checks++;
        if (vos > 384 || vos < -384) begin
          failures++;
          $display("FAIL k=%0d V_OS=%0.2f LSB after convergence", k, vos / 256.0);
        end
      end
    end
    mean = sum_tail / n_tail;
    sd = $sqrt(sum2_tail / n_tail - mean * mean);
    $display("bcc: |V_OS|<1 LSB first at k=%0d; steady mean %0.3f LSB, sigma %0.3f LSB", first_k, mean, sd);
    checks++;
    if (first_k < 8000 || first_k > 60000) begin failures++; $display("FAIL settling k=%0d", first_k); end
    checks++;
    if (mean > 0.5 || mean < -0.5) begin failures++; $display("FAIL mean offset %0.3f", mean); end
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
