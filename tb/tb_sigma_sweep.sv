// tb_sigma_sweep: steady-state offset fluctuation for other choices of the
// two design parameters dV (offset step) and N_C (peak detector threshold).
//
// Stand-alone comparators (calibration input = own output, V_R = 0, full-scale
// sine): the two settings named as reaching sigma(V_OS) < 1/3 LSB in a 6-bit
// converter, dV = 1/8 LSB with N_C = 32 and dV = 1/2 LSB with N_C = 256, are
// run side by side for 1.6 million samples; after 200 000 samples of settling
// the time-averaged standard deviation of each offset must be below 0.37 LSB
// (1/3 LSB plus a margin for the estimate, which averages only about 60
// loop time constants) and its mean within 1/8 LSB of zero.
// Windowed converter: the full 63-comparator ADC with dV = 1/2 LSB and
// N_C = 64, initial offsets Gaussian with sigma 2 LSB. With a large N_C a
// windowed comparator's offset settles on the trim step nearest zero, so the
// spatial standard deviation must end at most dV/2 = 1/4 LSB (plus 0.05 LSB
// margin for the finite number of comparators), with every offset below
// 0.5 LSB.
module tb_sigma_sweep;
  import bcc_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int K_BCC = 1600000;
  localparam int K_WARM = 200000;
  localparam int K_ADC = 300000;

  logic clk = 0, rst_n = 0;
  volt_t vin = '0;
  logic q_a = 0, q_b = 0, dc_a, dc_b;
  logic signed [8:0] trim_a, trim_b;
  bpd_s_t s_a, s_b;

  // stand-alone settings: A = (1/8 LSB, 32), B = (1/2 LSB, 256)
  localparam int DV_A = 32, NC_A = 32, V0_A = 100;
  localparam int DV_B = 128, NC_B = 256, V0_B = -70;

  bcc #(.NC(NC_A), .TW(9), .DV(DV_A)) u_a (
    .clk(clk), .rst_n(rst_n), .vin(vin), .vref('0), .vos0(volt_t'(V0_A)),
    .q(q_a), .cal_d(dc_a), .dc(dc_a), .trim(trim_a), .s(s_a));
  bcc #(.NC(NC_B), .TW(9), .DV(DV_B)) u_b (
    .clk(clk), .rst_n(rst_n), .vin(vin), .vref('0), .vos0(volt_t'(V0_B)),
    .q(q_b), .cal_d(dc_b), .dc(dc_b), .trim(trim_b), .s(s_b));

  // windowed converter with dV = 1/2 LSB, N_C = 64
  localparam int NQ = 63;
  logic rst_adc_n = 0;
  volt_t [NQ-1:0] vos0;
  logic [5:0] dout;
  logic [NQ-1:0] dc, de;
  logic signed [TW_DEF-1:0] trim [NQ];

  flash_adc #(.NC(64), .DV(128)) u_adc (
    .clk(clk), .rst_n(rst_adc_n), .vin(vin), .vos0(vos0), .dout(dout),
    .dc(dc), .de(de), .trim(trim));

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  function automatic real eff(int j);
    int a, b;
    a = vos0[j];
    b = trim[j];
    return $itor(a + b * 128) / 256.0;
  endfunction

  task automatic check(string what, real v, real lo, real hi);
    checks++;
    $display("%s = %0.3f (limits %0.3f .. %0.3f)", what, v, lo, hi);
    if (v < lo || v > hi) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real sa = 0, sa2 = 0, sb = 0, sb2 = 0, va, vb, ma, mb, n = 0;
    real s, s2, v, mx, m, u1, u2;
    int ta, tb;
    void'($urandom(99));
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < K_BCC; k++) begin
      vin = volt_t'($rtoi(32.0 * 256.0 * $sin(2.0 * PI * 0.0123457 * k)));
      q_a = $urandom_range(0, 1);
      q_b = $urandom_range(0, 1);
      @(negedge clk);
      if (k >= K_WARM) begin
        ta = trim_a;
        tb = trim_b;
        va = $itor(V0_A + ta * DV_A) / 256.0;
        vb = $itor(V0_B + tb * DV_B) / 256.0;
        sa += va; sa2 += va * va; sb += vb; sb2 += vb * vb; n += 1.0;
      end
    end
    ma = sa / n;
    mb = sb / n;
    check("dV=1/8 LSB, N_C=32: sigma(V_OS)/LSB", $sqrt(sa2 / n - ma * ma), 0.0, 0.37);
    check("dV=1/8 LSB, N_C=32: mean(V_OS)/LSB", ma, -0.125, 0.125);
    check("dV=1/2 LSB, N_C=256: sigma(V_OS)/LSB", $sqrt(sb2 / n - mb * mb), 0.0, 0.37);
    check("dV=1/2 LSB, N_C=256: mean(V_OS)/LSB", mb, -0.125, 0.125);

    // windowed converter
    for (int j = 0; j < NQ; j++) begin
      u1 = ($urandom_range(1, 1000000)) / 1000001.0;
      u2 = ($urandom_range(0, 1000000)) / 1000001.0;
      vos0[j] = volt_t'($rtoi(512.0 * $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2)));
    end
    rst_adc_n = 1;
    for (int k = 0; k < K_ADC; k++) begin
      vin = volt_t'($rtoi(32.0 * 256.0 * $sin(2.0 * PI * 0.00731 * k)));
      @(negedge clk);
    end
    s = 0; s2 = 0; mx = 0;
    for (int j = 0; j < NQ; j++) begin
      v = eff(j);
      s += v; s2 += v * v;
      if (v < 0) v = -v;
      if (v > mx) mx = v;
    end
    m = s / NQ;
    check("windowed, dV=1/2 LSB, N_C=64: spatial sigma(V_OS)/LSB", $sqrt(s2 / NQ - m * m), 0.0, 0.30);
    check("windowed, dV=1/2 LSB, N_C=64: max |V_OS|/LSB", mx, 0.0, 0.4999);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
