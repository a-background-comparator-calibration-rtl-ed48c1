// tb_flash_adc: end-to-end test of the 6-bit windowed background-calibrated
// flash ADC at its default parameters (63 comparators, N_C = 16,
// dV = 1/4 LSB).
//
// Phase 1, ideal comparators (no mismatch): every output code 0..63 is
// produced by an input in the middle of its step and must appear at dout two
// clock edges later.
// Phase 2, calibration with a sine input: each comparator gets a Gaussian
// mismatch offset (sigma 2 LSB, fixed seed) and a full-scale sine is applied
// for 1 000 000 samples. The spatial standard deviation of the 63 effective
// offsets V_0 + dV*T must fall below 0.25 LSB within 40 000 samples and every
// offset must end below 0.5 LSB in magnitude with sigma_s below 0.2 LSB.
// Over the last 20 000 samples the output code must be within 1 of the ideal
// code of the sample.
// Phase 3, the same offsets with a triangular input (uniform distribution).
// Mechanisms counted (each must occur): offset steps up and down, edge words
// with several active bits or none (non-monotonic thresholds during the first
// samples), a non-thermometer comparator word, and comparator results that the
// window withholds from calibration (dc = 1 but de = 0).
module tb_flash_adc;
  import bcc_pkg::*;
  localparam int NQ = 63;
  localparam int DV = DV_DEF;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  volt_t vin = '0;
  volt_t [NQ-1:0] vos0;
  logic [5:0] dout;
  logic [NQ-1:0] dc, de;
  logic signed [TW_DEF-1:0] trim [NQ];
  logic signed [TW_DEF-1:0] trim_prev [NQ];

  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_multi = 0, n_nonthermo = 0, n_withheld = 0;
  int exp_pipe [3];
  int init_off [NQ];

  flash_adc dut (.clk(clk), .rst_n(rst_n), .vin(vin), .vos0(vos0), .dout(dout),
                 .dc(dc), .de(de), .trim(trim));

  always #5 clk = ~clk;

  function automatic int ideal_code(int v);
    // number of reference levels (j - 32) LSB, j = 1..63, strictly below v
    int c = 0;
    for (int j = 1; j <= NQ; j++) if (v > (j - 32) * 256) c++;
    return c;
  endfunction

  // effective offset of comparator j in LSB
  function automatic real eff(int j);
    int a, b;
    a = vos0[j];
    b = trim[j];
    return $itor(a + b * DV) / 256.0;
  endfunction

  function automatic real sigma_s();
    real s = 0.0, s2 = 0.0, v, m;
    for (int j = 0; j < NQ; j++) begin
      v = eff(j);
      s += v;
      s2 += v * v;
    end
    m = s / NQ;
    return $sqrt(s2 / NQ - m * m);
  endfunction

  function automatic real max_abs();
    real m = 0.0, v;
    for (int j = 0; j < NQ; j++) begin
      v = eff(j);
      if (v < 0) v = -v;
      if (v > m) m = v;
    end
    return m;
  endfunction

  // count the mechanisms every clock
  always @(negedge clk) if (rst_n) begin
    for (int j = 0; j < NQ; j++) begin
      if (trim[j] > trim_prev[j]) n_up++;
      if (trim[j] < trim_prev[j]) n_dn++;
      trim_prev[j] = trim[j];
      if (dc[j] && !de[j]) n_withheld++;
      if (j < NQ - 1 && !dc[j] && dc[j+1]) n_nonthermo++;
    end
    if ($countones(de) > 1) n_multi++;
  end

  task automatic reset_dut();
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NQ; j++) trim_prev[j] = '0;
  endtask

  // run K samples of a waveform (0 = sine, 1 = triangle); return the first
  // sample at which sigma_s < 0.25 LSB (-1 if never)
  task automatic run_wave(input int wave, input int K, output int settle_k);
    real ph, x;
    int v;
    settle_k = -1;
    for (int k = 0; k < K; k++) begin
      ph = 0.00731 * k;
      ph = ph - $floor(ph);
      if (wave == 0) x = $sin(2.0 * PI * ph);
      else           x = (ph < 0.5) ? (4.0 * ph - 1.0) : (3.0 - 4.0 * ph);
      v = $rtoi(32.0 * 256.0 * x);
      vin = volt_t'(v);
      exp_pipe[2] = exp_pipe[1];
      exp_pipe[1] = exp_pipe[0];
      exp_pipe[0] = ideal_code(v);
      @(negedge clk);
      if (settle_k < 0 && sigma_s() < 0.25) settle_k = k;
      if (k % ((k < 50000) ? 10000 : 200000) == 0) $display("  k=%0d sigma_s=%0.3f LSB max|Vos|=%0.3f LSB", k, sigma_s(), max_abs());
      if (k >= K - 20000) begin
        checks++;
        if (int'(dout) - exp_pipe[1] > 1 || int'(dout) - exp_pipe[1] < -1) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d dout=%0d ideal=%0d", k, dout, exp_pipe[1]);
        end
      end
    end
  endtask

  initial begin
    int settle_sine, settle_tri;
    real u1, u2, g;
    void'($urandom(12345));

    // ---------------- phase 1: ideal converter ----------------
    vos0 = '0;
    reset_dut();
    for (int c = 0; c <= NQ; c++) begin
      vin = volt_t'((c - 32) * 256 + 128);
      repeat (2) @(negedge clk);
      checks++;
      if (dout !== 6'(c)) begin
        failures++;
        $display("FAIL ideal conversion: code %0d read %0d", c, dout);
      end
    end
    // latency: a step from code 10 to code 50 shows after exactly two edges
    vin = volt_t'((10 - 32) * 256 + 128);
    repeat (3) @(negedge clk);
    vin = volt_t'((50 - 32) * 256 + 128);
    @(negedge clk);
    checks++;
    if (dout !== 6'd10) begin failures++; $display("FAIL latency: code changed after one edge"); end
    @(negedge clk);
    checks++;
    if (dout !== 6'd50) begin failures++; $display("FAIL latency: code %0d after two edges", dout); end

    // ---------------- phase 2: calibration, sine input ----------------
    for (int j = 0; j < NQ; j++) begin
      u1 = ($urandom_range(1, 1000000)) / 1000001.0;
      u2 = ($urandom_range(0, 1000000)) / 1000001.0;
      g = $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
      init_off[j] = $rtoi(2.0 * 256.0 * g);
      vos0[j] = volt_t'(init_off[j]);
    end
    reset_dut();
    $display("sine input: initial sigma_s=%0.3f LSB max|Vos|=%0.3f LSB", sigma_s(), max_abs());
    run_wave(0, 1000000, settle_sine);
    $display("sine input: sigma_s<0.25 LSB at k=%0d; final sigma_s=%0.3f LSB max|Vos|=%0.3f LSB",
             settle_sine, sigma_s(), max_abs());
    checks++;
    if (settle_sine < 0 || settle_sine > 40000) begin failures++; $display("FAIL sine settling"); end
    checks++;
    if (max_abs() >= 0.5) begin failures++; $display("FAIL residual offset above 0.5 LSB"); end
    checks++;
    if (sigma_s() >= 0.2) begin failures++; $display("FAIL steady-state sigma_s above 0.2 LSB"); end

    // ---------------- phase 3: calibration, triangular input ----------------
    reset_dut();
    run_wave(1, 100000, settle_tri);
    $display("triangle input: sigma_s<0.25 LSB at k=%0d; final sigma_s=%0.3f LSB max|Vos|=%0.3f LSB",
             settle_tri, sigma_s(), max_abs());
    checks++;
    if (settle_tri < 0 || settle_tri > 40000) begin failures++; $display("FAIL triangle settling"); end
    checks++;
    if (max_abs() >= 0.5) begin failures++; $display("FAIL residual offset above 0.5 LSB"); end

    $display("mechanisms: steps up %0d, steps down %0d, multi-edge words %0d, non-thermometer words %0d, withheld results %0d",
             n_up, n_dn, n_multi, n_nonthermo, n_withheld);
    checks += 5;
    if (n_up == 0)        begin failures++; $display("FAIL no offset step up"); end
    if (n_dn == 0)        begin failures++; $display("FAIL no offset step down"); end
    if (n_multi == 0)     begin failures++; $display("FAIL no multi-edge word"); end
    if (n_nonthermo == 0) begin failures++; $display("FAIL no non-thermometer word"); end
    if (n_withheld == 0)  begin failures++; $display("FAIL window never withheld a result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
