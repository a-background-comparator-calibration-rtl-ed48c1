// tb_pmf: distribution of the calibrated offset against the analytic
// steady-state calculation.
//
// Setting: one stand-alone calibrated comparator at mid-scale of a 6-bit
// converter (V_R = 0), full-scale sine input of +/-32 LSB, dV = 1/2 LSB,
// N_C = 64, and an inherent offset chosen so that the offset level nearest
// zero is V0_OS = dV/4 = 1/8 LSB. The offset can only take the levels
// V_m = 1/8 LSB + m * dV.
//
// Calculation (done in this testbench, independent of the RTL): for each
// level m the chopped comparator gives U = +1 with probability p+/2 and
// U = -1 with probability p-/2, where p+ = P(vin > V_m) and
// p- = P(vin > -V_m) = 1/2 - asin(x/32)/pi evaluated at the two thresholds.
// Counting only samples with U != 0, ACC1 performs a random walk with step
// probabilities a = p+/(p+ + p-) and 1 - a, started from 0 after each move.
// Propagating its distribution, removing what leaves +/-N_C, gives the
// probabilities of leaving the level upwards (P_u) and downwards (P_d) per
// step of the walk. Detailed balance between neighbouring levels,
// M(m) * P_u(m) = M(m+1) * P_d(m+1), then yields the probability mass
// function M of the offset.
//
// Simulation: 2 * 10^7 samples after a warm-up; the fraction of samples spent
// at each level is compared with M. Checks: each level within 0.03 of M, the
// most likely level is the one nearest zero, and the standard deviations agree
// within 15 %.
module tb_pmf;
  import bcc_pkg::*;
  localparam int NC = 64;
  localparam int DV = 128;         // 1/2 LSB
  localparam int V00 = 32;         // 1/8 LSB
  localparam int MM = 8;           // levels -MM..MM
  localparam int NL = 2 * MM + 1;
  localparam int K_WARM = 200000;
  localparam int K = 20000000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, q = 0, dc;
  volt_t vin = '0;
  logic signed [7:0] trim;
  bpd_s_t s;
  int checks = 0, failures = 0;
  real m_calc [NL];
  longint hist [NL];

  bcc #(.NC(NC), .TW(8), .DV(DV)) dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .vref('0), .vos0(volt_t'(V00)),
    .q(q), .cal_d(dc), .dc(dc), .trim(trim), .s(s));

  always #5 clk = ~clk;

  // probability that a full-scale sine exceeds x (in LSB)
  function automatic real p_above(real x);
    if (x >= 32.0) return 0.0;
    if (x <= -32.0) return 1.0;
    return 0.5 - $asin(x / 32.0) / PI;
  endfunction

  // exit probabilities per walk step at one level
  task automatic exit_probs(input real v, output real pu, output real pd);
    real a, b, ps, mass;
    real pr [2 * NC + 3];
    real nxt [2 * NC + 3];
    a = p_above(v) / (p_above(v) + p_above(-v));
    b = 1.0 - a;
    foreach (pr[i]) pr[i] = 0.0;
    pr[NC + 1 + 1] = a;
    pr[NC + 1 - 1] = b;
    pu = 0.0; pd = 0.0; ps = 0.0;
    mass = 1.0;
    while (mass > 1e-10) begin
      pu += pr[2 * NC + 2];
      pd += pr[0];
      mass = 0.0;
      for (int i = 1; i <= 2 * NC + 1; i++) mass += pr[i];
      ps += mass;
      foreach (nxt[i]) nxt[i] = 0.0;
      for (int i = 1; i <= 2 * NC + 1; i++) begin
        nxt[i + 1] += a * pr[i];
        nxt[i - 1] += b * pr[i];
      end
      pr = nxt;
    end
    ps = pu + pd + ps;
    pu = pu / ps;
    pd = pd / ps;
  endtask

  initial begin
    real pu [NL];
    real pd [NL];
    real tot, mc, ms, sc, ss, lvl, d;
    int idx, peak;
    longint n;

    // ---------- calculation ----------
    for (int m = -MM; m <= MM; m++) exit_probs($itor(V00 + m * DV) / 256.0, pu[m + MM], pd[m + MM]);
    m_calc[MM] = 1.0;
    for (int m = 1; m <= MM; m++) begin
      m_calc[MM + m] = m_calc[MM + m - 1] * pu[MM + m - 1] / pd[MM + m];
      m_calc[MM - m] = m_calc[MM - m + 1] * pd[MM - m + 1] / pu[MM - m];
    end
    tot = 0.0;
    foreach (m_calc[i]) tot += m_calc[i];
    foreach (m_calc[i]) m_calc[i] /= tot;

    // ---------- simulation ----------
    foreach (hist[i]) hist[i] = 0;
    void'($urandom(4242));
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < K_WARM + K; k++) begin
      vin = volt_t'($rtoi(32.0 * 256.0 * $sin(2.0 * PI * 0.0123457 * k)));
      q = $urandom_range(0, 1);
      @(negedge clk);
      if (k >= K_WARM) begin
        idx = int'(trim) + MM;
        if (idx >= 0 && idx < NL) hist[idx]++;
      end
    end

    // ---------- comparison ----------
    n = 0;
    foreach (hist[i]) n += hist[i];
    mc = 0; ms = 0; sc = 0; ss = 0; peak = 0;
    for (int i = 0; i < NL; i++) begin
      lvl = $itor(V00 + (i - MM) * DV) / 256.0;
      $display("V_OS = %6.3f LSB: calculated %0.4f, simulated %0.4f", lvl, m_calc[i], $itor(hist[i]) / $itor(n));
      d = m_calc[i] - $itor(hist[i]) / $itor(n);
      checks++;
      if (d > 0.03 || d < -0.03) begin failures++; $display("FAIL level %0d differs by %0.4f", i - MM, d); end
      mc += m_calc[i] * lvl;
      sc += m_calc[i] * lvl * lvl;
      ms += $itor(hist[i]) / $itor(n) * lvl;
      ss += $itor(hist[i]) / $itor(n) * lvl * lvl;
      if (hist[i] > hist[peak]) peak = i;
    end
    sc = $sqrt(sc - mc * mc);
    ss = $sqrt(ss - ms * ms);
    $display("sigma(V_OS): calculated %0.3f LSB, simulated %0.3f LSB; mean calculated %0.3f, simulated %0.3f",
             sc, ss, mc, ms);
    checks++;
    if (peak != MM) begin failures++; $display("FAIL most likely level is %0d", peak - MM); end
    checks++;
    if (ss > 1.15 * sc || ss < 0.85 * sc) begin failures++; $display("FAIL sigma mismatch"); end
    checks++;
    if (n != K) begin failures++; $display("FAIL offset left the tracked levels"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
