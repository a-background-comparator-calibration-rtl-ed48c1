// tb_cp: calibration processor against a cycle-level reference model.
// Random (d, q) pairs with a bias towards q = -1 (as seen by a comparator with
// a positive offset) are applied; R, S and T are predicted with the rules
// U = q*d, S = sign of R beyond +/-N_C, R cleared after S != 0, T += S.
// The bias is flipped halfway so T must move both ways.
module tb_cp;
  import bcc_pkg::*;
  localparam int NC = 16;
  localparam int TW = 7;
  localparam int RW = $clog2(NC + 2) + 1;

  logic clk = 0, rst_n = 0, d = 0, q = 0;
  logic signed [TW-1:0] t;
  logic signed [RW-1:0] r;
  bpd_s_t s;
  int mr = 0, mt = 0, ms;
  int checks = 0, failures = 0, n_up = 0, n_dn = 0;

  cp #(.NC(NC), .TW(TW)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .t(t), .r(r), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      ms = (mr > NC) ? 1 : (mr < -NC) ? -1 : 0;
      checks++;
      if (r !== RW'(mr) || t !== TW'(mt) || s.up !== (ms == 1) || s.dn !== (ms == -1)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d r=%0d/%0d t=%0d/%0d s=%b/%0d", k, r, mr, t, mt, s, ms);
      end
      if (ms == 1) n_up++;
      if (ms == -1) n_dn++;
      q = $urandom_range(0, 1);
      // '1' more likely under q=-1 in the first half, under q=+1 in the second
      if (k < 10000) d = q ? ($urandom_range(0, 9) < 3) : ($urandom_range(0, 9) < 5);
      else           d = q ? ($urandom_range(0, 9) < 5) : ($urandom_range(0, 9) < 3);
      mr = ((ms != 0) ? 0 : mr) + (d ? (q ? 1 : -1) : 0);
      if (ms == 1 && mt < 63) mt++;
      else if (ms == -1 && mt > -64) mt--;
    end
    checks++;
    if (n_up == 0 || n_dn == 0) begin
      failures++;
      $display("FAIL peak detector never fired both ways (%0d up, %0d down)", n_up, n_dn);
    end
    $display("cp: %0d up, %0d down events, final T=%0d", n_up, n_dn, t);
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
