// tb_bpd: exhaustive check of the bilateral peak detector.
// Every value of R in the detector's range is applied for N_C = 16 (default)
// and the outputs are compared with S = +1 for R > 16, -1 for R < -16, else 0.
module tb_bpd;
  import bcc_pkg::*;
  localparam int NC = 16;
  localparam int RW = $clog2(NC + 2) + 1;

  logic signed [RW-1:0] r;
  bpd_s_t s;
  int checks = 0, failures = 0;

  bpd dut (.r(r), .s(s));

  initial begin
    for (int v = -(1 << (RW - 1)); v < (1 << (RW - 1)); v++) begin
      r = RW'(v);
      #1;
      checks++;
      if (s.up !== (v > NC) || s.dn !== (v < -NC)) begin
        failures++;
        $display("FAIL r=%0d up=%b dn=%b", v, s.up, s.dn);
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
