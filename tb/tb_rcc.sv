// tb_rcc: random-chopping comparator model. Random input, reference, chopping
// sign, trim code and mismatch offset are applied; the registered decision is
// compared with the threshold rule V_t = V_R + q * (V_0 + dV * T): for q = +1
// the output is 1 when vin > V_t, for q = -1 when vin >= V_t. Small offsets
// and inputs near the reference are favoured so that both chopping states
// decide near the threshold.
module tb_rcc;
  import bcc_pkg::*;
  localparam int TW = 7;
  localparam int DV = 64;

  logic clk = 0, rst_n = 0, q = 0, dc;
  volt_t vin = '0, vref = '0, vos0 = '0;
  logic signed [TW-1:0] trim = '0;
  int vt, qs;
  logic exp;
  int checks = 0, failures = 0, flips = 0;

  rcc #(.TW(TW), .DV(DV)) dut (.clk(clk), .rst_n(rst_n), .vin(vin), .vref(vref), .q(q),
                                .trim(trim), .vos0(vos0), .dc(dc));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      vref = volt_t'($urandom_range(0, 62) * 256 - 31 * 256);
      vos0 = volt_t'(int'($urandom_range(0, 2048)) - 1024);
      trim = TW'($urandom_range(0, 127));
      q    = $urandom_range(0, 1);
      qs   = q ? 1 : -1;
      vt   = int'(vref) + qs * (int'(vos0) + int'(trim) * DV);
      vin  = volt_t'(vt + int'($urandom_range(0, 8)) - 4);
      exp  = q ? (int'(vin) > vt) : (int'(vin) >= vt);
      @(posedge clk);
      #1;
      checks++;
      if (dc !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL vin=%0d vref=%0d q=%b vos0=%0d trim=%0d dc=%b", vin, vref, q, vos0, trim, dc);
      end
      // the same input with the opposite chopping sign: the decision must
      // differ exactly when vin lies between V_R - V_OS and V_R + V_OS
      if (dc != ((int'(vin) > int'(vref) + int'(vos0) + int'(trim) * DV))) flips++;
    end
    checks++;
    if (flips == 0) begin failures++; $display("FAIL chopping never changed a decision"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
