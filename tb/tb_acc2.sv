// tb_acc2: random S sequence into the trim integrator ACC2, compared with a
// saturating reference count over the signed 7-bit range -64..63. Long runs
// of one sign are included so that both saturation limits are reached.
module tb_acc2;
  import bcc_pkg::*;
  localparam int TW = 7;

  logic clk = 0, rst_n = 0;
  bpd_s_t s = '0;
  logic signed [TW-1:0] t;
  int model = 0;
  int checks = 0, failures = 0, hit_max = 0, hit_min = 0;

  acc2 #(.TW(TW)) dut (.clk(clk), .rst_n(rst_n), .s(s), .t(t));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      checks++;
      if (t !== TW'(model)) begin
        failures++;
        $display("FAIL k=%0d t=%0d model=%0d", k, t, model);
      end
      if (model == 63) hit_max++;
      if (model == -64) hit_min++;
      // segments biased up, down, and unbiased
      case ((k / 500) % 3)
        0: s = ($urandom_range(0, 3) != 0) ? 2'b10 : 2'b00;
        1: s = ($urandom_range(0, 3) != 0) ? 2'b01 : 2'b00;
        default: s = bpd_s_t'($urandom_range(0, 2));
      endcase
      if (s.up && model < 63) model++;
      else if (s.dn && model > -64) model--;
    end
    checks++;
    if (hit_max == 0 || hit_min == 0) begin
      failures++;
      $display("FAIL saturation not reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
