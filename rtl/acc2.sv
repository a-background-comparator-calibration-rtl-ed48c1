// acc2: accumulator ACC2 of the calibration processor (offset trim integrator).
//
// Integrates the peak-detector output S[k] into the signed trim code T[k] that
// sets the comparator offset V_OS = V_0 + dV * T. The code saturates at the
// ends of its TW-bit range instead of wrapping; saturation is a choice of this
// design (a wrap would flip the offset correction from one extreme to the
// other).
//
// Ports: s  - {up, dn} from the peak detector
//        t  - signed trim code, registered
// Timing: t updates on the rising clk edge after S is seen; asynchronous
// active-low reset to 0 (no trim).
module acc2
  import bcc_pkg::*;
#(
  parameter int unsigned TW = TW_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bpd_s_t               s,
  output logic signed [TW-1:0] t
);

  localparam logic signed [TW-1:0] T_MAX = {1'b0, {(TW-1){1'b1}}};
  localparam logic signed [TW-1:0] T_MIN = {1'b1, {(TW-1){1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   t <= '0;
    else if (s.up && t != T_MAX)  t <= t + TW'(1);
    else if (s.dn && t != T_MIN)  t <= t - TW'(1);
  end

endmodule
