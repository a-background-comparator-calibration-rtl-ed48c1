// rcc: behavioural model of the random-chopping comparator (mixed-signal part).
//
// This is a model of an analog circuit, not synthesizable hardware for real
// signals: voltages are signed fixed-point numbers (1/2**FRAC LSB units).
// The chopper CHP1 passes (vin, vref) unchanged when q = 1 (q = +1) and swaps
// them when q = 0 (q = -1). The clocked comparator then decides whether its
// chopped differential input exceeds its input-referred offset
// V_OS = vos0 + DV * trim, where vos0 stands for the random device mismatch
// and trim is the digital offset control code from the calibration
// processor. CHP2 is an XNOR of the decision with q, which undoes the
// inversion of CHP1. The resulting threshold is vref + q * V_OS: the offset
// appears with the sign of the chopping sequence, which is what makes it
// observable in the code density.
//
// Ports: vin, vref - analog input and reference level (fixed point)
//        q         - chopping control q'[k] (1 means q = +1)
//        trim      - signed offset trim code T[k]
//        vos0      - model input: inherent offset V_0 at trim = 0
//        dc        - comparison result D_c[k], registered on the rising edge
// Timing: one decision per clock; dc holds the decision of the last edge,
// taken with the q in force just before that edge.
module rcc
  import bcc_pkg::*;
#(
  parameter int unsigned TW = TW_DEF,
  parameter int          DV = DV_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  volt_t                vin,
  input  volt_t                vref,
  input  logic                 q,
  input  logic signed [TW-1:0] trim,
  input  volt_t                vos0,
  output logic                 dc
);

  // Wide intermediate arithmetic so no sum can overflow
  localparam int unsigned XW = VW + TW + 9;
  typedef logic signed [XW-1:0] wide_t;

  wide_t vos, diff;
  logic  raw;

  always_comb begin
    vos  = wide_t'(vos0) + wide_t'(trim) * wide_t'(DV);
    // CHP1: analog chopper
    diff = q ? (wide_t'(vin) - wide_t'(vref)) : (wide_t'(vref) - wide_t'(vin));
    // comparator with input-referred offset
    raw  = (diff > vos);
  end

  // CHP2: XNOR with q', sampled by the comparator latch
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dc <= 1'b0;
    else        dc <= ~(raw ^ q);
  end

endmodule
