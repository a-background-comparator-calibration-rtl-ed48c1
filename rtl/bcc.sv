// bcc: background-calibrated comparator, a random-chopping comparator (RCC)
// paired with its calibration processor (CP).
//
// The chopping sign q is registered together with the comparator decision so
// that the CP sees each result with the sign that produced it. The CP input
// cal_d is brought out: a stand-alone comparator feeds back its own dc, while
// in the windowed flash ADC cal_d is the comparator's thermometer-edge bit,
// so that only results taken when the input lies in this comparator's window
// drive its calibration.
//
// Pairing of comparator and processor follows the published scheme; the
// registered q and the cal_d port are choices of this design.
//
// Ports: vin, vref, vos0 - see rcc (fixed-point analog, vos0 is model-only)
//        q               - chopping sequence bit for the coming sample
//        cal_d           - result fed to the CP, aligned with dc
//        dc              - comparison result D_c (registered)
//        trim            - current trim code T (registered)
//        s               - peak detector output (observation)
// Timing: dc and the stored q change on the same edge; the CP consumes them
// on the next edge; trim moves at most one step per peak detection.
module bcc
  import bcc_pkg::*;
#(
  parameter int unsigned NC = NC_DEF,
  parameter int unsigned TW = TW_DEF,
  parameter int          DV = DV_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  volt_t                vin,
  input  volt_t                vref,
  input  volt_t                vos0,
  input  logic                 q,
  input  logic                 cal_d,
  output logic                 dc,
  output logic signed [TW-1:0] trim,
  output bpd_s_t               s
);

  localparam int unsigned RW = $clog2(NC + 2) + 1;

  logic                 q_d;
  logic signed [RW-1:0] r_unused;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_d <= 1'b0;
    else        q_d <= q;
  end

  rcc #(.TW(TW), .DV(DV)) u_rcc (
    .clk   (clk),
    .rst_n (rst_n),
    .vin   (vin),
    .vref  (vref),
    .q     (q),
    .trim  (trim),
    .vos0  (vos0),
    .dc    (dc)
  );

  cp #(.NC(NC), .TW(TW), .RW(RW)) u_cp (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (cal_d),
    .q     (q_d),
    .t     (trim),
    .r     (r_unused),
    .s     (s)
  );

endmodule
