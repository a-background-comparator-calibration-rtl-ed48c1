// cp: calibration processor of one background-calibrated comparator.
//
// A discrete-time integrator loop in three parts, following the block diagram
// of the calibration scheme:
//   * the sign multiplier forms U[k] = q[k] * D[k] (no multi-bit multiplier:
//     D selects, q gives the sign);
//   * ACC1 sums U into R[k] and is cleared after every peak detection;
//   * the bilateral peak detector turns R into S[k] in {-1,0,+1};
//   * ACC2 sums S into the trim code T[k] of the comparator offset.
// The offset therefore moves by one step dV only after N_C+1 more '1' results
// have been seen under one chopping polarity than under the other.
//
// The structure follows the published block diagram; the one-hot coding of S
// and the register timing are choices of this design.
//
// Ports: d   - comparison result used for calibration: the comparator's own
//              output D_c (stand-alone comparator) or its window edge D_e
//        q   - chopping sign that was applied when d was produced (1 = +1)
//        t   - signed trim code T[k]
//        r   - ACC1 value R[k] (observation)
//        s   - peak detector output S[k] (observation)
// Timing: d/q are taken at the rising edge; S follows R combinationally, T
// changes one edge after S. Reset (asynchronous, active low) clears R and T.
module cp
  import bcc_pkg::*;
#(
  parameter int unsigned NC = NC_DEF,
  parameter int unsigned TW = TW_DEF,
  parameter int unsigned RW = $clog2(NC + 2) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 d,
  input  logic                 q,
  output logic signed [TW-1:0] t,
  output logic signed [RW-1:0] r,
  output bpd_s_t               s
);

  logic inc, dec;

  // U[k] = q[k] * D[k]
  assign inc = d &  q;
  assign dec = d & ~q;

  acc1 #(.NC(NC), .RW(RW)) u_acc1 (
    .clk   (clk),
    .rst_n (rst_n),
    .inc   (inc),
    .dec   (dec),
    .clr   (s.up | s.dn),
    .r     (r)
  );

  bpd #(.NC(NC), .RW(RW)) u_bpd (
    .r (r),
    .s (s)
  );

  acc2 #(.TW(TW)) u_acc2 (
    .clk   (clk),
    .rst_n (rst_n),
    .s     (s),
    .t     (t)
  );

endmodule
