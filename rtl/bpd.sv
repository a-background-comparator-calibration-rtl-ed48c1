// bpd: bilateral peak detector of the calibration processor.
//
// Watches the running sum R[k] of accumulator ACC1 and reports S[k] = +1 when
// R > +N_C, S[k] = -1 when R < -N_C and S[k] = 0 otherwise (the two
// thresholds of the peak detector as described for the calibration scheme).
// Purely combinational: S[k] is valid in the same cycle as R[k]. The comparison
// is written out in full for any N_C; for a power-of-two N_C a synthesis tool
// reduces it to a few gates because R can only reach +/-(N_C+1).
//
// Ports: r   - signed ACC1 value, RW bits
//        s   - {up, dn}: up = (S==+1), dn = (S==-1); never both
module bpd
  import bcc_pkg::*;
#(
  parameter int unsigned NC = NC_DEF,
  parameter int unsigned RW = $clog2(NC + 2) + 1
) (
  input  logic signed [RW-1:0] r,
  output bpd_s_t               s
);

  localparam logic signed [RW-1:0] POS_TH = RW'(NC);
  localparam logic signed [RW-1:0] NEG_TH = -RW'(NC);

  always_comb begin
    s.up = (r > POS_TH);
    s.dn = (r < NEG_TH);
  end

endmodule
