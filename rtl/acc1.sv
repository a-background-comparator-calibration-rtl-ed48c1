// acc1: accumulator ACC1 of the calibration processor.
//
// Counts U[k] = q[k] * D[k]: +1 for a '1' comparison result taken while the
// chopping sequence is +1, -1 for a '1' taken while it is -1, 0 otherwise. Its
// running sum R[k] therefore grows at a rate proportional to the difference of
// the two '1' probabilities. When the peak detector has fired (clr, i.e.
// S != 0) the sum is cleared on the next clock edge and the sample of that
// cycle starts the new sum (R = U), so R stays within +/-(N_C+1).
//
// The counting rule and the clear-after-detection follow the published
// scheme; restarting from the current sample rather than from zero, the
// register width and the reset are choices of this design.
//
// Ports: inc  - add 1 this cycle (D=1, q=+1)
//        dec  - subtract 1 this cycle (D=1, q=-1); inc and dec are exclusive
//        clr  - S[k] != 0: discard the old sum at the next edge
//        r    - signed running sum, registered
// Timing: r updates on the rising clk edge; asynchronous active-low reset to 0.
module acc1
  import bcc_pkg::*;
#(
  parameter int unsigned NC = NC_DEF,
  parameter int unsigned RW = $clog2(NC + 2) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 inc,
  input  logic                 dec,
  input  logic                 clr,
  output logic signed [RW-1:0] r
);

  logic signed [RW-1:0] base;
  logic signed [RW-1:0] u;

  always_comb begin
    base = clr ? '0 : r;
    if (inc)      u = RW'(1);
    else if (dec) u = -RW'(1);
    else          u = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= '0;
    else        r <= base + u;
  end

endmodule
