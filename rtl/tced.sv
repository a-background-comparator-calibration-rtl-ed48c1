// tced: thermometer-code edge detector of the windowed flash ADC.
//
// One two-input AND gate per comparator: De_j = Dc_j AND NOT Dc_(j+1). The
// topmost comparator has no neighbour above, so its edge bit is its own
// output. De_j is 1 only when the input lies between threshold j and
// threshold j+1, which gives each comparator's calibration processor a
// one-LSB observation window. With a non-monotonic threshold order several
// edge bits can be 1 at once and some can never be 1.
//
// Follows the published edge detector gate for gate.
//
// Ports: dc - comparator outputs, bit i is comparator i+1 (lowest reference)
//        de - edge code, same indexing
// Timing: combinational.
module tced #(
  parameter int unsigned NQ = 63
) (
  input  logic [NQ-1:0] dc,
  output logic [NQ-1:0] de
);

  always_comb begin
    de = dc & ~{1'b0, dc[NQ-1:1]};
  end

endmodule
