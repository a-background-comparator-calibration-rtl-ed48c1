// chop_rng: generator of the random chopping sequences q_j.
//
// Each comparator needs a binary random sequence that is uncorrelated with the
// ADC input; neighbouring comparators need mutually uncorrelated sequences so
// that a non-monotonic threshold order cannot lock a comparator out of
// calibration for good. As the minimum that achieves this, NSRC independent
// sources are made and comparator j uses source (j-1) mod NSRC, so with the
// default NSRC = 2 all odd comparators share one sequence and all even ones
// share the other. Setting NSRC = NQ gives every comparator its own sequence.
//
// Each source is a 32-bit Galois LFSR with the maximal-length polynomial
// x^32 + x^22 + x^2 + x + 1, one bit per clock. The sources start from
// different seeds, i.e. at widely separated phases of the same m-sequence,
// whose cross-correlation at those offsets is essentially zero.
//
// Ports: q - one bit per comparator (bit i = comparator i+1), 1 means q = +1
// Timing: a new value every clock; asynchronous active-low reset loads seeds.
module chop_rng #(
  parameter int unsigned NQ   = 63,
  parameter int unsigned NSRC = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [NQ-1:0] q
);

  localparam logic [31:0] POLY = 32'h8020_0003;

  logic [31:0] lfsr [NSRC];

  function automatic logic [31:0] seed(int unsigned i);
    logic [31:0] v;
    v = 32'h2545_F491 ^ (32'h9E37_79B9 * (i + 1));
    return (v == '0) ? 32'h1 : v;
  endfunction

  for (genvar g = 0; g < NSRC; g++) begin : g_src
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          lfsr[g] <= seed(g);
      else if (lfsr[g][0]) lfsr[g] <= (lfsr[g] >> 1) ^ POLY;
      else                 lfsr[g] <= lfsr[g] >> 1;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NQ; i++) q[i] = lfsr[i % NSRC][0];
  end

endmodule
