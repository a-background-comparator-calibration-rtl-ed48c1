// bcc_pkg: constants and types shared by the background-calibrated flash ADC.
//
// Analog quantities (input, reference levels, comparator offsets) are carried
// as signed fixed-point numbers in units of 1/2**FRAC LSB of the ADC, so that
// the comparator models and testbenches work with exact integers. The ADC
// resolution (6 bits), the peak-detector threshold N_C = 16 and the offset
// trim step dV = 1/4 LSB are the values of the 6-bit design case this RTL
// implements; the fixed-point format and the trim-code width are choices of
// this design.
package bcc_pkg;

  // ADC resolution and comparator count (2**N - 1 comparators)
  localparam int unsigned N_BITS   = 6;
  // Bilateral peak detector threshold N_C
  localparam int unsigned NC_DEF   = 16;
  // Fixed-point analog format: VW-bit signed, FRAC fractional bits per LSB
  localparam int unsigned VW       = 16;
  localparam int unsigned FRAC     = 8;
  // Offset trim step dV in fixed-point units (1/4 LSB)
  localparam int          DV_DEF   = 64;
  // Width of the signed trim code T[k] (range -64..+63 steps = -16..+15.75 LSB)
  localparam int unsigned TW_DEF   = 7;

  // Signed fixed-point analog value
  typedef logic signed [VW-1:0] volt_t;

  // Tri-valued output S[k] of the bilateral peak detector, one-hot coded
  typedef struct packed {
    logic up;  // S = +1 : R exceeded +N_C
    logic dn;  // S = -1 : R fell below -N_C
  } bpd_s_t;

endpackage
