// flash_adc: N-bit flash ADC with windowed background-calibrated comparators.
//
// 2**N - 1 background-calibrated comparators (bcc) compare the input with the
// reference levels V_R,j = (j - 2**(N-1)) LSB, j = 1..2**N-1, i.e. an input
// range of +/- 2**(N-1) LSB centred on 0. Their outputs form a thermometer
// code. The thermometer-code edge detector (tced) turns it into an edge code;
// edge bit j is both the calibration input of comparator j (so each
// comparator only learns from inputs inside its own one-LSB window) and an
// input of the Gray-coded encoder (gray_encoder, gray2bin). The chopping
// sequences come from chop_rng, uncorrelated between neighbours.
// Calibration runs all the time in the background: conversion never stops.
//
// The reference ladder is a passive resistor string; here its taps are
// constants. The comparators are behavioural models whose mismatch offsets are
// inputs of this module (vos0), so that a testbench can set them.
//
// The architecture, the comparator count, dV = 1/4 LSB and N_C = 16 follow
// the published 6-bit design case. The reference placement, the output
// register and latency are this design's; sharing two chopping sequences
// between odd and even comparators follows the published suggestion.
// The peak-detector outputs of the comparators are left unconnected here;
// they serve only for observation in the comparator's own tests.
//
// Ports: vin   - input sample, signed fixed point (1/2**FRAC LSB units)
//        vos0  - model input: inherent offset of each comparator
//        dout  - N-bit binary output code (0 .. 2**N-1)
//        dc    - raw comparator outputs (thermometer code), observation
//        de    - edge code, observation
//        trim  - offset trim code of each comparator, observation
// Timing: vin is sampled on a rising edge k; dout shows its code after edge
// k+1 (two-edge latency), one conversion per clock.
module flash_adc
  import bcc_pkg::*;
#(
  parameter int unsigned N    = N_BITS,
  parameter int unsigned NC   = NC_DEF,
  parameter int unsigned TW   = TW_DEF,
  parameter int          DV   = DV_DEF,
  parameter int unsigned NSRC = 2,
  parameter int unsigned NQ   = (1 << N) - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  volt_t                vin,
  input  volt_t [NQ-1:0]       vos0,
  output logic  [N-1:0]        dout,
  output logic  [NQ-1:0]       dc,
  output logic  [NQ-1:0]       de,
  output logic signed [TW-1:0] trim [NQ]
);

  logic [NQ-1:0] q;
  logic [N-1:0]  gray, bin;

  chop_rng #(.NQ(NQ), .NSRC(NSRC)) u_rng (
    .clk   (clk),
    .rst_n (rst_n),
    .q     (q)
  );

  for (genvar j = 0; j < NQ; j++) begin : g_cmp
    // reference tap j+1 of the ladder
    localparam volt_t VREF = volt_t'((j + 1 - (1 << (N - 1))) * (1 << FRAC));
    bpd_s_t s;

    bcc #(.NC(NC), .TW(TW), .DV(DV)) u_bcc (
      .clk   (clk),
      .rst_n (rst_n),
      .vin   (vin),
      .vref  (VREF),
      .vos0  (vos0[j]),
      .q     (q[j]),
      .cal_d (de[j]),
      .dc    (dc[j]),
      .trim  (trim[j]),
      .s     (s)
    );
  end

  tced #(.NQ(NQ)) u_tced (
    .dc (dc),
    .de (de)
  );

  gray_encoder #(.N(N), .NQ(NQ)) u_genc (
    .de   (de),
    .gray (gray)
  );

  gray2bin #(.N(N)) u_g2b (
    .gray (gray),
    .bin  (bin)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= bin;
  end

endmodule
