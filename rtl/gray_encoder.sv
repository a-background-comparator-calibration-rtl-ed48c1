// gray_encoder: edge-code to Gray-code encoder of the flash ADC.
//
// The edge code of a thermometer word is one-hot at the position of its top
// '1'. Each Gray output bit is the OR of the edge bits whose index has a '1'
// in that Gray bit (a Gray-coded OR-ROM). Together with the edge detector
// this forms the thermometer-to-Gray encoder. A bubble that lights two edge
// bits ORs two neighbouring Gray codes, which differ in one bit, so the error
// stays small; with plain binary coding the same bubble could corrupt the
// most significant bit.
//
// The published design case names a thermometer-to-Gray encoder but does not
// detail it; the OR-encoder form is this design's choice.
//
// Ports: de   - edge code, bit i stands for output code i+1; all zero is code 0
//        gray - N-bit Gray code of the selected output code
// Timing: combinational.
module gray_encoder #(
  parameter int unsigned N  = 6,
  parameter int unsigned NQ = (1 << N) - 1
) (
  input  logic [NQ-1:0] de,
  output logic [N-1:0]  gray
);

  always_comb begin
    gray = '0;
    for (int unsigned i = 0; i < NQ; i++) begin
      if (de[i]) gray |= N'((i + 1) ^ ((i + 1) >> 1));
    end
  end

endmodule
