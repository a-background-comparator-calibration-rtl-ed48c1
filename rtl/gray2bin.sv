// gray2bin: Gray-to-binary converter at the output of the flash ADC.
//
// Binary bit N-1 equals Gray bit N-1; every lower binary bit is the XOR of the
// Gray bit at that position with the binary bit above it (a ripple of N-1
// XOR gates).
//
// The converter is named but not detailed in the published design case; this
// is the standard form. Its MSB is a plain wire by construction.
//
// Ports: gray - N-bit Gray code
//        bin  - N-bit binary code
// Timing: combinational.
module gray2bin #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] gray,
  output logic [N-1:0] bin
);

  always_comb begin
    bin[N-1] = gray[N-1];
    for (int i = N - 2; i >= 0; i--) begin
      bin[i] = bin[i+1] ^ gray[i];
    end
  end

endmodule
