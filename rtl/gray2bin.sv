// gray2bin: combinational Gray-code to binary converter.
//
// Every field of the ASIC's readout frame is Gray coded. Binary bit i is the
// XOR of Gray bits W-1 down to i, so the MSB passes straight through and each
// lower bit XORs the next binary bit with its own Gray bit. Purely
// combinational, any width W >= 1 (a 1-bit field is unchanged).
module gray2bin #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] gray,
  output logic [W-1:0] bin
);
  always_comb begin
    bin[W-1] = gray[W-1];
    for (int i = int'(W) - 2; i >= 0; i--)
      bin[i] = bin[i+1] ^ gray[i];
  end
endmodule
