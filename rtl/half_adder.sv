// half_adder -- the single building block of the pipelined carry adder.
//
// Adds two bits: s = a XOR b is the sum bit and c = a AND b the carry.
// Purely combinational, one gate delay from either input to either output.
// The XOR/AND structure is the one the PCA is built from; the transistor
// level realisation (3- or 4-transistor CMOS cells) is a matter of the
// target process and is not modelled here.
module half_adder (
  input  logic a,  // first addend bit
  input  logic b,  // second addend bit
  output logic s,  // sum bit
  output logic c   // carry bit
);

  always_comb begin
    s = a ^ b;
    c = a & b;
  end

endmodule
