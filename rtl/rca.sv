// rca: ripple-carry adder.
//
// W full adders in a chain, the carry of bit i feeding bit i+1. In the DA
// filter it adds the outputs of the two partial LUTs (an 8-bit instance is
// named in the source design; the filter instantiates it wider so that the
// sum of two partial products cannot overflow). Works for two's-complement
// operands when they are sign-extended to W bits by the caller; cout is then
// the unsigned carry and can be ignored.
//
// Interface: s = a + b + cin (mod 2**W), cout = carry out of bit W-1.
// Purely combinational.
module rca #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[W];

endmodule
