// ripple_carry_4_bit: 4-bit ripple carry adder.
//
// Four full adders chained through their carries. It is the least
// significant slice of the 16-bit carry select adder (instance rca1 of the
// reference schematic) and also the building block of each carry select
// slice. Ports a, b, cin, sum, cout follow the reference schematic; the
// full-adder chain inside is the plain textbook structure. Purely
// combinational.
module ripple_carry_4_bit (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);
  logic [4:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[4];
endmodule
