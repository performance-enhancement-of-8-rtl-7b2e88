// carry_select_adder_16bit: the 16-bit adder at the core of the CALU.
//
// Structure as in the reference schematic: a 4-bit ripple carry adder
// (rca1) adds bits 3:0 with the external carry-in, and three 4-bit carry
// select slices (csa_slice1..3) add bits 7:4, 11:8 and 15:12, each
// selecting its precomputed result with the carry of the slice below.
// cout is the carry out of bit 15. Purely combinational.
module carry_select_adder_16bit (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);
  logic c4, c8, c12;

  ripple_carry_4_bit rca1 (
    .a(a[3:0]), .b(b[3:0]), .cin(cin), .sum(sum[3:0]), .cout(c4));
  carry_select_adder_4bit_slice csa_slice1 (
    .a(a[7:4]), .b(b[7:4]), .cin(c4), .sum(sum[7:4]), .cout(c8));
  carry_select_adder_4bit_slice csa_slice2 (
    .a(a[11:8]), .b(b[11:8]), .cin(c8), .sum(sum[11:8]), .cout(c12));
  carry_select_adder_4bit_slice csa_slice3 (
    .a(a[15:12]), .b(b[15:12]), .cin(c12), .sum(sum[15:12]), .cout(cout));
endmodule
