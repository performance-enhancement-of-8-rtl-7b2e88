// carry_select_adder_4bit_slice: one 4-bit carry select stage.
//
// Two 4-bit ripple carry adders compute the slice's sum for a carry-in of
// 0 and of 1 at the same time; the carry arriving from the lower slice
// then only drives a multiplexer that picks one result and its carry-out.
// This removes the slice's ripple delay from the carry path of the full
// adder. Port names follow the reference schematic. Combinational.
module carry_select_adder_4bit_slice (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);
  logic [3:0] sum0, sum1;
  logic       c0, c1;

  ripple_carry_4_bit rca_c0 (.a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(c0));
  ripple_carry_4_bit rca_c1 (.a(a), .b(b), .cin(1'b1), .sum(sum1), .cout(c1));

  assign sum  = cin ? sum1 : sum0;
  assign cout = cin ? c1   : c0;
endmodule
