// tb_ripple_carry_4_bit: exhaustive test of the 4-bit ripple carry adder.
// All 512 combinations of a, b and cin are applied and sum/cout compared
// with the integer sum a + b + cin.
module tb_ripple_carry_4_bit;
  logic [3:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_4_bit dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, sum} != 5'(a + b + cin)) begin
        failures++;
        $display("%h + %h + %b -> %b %h", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
