// tb_carry_select_adder_16bit: test of the 16-bit carry select adder.
// Applies corner cases that make carries cross every 4-bit slice boundary
// and 50000 random operand pairs with random carry-in, comparing
// {cout, sum} with the 17-bit integer sum.
module tb_carry_select_adder_16bit;
  logic [15:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  carry_select_adder_16bit dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] x, logic [15:0] y, logic c);
    a = x; b = y; cin = c;
    #1;
    checks++;
    if ({cout, sum} != 17'(x + y + c)) begin
      failures++;
      if (failures < 10) $display("%h + %h + %b -> %b %h", x, y, c, cout, sum);
    end
  endtask

  initial begin
    check(16'h0000, 16'h0000, 0);
    check(16'hFFFF, 16'h0000, 1);
    check(16'hFFFF, 16'hFFFF, 1);
    check(16'h000F, 16'h0001, 0);
    check(16'h00FF, 16'h0001, 0);
    check(16'h0FFF, 16'h0001, 0);
    check(16'h000F, 16'h0000, 1);
    check(16'h0F0F, 16'h00F1, 0);
    check(16'h0055, 16'h5500, 0);
    for (int i = 0; i < 50000; i++) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
