// tb_timing_control: test of the Q-phase sequencer.
// Checks the reset state, then that the states follow Q1, Q2, Q3, Q4 for
// 500 instruction cycles (four clocks each), and that a reset in the
// middle of a cycle returns to the reset state.
module tb_timing_control;
  import pic_pkg::*;

  logic clk = 0, rst = 1;
  qstate_t st;
  int checks = 0, failures = 0;
  qstate_t seq [4] = '{Q1, Q2, Q3, Q4};

  always #5 clk = ~clk;

  timing_control dut (.clk_i(clk), .rst_i(rst), .state_o(st));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(qstate_t exp);
    checks++;
    if (st !== exp) begin
      failures++;
      $display("state %b expected %b", st, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    chk(Q_RESET);
    checks++; if (st !== 3'b100) failures++;
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(seq[i % 4]);
    end
    @(negedge clk); @(negedge clk);  // now in Q2
    rst = 1;
    @(negedge clk);
    chk(Q_RESET);
    rst = 0;
    @(negedge clk);
    chk(Q1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
