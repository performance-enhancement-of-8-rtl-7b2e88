// tb_program_counter: test of the program counter and return stack.
// Drives random combinations of increment, jump, call, return and PCL
// write with random PCLATH and targets, and compares the counter with a
// model kept here, including stack wrap-around after more than eight
// nested calls. Also checks that the counter holds when adv_i is low.
module tb_program_counter;
  logic clk = 0, rst = 1;
  logic adv = 0, jump = 0, call = 0, ret = 0, pcl_we = 0;
  logic [7:0] pcl_dat = 0;
  logic [4:0] pclath = 0;
  logic [10:0] k11 = 0;
  logic [12:0] pc;
  logic [12:0] mpc, mstack [8];
  int msp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  program_counter dut (.clk_i(clk), .rst_i(rst), .adv_i(adv), .jump_i(jump),
    .call_i(call), .ret_i(ret), .pcl_we_i(pcl_we), .pcl_dat_i(pcl_dat),
    .pclath_i(pclath), .k11_i(k11), .pc_o(pc));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    mpc = 0; msp = 0;
    foreach (mstack[i]) mstack[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 20000; i++) begin
      r = $urandom % 10;
      adv = (i % 7) != 3;
      jump = (r == 1); call = (r == 2 || r == 3); ret = (r == 4);
      pcl_we = (r == 5);
      pcl_dat = 8'($urandom); pclath = 5'($urandom); k11 = 11'($urandom);
      if (i > 10000 && r == 3) ret = 0;           // mostly calls: wrap the stack
      @(negedge clk);
      if (adv) begin
        if (ret) begin msp = (msp + 7) % 8; mpc = mstack[msp]; end
        else if (jump || call) begin
          if (call) begin mstack[msp] = mpc; msp = (msp + 1) % 8; end
          mpc = {pclath[4:3], k11};
        end else if (pcl_we) mpc = {pclath, pcl_dat};
        else mpc = mpc + 1;
      end
      checks++;
      if (pc !== mpc) begin
        failures++;
        if (failures < 10) $display("cycle %0d: pc %h expected %h", i, pc, mpc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
