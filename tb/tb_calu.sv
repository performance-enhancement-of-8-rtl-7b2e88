// tb_calu: test of the co-operative ALU.
//
// Loads the operand registers through the register port, runs ADD16 and
// SUB16 and checks CALU Out, C, DC and Z one clock after the exec strobe
// against values computed here. Includes the two operand sets of the
// reference simulations (0x0055 + 0x5500 = 0x5555, 0xFFFF - 0x5500 =
// 0xAAFF), checks read-back of all six registers, that writes to the
// result registers are ignored and that the result holds without exec_i,
// then runs 5000 random operations.
module tb_calu;
  import pic_pkg::*;

  logic clk = 0, rst = 1;
  logic [2:0] wr_sel, rd_sel;
  logic wr_en = 0, exec = 0;
  logic [7:0] wr_dat, rd_dat;
  calu_op_t op = CALU_NONE;
  logic [15:0] caluout;
  logic c, dc, z;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  calu dut (.clk_i(clk), .rst_i(rst), .wr_sel_i(wr_sel), .wr_en_i(wr_en),
            .wr_dat_i(wr_dat), .rd_sel_i(rd_sel), .rd_dat_o(rd_dat),
            .op_i(op), .exec_i(exec), .caluout_o(caluout),
            .c_o(c), .dc_o(dc), .z_o(z));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wreg(int sel, logic [7:0] v);
    @(negedge clk); wr_sel = 3'(sel); wr_dat = v; wr_en = 1;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(logic [15:0] x, logic [15:0] y, bit sub);
    logic [15:0] r; logic ec, edc, ez; int s;
    wreg(0, x[15:8]); wreg(1, x[7:0]); wreg(2, y[15:8]); wreg(3, y[7:0]);
    for (int k = 0; k < 4; k++) begin
      rd_sel = 3'(k); #1;
      chk("readback", rd_dat, (k == 0) ? x[15:8] : (k == 1) ? x[7:0] : (k == 2) ? y[15:8] : y[7:0]);
    end
    @(negedge clk); op = sub ? CALU_SUB : CALU_ADD; exec = 1;
    @(negedge clk); exec = 0; op = CALU_NONE;
    if (sub) begin
      s = x + ((~y) & 16'hFFFF) + 1;
      edc = ((x & 15) + ((~y) & 15) + 1) > 15;
    end else begin
      s = x + y;
      edc = ((x & 15) + (y & 15)) > 15;
    end
    r = s[15:0]; ec = s > 65535; ez = (r == 0);
    chk("caluout", caluout, r);
    chk("C", c, ec); chk("DC", dc, edc); chk("Z", z, ez);
    rd_sel = 4; #1; chk("outh", rd_dat, r[15:8]);
    rd_sel = 5; #1; chk("outl", rd_dat, r[7:0]);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(16'h0055, 16'h5500, 0);
    chk("fig add", caluout, 16'h5555);
    run(16'hFFFF, 16'h5500, 1);
    chk("fig sub", caluout, 16'hAAFF);
    chk("fig sub no borrow", c, 1);
    // result registers are read-only, and hold without exec
    wreg(4, 8'h12); wreg(5, 8'h34);
    repeat (3) @(negedge clk);
    chk("hold", caluout, 16'hAAFF);
    run(16'h1234, 16'h1234, 1);   // zero result
    run(16'h0000, 16'h0001, 1);   // borrow
    run(16'hFFFF, 16'h0001, 0);   // carry out, zero
    for (int i = 0; i < 5000; i++) run(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
