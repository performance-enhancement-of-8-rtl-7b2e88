// tb_fetch_pipeline: test of the instruction register and flush.
// After reset the register must hold a NOP. Random words are then offered
// with random load and flush strobes; the register must take the word on
// load, a NOP on load with flush, and hold otherwise.
module tb_fetch_pipeline;
  logic clk = 0, rst = 1, load = 0, flush = 0;
  logic [14:0] dat = 0, inst, exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fetch_pipeline dut (.clk_i(clk), .rst_i(rst), .load_i(load), .flush_i(flush),
                      .prog_dat_i(dat), .inst_o(inst));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dat = 15'h7FFF;
    repeat (2) @(negedge clk);
    checks++; if (inst !== 15'h0000) failures++;
    rst = 0;
    exp = 0;
    for (int i = 0; i < 5000; i++) begin
      load = 1'($urandom); flush = ($urandom % 4) == 0; dat = 15'($urandom);
      @(negedge clk);
      if (load) exp = flush ? 15'h0000 : dat;
      checks++;
      if (inst !== exp) begin
        failures++;
        if (failures < 10) $display("inst %h expected %h", inst, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
