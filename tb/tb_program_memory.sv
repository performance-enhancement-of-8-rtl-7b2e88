// tb_program_memory: test of the program memory.
// Fills all 1024 words with a pattern, reads them back at random addresses
// (also with the three upper address bits set, which must alias) and
// checks the one-clock read latency.
module tb_program_memory;
  logic clk = 0, we = 0;
  logic [12:0] radr = 0, wadr = 0;
  logic [14:0] wdat = 0, rdat;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  program_memory dut (.clk_i(clk), .prog_adr_i(radr), .prog_dat_o(rdat),
                      .we_i(we), .wadr_i(wadr), .wdat_i(wdat));

  function automatic logic [14:0] pat(int a);
    return 15'((a * 40503 + 12345) ^ (a >> 3));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; wadr = 13'(i); wdat = pat(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 4000; i++) begin
      a = $urandom % 1024;
      radr = 13'(a) | (13'($urandom % 8) << 10);
      @(posedge clk); #1;
      checks++;
      if (rdat !== pat(a)) begin
        failures++;
        if (failures < 10) $display("adr %h: %h expected %h", radr, rdat, pat(a));
      end
    end
    // latency: a new address shows only after the next clock edge
    @(negedge clk); radr = 5;
    @(posedge clk); #1;
    @(negedge clk); radr = 6;
    #1; checks++; if (rdat !== pat(5)) failures++;
    @(posedge clk); #1; checks++; if (rdat !== pat(6)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
