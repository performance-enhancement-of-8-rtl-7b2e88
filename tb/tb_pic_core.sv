// tb_pic_core: lockstep test of the core against the instruction-level model.
//
// A program memory inside the testbench (256 words, one clock read latency)
// is filled with a prefix that clears the 68 general purpose registers,
// followed by random instructions: file, bit and literal operations,
// jumps, calls, returns, ADD16/SUB16 and undefined words, with file
// addresses drawn mostly from the RAM and the CALU registers but also from
// INDF, PCL, STATUS, FSR and PCLATH. After every instruction cycle the
// core's pc, W, STATUS, CALU result and data memory write are compared with
// pic_iss_pkg's model. Each instruction cycle must take exactly four
// clocks. 40 programs of 1000 instruction cycles each are run, with a reset
// in between, so that no single loop in a random program dominates.
module tb_pic_core;
  import pic_pkg::*;
  import pic_iss_pkg::*;

  localparam int DEPTH = 256;
  localparam int NPROG = 40;     // random programs
  localparam int STEPS = 1000;   // instruction cycles per program

  logic clk = 0, rst = 1;
  logic [PC_W-1:0]   prog_adr;
  logic [INST_W-1:0] prog_dat;
  logic [INST_W-1:0] pmem [DEPTH];
  logic ram_we;
  logic [7:0] ram_adr, ram_dat, w, status;
  logic [15:0] caluout;
  qstate_t state;
  logic inst_done, flush;

  int checks = 0, failures = 0;
  int n_flush = 0, n_calu = 0, n_wr = 0, n_btfss = 0, n_skip = 0;
  pic_iss iss;

  always #5 clk = ~clk;

  always_ff @(posedge clk) prog_dat <= pmem[prog_adr % DEPTH];

  pic_core dut (
    .clk_i(clk), .rst_i(rst), .prog_adr_o(prog_adr), .prog_dat_i(prog_dat),
    .ram_we_o(ram_we), .ram_adr_o(ram_adr), .ram_dat_o(ram_dat),
    .state_o(state), .w_o(w), .status_o(status), .caluout_o(caluout),
    .inst_done_o(inst_done), .flush_o(flush));

  function automatic logic [6:0] pick_f();
    int r = $urandom % 100;
    if (r < 55) return 7'(7'h0C + $urandom % 20);
    if (r < 75) return 7'(7'h50 + $urandom % 6);
    if (r < 83) return 7'h00;
    if (r < 88) return 7'h04;
    return 7'($urandom % 128);
  endfunction

  function automatic logic [14:0] gen_inst();
    int r = $urandom % 100;
    logic [14:0] x;
    if (r < 5)  return ADD16;
    if (r < 9)  return SUB16;
    if (r < 10) return 15'h4000 | 15'($urandom % 16384);     // undefined
    if (r < 13) return {3'b010, 1'($urandom % 2), 11'(68 + $urandom % (DEPTH - 68))}; // CALL/GOTO
    if (r < 14) return ($urandom % 2) ? 15'h0008 : {7'b0001101, 8'($urandom)}; // RETURN/RETLW
    if (r < 32) begin
      x = {3'b011, 4'($urandom), 8'($urandom)};               // literal group
      return x;
    end
    if (r < 45) return {3'b001, 2'($urandom), 3'($urandom), pick_f()}; // bit ops
    x = {3'b000, 4'($urandom), 1'($urandom), pick_f()};        // byte ops
    return x;
  endfunction

  // watchdog
  initial begin
    repeat (NPROG * (STEPS * 4 + 600) + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m = 0;
    iss = new(DEPTH);
    for (int p = 0; p < NPROG; p++) begin
      rst = 1;
      for (int a = 0; a < DEPTH; a++) begin
        pmem[a] = gen_inst();
        // no return right after the prefix: it would only restart the program
        while (a < 80 && (pmem[a] == 15'h0008 || pmem[a][14:10] == 5'b01101))
          pmem[a] = gen_inst();
      end
      for (int a = 0; a < 68; a++) pmem[a] = {7'b0000001, 1'b1, 7'(7'h0C + a)}; // CLRF
      foreach (pmem[a]) iss.pmem[a] = pmem[a];
      iss.reset();
      repeat (3) @(negedge clk);
      rst = 0;
      for (int s = 0; s < STEPS; s++) begin
        bit wseen; logic [7:0] wa, wd; int clocks;
        clocks = (s > 0) ? 1 : 0;   // the Q1 clock was taken by the comparison below
        do begin @(negedge clk); clocks++; end while (state != Q4);
        checks++;
        if (s > 0 && clocks != 4) begin
          failures++;
          $display("instruction cycle of %0d clocks", clocks);
        end
        if (flush) n_flush++;
        if (dut.ctrl.calu_op != CALU_NONE) n_calu++;
        if (dut.inst_reg[14:10] == 5'b00111) n_btfss++;
        if (dut.ctrl.skip != SKIP_NONE && flush) n_skip++;
        if (ram_we) n_wr++;
        wseen = ram_we; wa = ram_adr; wd = ram_dat;
        iss.step();
        @(negedge clk);
        checks++;
        if (prog_adr !== iss.pc || w !== iss.w || status !== iss.status ||
            caluout !== iss.cout || wseen != iss.wrote ||
            (wseen && (wa !== iss.wr_adr || wd !== iss.wr_dat))) begin
          failures++;
          if (m++ < 10)
            $display("program %0d step %0d: pc %h/%h w %h/%h status %h/%h calu %h/%h", p, s,
                     prog_adr, iss.pc, w, iss.w, status, iss.status, caluout, iss.cout);
        end
      end
    end
    $display("flushes=%0d taken_skips=%0d btfss=%0d calu_ops=%0d ram_writes=%0d",
             n_flush, n_skip, n_btfss, n_calu, n_wr);
    checks++;
    if (n_flush == 0 || n_calu == 0 || n_wr == 0 || n_btfss == 0 || n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
