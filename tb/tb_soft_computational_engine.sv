// tb_soft_computational_engine: end-to-end test of the processor.
//
// Runs at the top's default parameters (1024-word program memory).
//
// Phase 1, a directed program loaded through the program memory port:
//  * the six-instruction 16-bit addition of the base instruction set
//    (MOVF, ADDWF, MOVF, BTFSC, ADDLW, ADDWF on operands at 30h..33h), once
//    with a carry between the bytes and once without, must take six
//    instruction cycles and give the right sum;
//  * ADD16 on 0x0055 + 0x5500 and SUB16 on 0xFFFF - 0x5500 must take one
//    instruction cycle each and give 0x5555 and 0xAAFF with the right flags;
//  * a call with RETLW, a computed jump through PCL, indirect addressing
//    through FSR/INDF, a bank-1 access and a DECFSZ loop.
// Instruction cycles are counted between writes to a marker register
// (0x4F). Results are taken from the data memory write bus. Each
// mechanism (flush, taken skip, call, return, PCL write, indirect access,
// bank 1 access, ADD16, SUB16) is counted and must occur.
//
// Phase 2 reloads the memory with ten random programs in turn and runs
// each for 2000 instruction cycles in lockstep with the instruction-level model
// (pic_iss_pkg), comparing pc, W, STATUS, CALU Out and every data write.
module tb_soft_computational_engine;
  import pic_pkg::*;
  import pic_iss_pkg::*;

  localparam int DEPTH = 1024;
  localparam int NPROG = 10;     // random programs in phase 2
  localparam int STEPS = 2000;   // instruction cycles per program

  logic clk = 0, rst = 1;
  logic pmem_we = 0;
  logic [12:0] pmem_wadr = 0;
  logic [14:0] pmem_wdat = 0;
  logic ram_we;
  logic [7:0] ram_adr, ram_dat, w, status;
  logic [2:0] state;
  logic [12:0] pc;
  logic [15:0] caluout;
  logic inst_done, flush;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  soft_computational_engine dut (
    .clk_i(clk), .rst_i(rst),
    .pmem_we_i(pmem_we), .pmem_wadr_i(pmem_wadr), .pmem_wdat_i(pmem_wdat),
    .ram_we_o(ram_we), .ram_adr_o(ram_adr), .ram_dat_o(ram_dat),
    .state_o(state), .pc_o(pc), .w_o(w), .status_o(status),
    .caluout_o(caluout), .inst_done_o(inst_done), .flush_o(flush));

  // ---------------------------------------------------------------- encoders
  function automatic logic [14:0] byteop(logic [3:0] op, logic [6:0] f, bit d);
    return {3'b000, op, d, f};
  endfunction
  function automatic logic [14:0] bitop(logic [1:0] op, int b, logic [6:0] f);
    return {3'b001, op, 3'(b), f};
  endfunction
  function automatic logic [14:0] lit(logic [3:0] op, logic [7:0] k);
    return {3'b011, op, k};
  endfunction
  function automatic logic [14:0] MOVLW(logic [7:0] k); return lit(4'b0000, k); endfunction
  function automatic logic [14:0] ADDLW(logic [7:0] k); return lit(4'b1110, k); endfunction
  function automatic logic [14:0] RETLW(logic [7:0] k); return lit(4'b0100, k); endfunction
  function automatic logic [14:0] MOVWF(logic [6:0] f); return byteop(4'b0000, f, 1); endfunction
  function automatic logic [14:0] CLRF(logic [6:0] f);  return byteop(4'b0001, f, 1); endfunction
  function automatic logic [14:0] MOVF(logic [6:0] f, bit d);  return byteop(4'b1000, f, d); endfunction
  function automatic logic [14:0] ADDWF(logic [6:0] f, bit d); return byteop(4'b0111, f, d); endfunction
  function automatic logic [14:0] INCF(logic [6:0] f, bit d);  return byteop(4'b1010, f, d); endfunction
  function automatic logic [14:0] DECFSZ(logic [6:0] f, bit d); return byteop(4'b1011, f, d); endfunction
  function automatic logic [14:0] BCF(logic [6:0] f, int b)   ; return bitop(2'b00, b, f); endfunction
  function automatic logic [14:0] BSF(logic [6:0] f, int b)   ; return bitop(2'b01, b, f); endfunction
  function automatic logic [14:0] BTFSC(logic [6:0] f, int b) ; return bitop(2'b10, b, f); endfunction
  function automatic logic [14:0] CALL(int k) ; return {4'b0100, 11'(k)}; endfunction
  function automatic logic [14:0] GOTO(int k) ; return {4'b0101, 11'(k)}; endfunction

  logic [14:0] prog [$];
  int lbl_sub, lbl_table, lbl_loop, lbl_halt;

  task automatic emit(logic [14:0] x); prog.push_back(x); endtask

  task automatic seq16(logic [15:0] x, logic [15:0] y);
    emit(MOVLW(x[7:0]));  emit(MOVWF(7'h30));
    emit(MOVLW(x[15:8])); emit(MOVWF(7'h31));
    emit(MOVLW(y[7:0]));  emit(MOVWF(7'h32));
    emit(MOVLW(y[15:8])); emit(MOVWF(7'h33));
    emit(MOVWF(7'h4F));                            // marker
    emit(MOVF(7'h30, 0)); emit(ADDWF(7'h32, 1)); emit(MOVF(7'h33, 0));
    emit(BTFSC(7'h03, 0)); emit(ADDLW(8'h01)); emit(ADDWF(7'h31, 1));
    emit(MOVWF(7'h4F));                            // marker
  endtask

  task automatic build_program();
    int fix_call1, fix_call2, fix_goto;
    prog.delete();
    seq16(16'h1234, 16'h0AF0);                     // carry between bytes
    seq16(16'h2101, 16'h1302);                     // no carry: BTFSC skips
    // ADD16 with the operands 0x0055 and 0x5500
    emit(MOVLW(8'h00)); emit(MOVWF(7'h50));
    emit(MOVLW(8'h55)); emit(MOVWF(7'h51));
    emit(MOVLW(8'h55)); emit(MOVWF(7'h52));
    emit(MOVLW(8'h00)); emit(MOVWF(7'h53));
    emit(MOVWF(7'h4F)); emit(OP_ADD16); emit(MOVWF(7'h4F));
    emit(MOVF(7'h03, 0)); emit(MOVWF(7'h3F));      // STATUS after ADD16
    emit(MOVF(7'h54, 0)); emit(MOVWF(7'h40));
    emit(MOVF(7'h55, 0)); emit(MOVWF(7'h41));
    // SUB16 with 0xFFFF - 0x5500
    emit(MOVLW(8'hFF)); emit(MOVWF(7'h50)); emit(MOVWF(7'h51));
    emit(MOVWF(7'h4F)); emit(OP_SUB16); emit(MOVWF(7'h4F));
    emit(MOVF(7'h03, 0)); emit(MOVWF(7'h42));      // STATUS after SUB16
    emit(MOVF(7'h54, 0)); emit(MOVWF(7'h43));
    emit(MOVF(7'h55, 0)); emit(MOVWF(7'h44));
    // call with RETLW
    fix_call1 = prog.size(); emit(0); emit(MOVWF(7'h45));
    // computed jump through PCL
    emit(MOVLW(8'h02)); fix_call2 = prog.size(); emit(0); emit(MOVWF(7'h46));
    // indirect addressing
    emit(MOVLW(8'h20)); emit(MOVWF(7'h04));
    emit(MOVLW(8'h99)); emit(MOVWF(7'h00));
    emit(MOVF(7'h20, 0)); emit(MOVWF(7'h47));
    // bank 1 write, bank 0 read (RAM is common to both banks)
    emit(BSF(7'h03, 5)); emit(MOVLW(8'h5A)); emit(MOVWF(7'h21));
    emit(BCF(7'h03, 5)); emit(MOVF(7'h21, 0)); emit(MOVWF(7'h48));
    // DECFSZ loop, three passes
    emit(MOVLW(8'h03)); emit(MOVWF(7'h22)); emit(CLRF(7'h23));
    lbl_loop = prog.size();
    emit(INCF(7'h23, 1)); emit(DECFSZ(7'h22, 1)); emit(GOTO(lbl_loop));
    emit(MOVF(7'h23, 0)); emit(MOVWF(7'h49));
    emit(MOVWF(7'h4E));                            // done
    lbl_halt = prog.size(); emit(GOTO(lbl_halt));
    lbl_sub = prog.size(); emit(RETLW(8'h77));
    lbl_table = prog.size();
    emit(ADDWF(7'h02, 1)); emit(RETLW(8'hA0)); emit(RETLW(8'hA1)); emit(RETLW(8'hA2));
    prog[fix_call1] = CALL(lbl_sub);
    prog[fix_call2] = CALL(lbl_table);
  endtask

  task automatic load(logic [14:0] img [DEPTH]);
    rst = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); pmem_we = 1; pmem_wadr = 13'(a); pmem_wdat = img[a];
    end
    @(negedge clk); pmem_we = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------ observation
  int cyc = 0;               // instruction cycles since reset
  logic [7:0] last [256];    // last value written per data address
  bit written [256];
  int marks [$];
  logic [7:0] w31 [$], w32 [$];
  bit done = 0;
  int n_flush, n_skip, n_call, n_ret, n_pcl, n_ind, n_bank1, n_add16, n_sub16;

  always @(negedge clk) begin
    if (!rst && inst_done) begin
      cyc++;
      if (flush) n_flush++;
      if (dut.u_core.ctrl.skip != SKIP_NONE && flush) n_skip++;
      if (dut.u_core.ctrl.call) n_call++;
      if (dut.u_core.ctrl.ret) n_ret++;
      if (dut.u_core.pcl_we) n_pcl++;
      if (dut.u_core.inst_reg[14] == 0 && dut.u_core.inst_reg[13:12] != 2'b10 &&
          dut.u_core.inst_reg[13:12] != 2'b11 && dut.u_core.inst_reg[6:0] == 0 &&
          (dut.u_core.ctrl.wr_f || dut.u_core.ctrl.wr_w)) n_ind++;
      if (dut.u_core.ctrl.calu_op == CALU_ADD) n_add16++;
      if (dut.u_core.ctrl.calu_op == CALU_SUB) n_sub16++;
      if (ram_we) begin
        last[ram_adr] = ram_dat; written[ram_adr] = 1;
        if (ram_adr[7]) n_bank1++;
        if (ram_adr == 8'h4F) marks.push_back(cyc);
        if (ram_adr == 8'h31) w31.push_back(ram_dat);
        if (ram_adr == 8'h32) w32.push_back(ram_dat);
        if (ram_adr == 8'h4E) done = 1;
      end
    end
  end

  function automatic logic [7:0] mem(logic [7:0] a);
    return written[a] ? last[a] : 8'hxx;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ random program
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
    if (r < 5)  return OP_ADD16;
    if (r < 9)  return OP_SUB16;
    if (r < 10) return 15'h4000 | 15'($urandom % 16384);
    if (r < 13) return {3'b010, 1'($urandom % 2), 11'(68 + $urandom % (DEPTH - 68))};
    if (r < 14) return ($urandom % 2) ? 15'h0008 : {7'b0001101, 8'($urandom)};
    if (r < 32) return {3'b011, 4'($urandom), 8'($urandom)};
    if (r < 45) return {3'b001, 2'($urandom), 3'($urandom), pick_f()};
    return {3'b000, 4'($urandom), 1'($urandom), pick_f()};
  endfunction

  initial begin
    logic [14:0] img [DEPTH];
    pic_iss iss;
    int m;
    int t0;

    // ---------------- phase 1
    build_program();
    foreach (img[a]) img[a] = (a < prog.size()) ? prog[a] : 15'h0000;
    load(img);
    rst = 0;
    t0 = $time;
    for (int i = 0; i < 4000 && !done; i++) @(negedge clk);
    chk("directed program finished", done, 1);
    repeat (8) @(negedge clk);
    $display("directed program: %0d instruction cycles, %0d clocks", cyc, ($time - t0) / 10);
    checks++;
    if (($time - t0) / 10 < cyc * 4) failures++;      // four clocks per cycle
    chk("marker count", marks.size(), 8);
    if (marks.size() == 8) begin
      chk("base 16-bit add cycles (carry)",    marks[1] - marks[0] - 1, 6);
      chk("base 16-bit add cycles (no carry)", marks[3] - marks[2] - 1, 6);
      chk("ADD16 cycles", marks[5] - marks[4] - 1, 1);
      chk("SUB16 cycles", marks[7] - marks[6] - 1, 1);
    end
    // 0x1234 + 0x0AF0 = 0x1D24, 0x2101 + 0x1302 = 0x3403; high in 31h, low in 32h
    chk("writes to 31h", w31.size(), 4);
    chk("writes to 32h", w32.size(), 4);
    if (w31.size() == 4 && w32.size() == 4) begin
      chk("carry case: low",     w32[1], 8'h24);
      chk("carry case: high",    w31[1], 8'h1D);
      chk("no-carry case: low",  w32[3], 8'h03);
      chk("no-carry case: high", w31[3], 8'h34);
    end
    chk("ADD16 high", mem(8'h40), 8'h55);
    chk("ADD16 low",  mem(8'h41), 8'h55);
    chk("ADD16 status", mem(8'h3F), 8'h18);
    chk("SUB16 status", mem(8'h42), 8'h1B);
    chk("SUB16 high", mem(8'h43), 8'hAA);
    chk("SUB16 low",  mem(8'h44), 8'hFF);
    chk("CALU Out",   caluout, 16'hAAFF);
    chk("RETLW",      mem(8'h45), 8'h77);
    chk("table",      mem(8'h46), 8'hA2);
    chk("indirect",   mem(8'h47), 8'h99);
    chk("indirect write address", written[8'h20], 1);
    chk("bank 1",     mem(8'h48), 8'h5A);
    chk("bank 1 write address", written[8'hA1], 1);
    chk("loop",       mem(8'h49), 8'h03);
    $display("flush=%0d skip=%0d call=%0d return=%0d pcl_write=%0d indirect=%0d bank1=%0d add16=%0d sub16=%0d",
             n_flush, n_skip, n_call, n_ret, n_pcl, n_ind, n_bank1, n_add16, n_sub16);
    chk("flush seen",     n_flush > 0, 1);
    chk("skip seen",      n_skip > 0, 1);
    chk("call seen",      n_call > 0, 1);
    chk("return seen",    n_ret > 0, 1);
    chk("pcl write seen", n_pcl > 0, 1);
    chk("indirect seen",  n_ind > 0, 1);
    chk("bank 1 seen",    n_bank1 > 0, 1);
    chk("ADD16 seen",     n_add16 > 0, 1);
    chk("SUB16 seen",     n_sub16 > 0, 1);

    // ---------------- phase 2
    iss = new(DEPTH);
    m = 0;
    for (int p = 0; p < NPROG; p++) begin
      for (int a = 0; a < DEPTH; a++) begin
        img[a] = gen_inst();
        while (a < 80 && (img[a] == 15'h0008 || img[a][14:10] == 5'b01101)) img[a] = gen_inst();
      end
      for (int a = 0; a < 68; a++) img[a] = CLRF(7'(7'h0C + a));
      foreach (img[a]) iss.pmem[a] = img[a];
      iss.reset();
      load(img);
      rst = 0;
      for (int s = 0; s < STEPS; s++) begin
        bit wseen; logic [7:0] wa, wd;
        do @(negedge clk); while (!inst_done);
        wseen = ram_we; wa = ram_adr; wd = ram_dat;
        @(negedge clk);
        iss.step();
        checks++;
        if (pc !== iss.pc || w !== iss.w || status !== iss.status || caluout !== iss.cout ||
            wseen != iss.wrote || (wseen && (wa !== iss.wr_adr || wd !== iss.wr_dat))) begin
          failures++;
          if (m++ < 10)
            $display("program %0d step %0d: pc %h/%h w %h/%h status %h/%h calu %h/%h", p, s,
                     pc, iss.pc, w, iss.w, status, iss.status, caluout, iss.cout);
        end
      end
    end
    $display("random programs: %0d x %0d instruction cycles compared", NPROG, STEPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
