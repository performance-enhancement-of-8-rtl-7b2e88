// tb_instruction_decoder: test of the instruction decoder.
// A table of instruction words, one or more per instruction of the set
// (encodings written out from the PIC16x84 instruction list plus ADD16 and
// SUB16), with the controls each must produce: ALU operation, operand
// source, destination, flags, skip condition and flow change.
module tb_instruction_decoder;
  import pic_pkg::*;

  logic [14:0] inst;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  instruction_decoder dut (.inst_i(inst), .ctrl_o(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: op, lit, w, f, flags(c dc z), skip, jump, call, ret, calu, illegal
  task automatic t(string name, logic [14:0] i, alu_op_t op, bit lit, bit w, bit f,
                   logic [2:0] fl, skip_t sk, bit j, bit c, bit r, calu_op_t cop, bit ill);
    inst = i; #1;
    checks++;
    if ((!ill && cop == CALU_NONE && !j && !c && ctrl.alu_op != op) ||
        ctrl.src_lit != lit || ctrl.wr_w != w || ctrl.wr_f != f ||
        {ctrl.upd_c, ctrl.upd_dc, ctrl.upd_z} != fl || ctrl.skip != sk ||
        ctrl.jump != j || ctrl.call != c || ctrl.ret != r ||
        ctrl.calu_op != cop || ctrl.illegal != ill) begin
      failures++;
      $display("%s (%b): decoded %p", name, i, ctrl);
    end
  endtask

  initial begin
    //  name      word                       op         lit w f  flags   skip             j c r  calu      ill
    t("ADDWF,W",  15'b000011100101101, ALU_ADD,   0, 1, 0, 3'b111, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("ADDWF,F",  15'b000011110101101, ALU_ADD,   0, 0, 1, 3'b111, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("ANDWF",    15'b000010110001111, ALU_AND,   0, 0, 1, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("CLRF",     15'b000000110100000, ALU_ZERO,  0, 0, 1, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("CLRW",     15'b000000100000000, ALU_ZERO,  0, 1, 0, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("COMF",     15'b000100110001100, ALU_COM,   0, 0, 1, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("DECF",     15'b000001100001100, ALU_DEC,   0, 1, 0, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("DECFSZ",   15'b000101110001100, ALU_DEC,   0, 0, 1, 3'b000, SKIP_IF_ZERO,    0, 0, 0, CALU_NONE, 0);
    t("INCF",     15'b000101010001100, ALU_INC,   0, 0, 1, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("INCFSZ",   15'b000111100001100, ALU_INC,   0, 1, 0, 3'b000, SKIP_IF_ZERO,    0, 0, 0, CALU_NONE, 0);
    t("IORWF",    15'b000010010001100, ALU_IOR,   0, 0, 1, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("MOVF",     15'b000100000110000, ALU_PASSA, 0, 1, 0, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("MOVWF",    15'b000000010110000, ALU_PASSB, 0, 0, 1, 3'b000, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("NOP",      15'b000000000000000, ALU_PASSA, 0, 0, 0, 3'b000, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("RLF",      15'b000110110001100, ALU_RLF,   0, 0, 1, 3'b100, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("RRF",      15'b000110000001100, ALU_RRF,   0, 1, 0, 3'b100, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("SUBWF",    15'b000001010001100, ALU_SUB,   0, 0, 1, 3'b111, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("SWAPF",    15'b000111010001100, ALU_SWAP,  0, 0, 1, 3'b000, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("XORWF",    15'b000011000001100, ALU_XOR,   0, 1, 0, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("BCF",      15'b001000110000011, ALU_BCF,   0, 0, 1, 3'b000, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("BSF",      15'b001011010000011, ALU_BSF,   0, 0, 1, 3'b000, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("BTFSC",    15'b001100000000011, ALU_BTST,  0, 0, 0, 3'b000, SKIP_IF_ZERO,    0, 0, 0, CALU_NONE, 0);
    t("BTFSS",    15'b001111110000011, ALU_BTST,  0, 0, 0, 3'b000, SKIP_IF_NONZERO, 0, 0, 0, CALU_NONE, 0);
    t("ADDLW",    15'b011111000000001, ALU_ADD,   1, 1, 0, 3'b111, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("ANDLW",    15'b011100100001111, ALU_AND,   1, 1, 0, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("IORLW",    15'b011100000001111, ALU_IOR,   1, 1, 0, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("MOVLW",    15'b011000010101010, ALU_PASSA, 1, 1, 0, 3'b000, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("RETLW",    15'b011010001010101, ALU_PASSA, 1, 1, 0, 3'b000, SKIP_NONE,       0, 0, 1, CALU_NONE, 0);
    t("SUBLW",    15'b011110000000001, ALU_SUB,   1, 1, 0, 3'b111, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("XORLW",    15'b011101011111111, ALU_XOR,   1, 1, 0, 3'b001, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("CALL",     15'b010000000010000, ALU_PASSA, 0, 0, 0, 3'b000, SKIP_NONE,       0, 1, 0, CALU_NONE, 0);
    t("GOTO",     15'b010111111111111, ALU_PASSA, 0, 0, 0, 3'b000, SKIP_NONE,       1, 0, 0, CALU_NONE, 0);
    t("RETURN",   15'b000000000001000, ALU_PASSA, 0, 0, 0, 3'b000, SKIP_NONE,       0, 0, 1, CALU_NONE, 0);
    t("RETFIE",   15'b000000000001001, ALU_PASSA, 0, 0, 0, 3'b000, SKIP_NONE,       0, 0, 1, CALU_NONE, 0);
    t("SLEEP",    15'b000000001100011, ALU_PASSA, 0, 0, 0, 3'b000, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("CLRWDT",   15'b000000001100100, ALU_PASSA, 0, 0, 0, 3'b000, SKIP_NONE,       0, 0, 0, CALU_NONE, 0);
    t("ADD16",    15'b100011100001100, ALU_PASSA, 0, 0, 0, 3'b111, SKIP_NONE,       0, 0, 0, CALU_ADD,  0);
    t("SUB16",    15'b100010000001100, ALU_PASSA, 0, 0, 0, 3'b111, SKIP_NONE,       0, 0, 0, CALU_SUB,  0);
    t("undef",    15'b100011100001101, ALU_PASSA, 0, 0, 0, 3'b000, SKIP_NONE,       0, 0, 0, CALU_NONE, 1);
    t("undef2",   15'b000000001100010, ALU_PASSA, 0, 0, 0, 3'b000, SKIP_NONE,       0, 0, 0, CALU_NONE, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
