// instruction_decoder: turns a 15-bit instruction word into core controls.
//
// Words with bit 14 clear are decoded as the 14-bit PIC16x84 mid-range
// instruction set (byte-oriented file operations, bit operations, literal
// and control operations). Words with bit 14 set are the co-operative ALU
// instructions; ADD16 and SUB16 are matched on the whole word. Any other
// word, and the instructions that need peripherals this core does not have
// (SLEEP, CLRWDT), decode as no operation; RETFIE behaves as RETURN because
// the core has no interrupt logic. Combinational.
module instruction_decoder
  import pic_pkg::*;
(
  input  logic [INST_W-1:0] inst_i,
  output ctrl_t             ctrl_o
);
  logic [13:0] i;
  logic        d;

  assign i = inst_i[13:0];
  assign d = i[7];

  always_comb begin
    ctrl_o         = '0;
    ctrl_o.alu_op  = ALU_PASSA;
    ctrl_o.skip    = SKIP_NONE;
    ctrl_o.calu_op = CALU_NONE;

    if (inst_i[14]) begin
      if (inst_i == OP_ADD16) begin
        ctrl_o.calu_op = CALU_ADD;
        ctrl_o.upd_c = 1'b1; ctrl_o.upd_dc = 1'b1; ctrl_o.upd_z = 1'b1;
      end else if (inst_i == OP_SUB16) begin
        ctrl_o.calu_op = CALU_SUB;
        ctrl_o.upd_c = 1'b1; ctrl_o.upd_dc = 1'b1; ctrl_o.upd_z = 1'b1;
      end else begin
        ctrl_o.illegal = 1'b1;
      end
    end else begin
      unique case (i[13:12])
        2'b00: begin
          // byte-oriented file register operations: 00 oooo d fffffff
          ctrl_o.wr_w = ~d;
          ctrl_o.wr_f =  d;
          unique case (i[11:8])
            4'b0000: begin
              ctrl_o.wr_w = 1'b0;
              if (d) begin                       // MOVWF
                ctrl_o.alu_op = ALU_PASSB;
                ctrl_o.wr_f   = 1'b1;
              end else if (i == 14'h0008 || i == 14'h0009) begin
                ctrl_o.ret = 1'b1;                // RETURN, RETFIE
              end else if (i[4:0] == 5'b00000 || i == 14'h0063 || i == 14'h0064) begin
                ;                                  // NOP, SLEEP, CLRWDT
              end else begin
                ctrl_o.illegal = 1'b1;
              end
            end
            4'b0001: begin                         // CLRF / CLRW
              ctrl_o.alu_op = ALU_ZERO;
              ctrl_o.upd_z  = 1'b1;
            end
            4'b0010: begin ctrl_o.alu_op = ALU_SUB;  ctrl_o.upd_c = 1'b1; ctrl_o.upd_dc = 1'b1; ctrl_o.upd_z = 1'b1; end
            4'b0011: begin ctrl_o.alu_op = ALU_DEC;  ctrl_o.upd_z = 1'b1; end
            4'b0100: begin ctrl_o.alu_op = ALU_IOR;  ctrl_o.upd_z = 1'b1; end
            4'b0101: begin ctrl_o.alu_op = ALU_AND;  ctrl_o.upd_z = 1'b1; end
            4'b0110: begin ctrl_o.alu_op = ALU_XOR;  ctrl_o.upd_z = 1'b1; end
            4'b0111: begin ctrl_o.alu_op = ALU_ADD;  ctrl_o.upd_c = 1'b1; ctrl_o.upd_dc = 1'b1; ctrl_o.upd_z = 1'b1; end
            4'b1000: begin ctrl_o.alu_op = ALU_PASSA; ctrl_o.upd_z = 1'b1; end   // MOVF
            4'b1001: begin ctrl_o.alu_op = ALU_COM;  ctrl_o.upd_z = 1'b1; end
            4'b1010: begin ctrl_o.alu_op = ALU_INC;  ctrl_o.upd_z = 1'b1; end
            4'b1011: begin ctrl_o.alu_op = ALU_DEC;  ctrl_o.skip = SKIP_IF_ZERO; end  // DECFSZ
            4'b1100: begin ctrl_o.alu_op = ALU_RRF;  ctrl_o.upd_c = 1'b1; end
            4'b1101: begin ctrl_o.alu_op = ALU_RLF;  ctrl_o.upd_c = 1'b1; end
            4'b1110: begin ctrl_o.alu_op = ALU_SWAP; end
            4'b1111: begin ctrl_o.alu_op = ALU_INC;  ctrl_o.skip = SKIP_IF_ZERO; end  // INCFSZ
            default: ;
          endcase
        end
        2'b01: begin
          // bit-oriented: 01 bb bbb fffffff
          unique case (i[11:10])
            2'b00: begin ctrl_o.alu_op = ALU_BCF;  ctrl_o.wr_f = 1'b1; end
            2'b01: begin ctrl_o.alu_op = ALU_BSF;  ctrl_o.wr_f = 1'b1; end
            2'b10: begin ctrl_o.alu_op = ALU_BTST; ctrl_o.skip = SKIP_IF_ZERO; end     // BTFSC
            2'b11: begin ctrl_o.alu_op = ALU_BTST; ctrl_o.skip = SKIP_IF_NONZERO; end  // BTFSS
            default: ;
          endcase
        end
        2'b10: begin
          // CALL 100kkk, GOTO 101kkk
          if (i[11]) ctrl_o.jump = 1'b1;
          else       ctrl_o.call = 1'b1;
        end
        2'b11: begin
          // literal operations: 11 xxxx kkkkkkkk
          ctrl_o.src_lit = 1'b1;
          ctrl_o.wr_w    = 1'b1;
          casez (i[11:8])
            4'b00??: ctrl_o.alu_op = ALU_PASSA;                          // MOVLW
            4'b01??: begin ctrl_o.alu_op = ALU_PASSA; ctrl_o.ret = 1'b1; end  // RETLW
            4'b1000: begin ctrl_o.alu_op = ALU_IOR; ctrl_o.upd_z = 1'b1; end  // IORLW
            4'b1001: begin ctrl_o.alu_op = ALU_AND; ctrl_o.upd_z = 1'b1; end  // ANDLW
            4'b1010: begin ctrl_o.alu_op = ALU_XOR; ctrl_o.upd_z = 1'b1; end  // XORLW
            4'b110?: begin ctrl_o.alu_op = ALU_SUB;                           // SUBLW
                           ctrl_o.upd_c = 1'b1; ctrl_o.upd_dc = 1'b1; ctrl_o.upd_z = 1'b1; end
            4'b111?: begin ctrl_o.alu_op = ALU_ADD;                           // ADDLW
                           ctrl_o.upd_c = 1'b1; ctrl_o.upd_dc = 1'b1; ctrl_o.upd_z = 1'b1; end
            default: begin ctrl_o.wr_w = 1'b0; ctrl_o.illegal = 1'b1; end
          endcase
        end
        default: ;
      endcase
    end
  end
endmodule
