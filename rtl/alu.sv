// alu: 8-bit arithmetic and logic unit of the base core.
//
// Combinational. a is the first operand (a file register or the
// instruction's literal), b the second (normally W). For ALU_SUB the result
// is a - b, computed as a + ~b + 1, so that C is 1 when no borrow occurs,
// as on the PIC16x84. DC is the carry out of bit 3, Z is set for a zero
// result. RLF/RRF rotate through the carry input cin. The bit operations
// use bit_i to build a one-hot mask. The operation set is that of the
// PIC16x84 mid-range instruction set, which the reference core is based on.
module alu
  import pic_pkg::*;
(
  input  alu_op_t    op_i,
  input  logic [7:0] a_i,
  input  logic [7:0] b_i,
  input  logic       cin_i,
  input  logic [2:0] bit_i,
  output logic [7:0] y_o,
  output logic       c_o,
  output logic       dc_o,
  output logic       z_o
);
  logic [7:0] mask;
  logic [8:0] sum;
  logic [4:0] nib;

  assign mask = 8'h01 << bit_i;

  always_comb begin
    y_o  = a_i;
    c_o  = cin_i;
    dc_o = 1'b0;
    sum  = '0;
    nib  = '0;
    unique case (op_i)
      ALU_PASSA: y_o = a_i;
      ALU_PASSB: y_o = b_i;
      ALU_ZERO:  y_o = 8'h00;
      ALU_ADD: begin
        sum  = {1'b0, a_i} + {1'b0, b_i};
        nib  = {1'b0, a_i[3:0]} + {1'b0, b_i[3:0]};
        y_o  = sum[7:0];
        c_o  = sum[8];
        dc_o = nib[4];
      end
      ALU_SUB: begin
        sum  = {1'b0, a_i} + {1'b0, ~b_i} + 9'd1;
        nib  = {1'b0, a_i[3:0]} + {1'b0, ~b_i[3:0]} + 5'd1;
        y_o  = sum[7:0];
        c_o  = sum[8];
        dc_o = nib[4];
      end
      ALU_AND:  y_o = a_i & b_i;
      ALU_IOR:  y_o = a_i | b_i;
      ALU_XOR:  y_o = a_i ^ b_i;
      ALU_COM:  y_o = ~a_i;
      ALU_INC:  y_o = a_i + 8'd1;
      ALU_DEC:  y_o = a_i - 8'd1;
      ALU_RLF: begin
        y_o = {a_i[6:0], cin_i};
        c_o = a_i[7];
      end
      ALU_RRF: begin
        y_o = {cin_i, a_i[7:1]};
        c_o = a_i[0];
      end
      ALU_SWAP: y_o = {a_i[3:0], a_i[7:4]};
      ALU_BCF:  y_o = a_i & ~mask;
      ALU_BSF:  y_o = a_i | mask;
      ALU_BTST: y_o = a_i & mask;
      default:  y_o = a_i;
    endcase
    z_o = (y_o == 8'h00);
  end
endmodule
