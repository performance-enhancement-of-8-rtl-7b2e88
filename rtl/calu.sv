// calu: Co-operative ALU, the 16-bit arithmetic extension of the 8-bit core.
//
// Holds the dedicated word registers that sit in the data memory map: two
// 16-bit operands, each split into a high and a low byte
// (caluinp1h/l, caluinp2h/l), and the 16-bit result register CALU Out.
// ADD16 computes inp1 + inp2, SUB16 computes inp1 - inp2; both run on the
// 16-bit carry select adder (SUB16 as inp1 + ~inp2 + 1). The result and the
// Carry, Digit (auxiliary) carry and Zero flags are registered on the clock
// edge where exec_i is high, so a word operation fits in one instruction
// cycle of the core.
//
// Flag meanings follow the 8-bit ALU of the base core: C is the carry out
// of bit 15 (for SUB16 it is 1 when there is no borrow), DC the carry out of
// bit 3, Z is set when the 16-bit result is zero. The flag definitions for
// 16 bits, the register indices and the read-only result are this design's
// choices.
//
// Register index (reg_sel): 0 inp1 high, 1 inp1 low, 2 inp2 high,
// 3 inp2 low, 4 out high, 5 out low. Writes to 4 and 5 are ignored.
// Reads are combinational; writes take effect on the clock edge.
module calu
  import pic_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_i,
  // register access from the data memory
  input  logic [2:0]  wr_sel_i,
  input  logic        wr_en_i,
  input  logic [7:0]  wr_dat_i,
  input  logic [2:0]  rd_sel_i,
  output logic [7:0]  rd_dat_o,
  // operation
  input  calu_op_t    op_i,
  input  logic        exec_i,
  output logic [15:0] caluout_o,
  output logic        c_o,
  output logic        dc_o,
  output logic        z_o
);
  logic [7:0]  caluinp1h_reg, caluinp1l_reg, caluinp2h_reg, caluinp2l_reg;
  logic [15:0] caluout_reg;
  logic [15:0] opa, opb;
  logic        calu_cin;
  logic [15:0] sum;
  logic        cout_word_node;
  logic [16:0] add_node16;

  assign opa      = {caluinp1h_reg, caluinp1l_reg};
  assign calu_cin = (op_i == CALU_SUB);
  assign opb      = calu_cin ? ~{caluinp2h_reg, caluinp2l_reg}
                             :  {caluinp2h_reg, caluinp2l_reg};

  carry_select_adder_16bit u_csela (
    .a(opa), .b(opb), .cin(calu_cin), .sum(sum), .cout(cout_word_node));

  assign add_node16 = {cout_word_node, sum};

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      caluinp1h_reg <= '0;
      caluinp1l_reg <= '0;
      caluinp2h_reg <= '0;
      caluinp2l_reg <= '0;
      caluout_reg   <= '0;
      c_o           <= 1'b0;
      dc_o          <= 1'b0;
      z_o           <= 1'b0;
    end else begin
      if (wr_en_i) begin
        unique case (wr_sel_i)
          3'd0: caluinp1h_reg <= wr_dat_i;
          3'd1: caluinp1l_reg <= wr_dat_i;
          3'd2: caluinp2h_reg <= wr_dat_i;
          3'd3: caluinp2l_reg <= wr_dat_i;
          default: ;
        endcase
      end
      if (exec_i && op_i != CALU_NONE) begin
        caluout_reg <= add_node16[15:0];
        c_o         <= add_node16[16];
        dc_o        <= sum[4] ^ opa[4] ^ opb[4];
        z_o         <= (add_node16[15:0] == 16'h0000);
      end
    end
  end

  always_comb begin
    unique case (rd_sel_i)
      3'd0:    rd_dat_o = caluinp1h_reg;
      3'd1:    rd_dat_o = caluinp1l_reg;
      3'd2:    rd_dat_o = caluinp2h_reg;
      3'd3:    rd_dat_o = caluinp2l_reg;
      3'd4:    rd_dat_o = caluout_reg[15:8];
      3'd5:    rd_dat_o = caluout_reg[7:0];
      default: rd_dat_o = 8'h00;
    endcase
  end

  assign caluout_o = caluout_reg;
endmodule
