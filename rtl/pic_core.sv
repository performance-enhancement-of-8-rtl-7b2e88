// pic_core: controller and datapath of the enhanced 8-bit RISC core.
//
// An 8-bit PIC16x84-style processor with a 15-bit instruction word and a
// co-operative ALU (CALU) for 16-bit addition and subtraction. Each
// instruction takes one instruction cycle of four clocks (Q1..Q4), and the
// next instruction is fetched while the current one executes:
//   Q1  the instruction register is decoded;
//   Q2  (end) operands are latched: aluinp1_reg gets the file register or
//       the literal, aluinp2_reg gets W;
//   Q3  (end) the 8-bit ALU result goes to aluout_reg; for ADD16/SUB16 the
//       CALU registers its 16-bit result and flags;
//   Q4  (end) write-back to W or the file register, STATUS flag update,
//       program counter update and load of the prefetched word.
// A taken jump, call, return, skip or PCL write flushes the prefetched word
// and costs one extra instruction cycle. ADD16 and SUB16 need no operand
// moves: they read the CALU's own registers and finish in one instruction
// cycle, where the same 16-bit operation takes six base instructions.
//
// prog_adr_o is held for a whole instruction cycle; prog_dat_i must be
// valid by the end of Q4 (a memory with one clock of read latency is
// enough). The data memory write bus is brought out for observation and
// for I/O devices. Register names follow the reference simulations.
module pic_core
  import pic_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_i,
  output logic [PC_W-1:0]   prog_adr_o,
  input  logic [INST_W-1:0] prog_dat_i,
  output logic              ram_we_o,
  output logic [7:0]        ram_adr_o,
  output logic [7:0]        ram_dat_o,
  output qstate_t           state_o,
  output logic [7:0]        w_o,
  output logic [7:0]        status_o,
  output logic [15:0]       caluout_o,
  output logic              inst_done_o,  // last clock of an instruction cycle
  output logic              flush_o       // this cycle's prefetch is discarded
);
  qstate_t           state_reg;
  logic [INST_W-1:0] inst_reg;
  ctrl_t             ctrl;
  logic [PC_W-1:0]   pc_reg;

  logic [7:0] w_reg, aluinp1_reg, aluinp2_reg, aluout_reg;
  logic       alu_c_reg, alu_dc_reg, alu_z_reg;
  logic [7:0] alu_y;
  logic       alu_c, alu_dc, alu_z;
  logic [7:0] ram_i_node, status_reg, pclath;
  logic [7:0] ram_adr;
  logic       q4, skip_taken, flush, pcl_we, ram_we;
  logic [2:0] calu_sel;
  logic       calu_we;
  logic [7:0] calu_rd;
  logic       calu_c, calu_dc, calu_z;
  logic       is_calu, inst_addword, inst_subword;
  logic       upd_c, upd_dc, upd_z, flag_c, flag_dc, flag_z;

  timing_control u_tc (.clk_i, .rst_i, .state_o(state_reg));

  instruction_decoder u_dec (.inst_i(inst_reg), .ctrl_o(ctrl));

  assign q4      = (state_reg == Q4);
  assign inst_addword = (ctrl.calu_op == CALU_ADD);
  assign inst_subword = (ctrl.calu_op == CALU_SUB);
  assign is_calu      = inst_addword || inst_subword;

  // operand latch (end of Q2) and ALU result latch (end of Q3)
  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      aluinp1_reg <= '0;
      aluinp2_reg <= '0;
      aluout_reg  <= '0;
      alu_c_reg   <= 1'b0;
      alu_dc_reg  <= 1'b0;
      alu_z_reg   <= 1'b0;
    end else begin
      if (state_reg == Q2) begin
        aluinp1_reg <= ctrl.src_lit ? inst_reg[7:0] : ram_i_node;
        aluinp2_reg <= w_reg;
      end
      if (state_reg == Q3) begin
        aluout_reg <= alu_y;
        alu_c_reg  <= alu_c;
        alu_dc_reg <= alu_dc;
        alu_z_reg  <= alu_z;
      end
    end
  end

  alu u_alu (
    .op_i(ctrl.alu_op), .a_i(aluinp1_reg), .b_i(aluinp2_reg),
    .cin_i(status_reg[ST_C]), .bit_i(inst_reg[9:7]),
    .y_o(alu_y), .c_o(alu_c), .dc_o(alu_dc), .z_o(alu_z));

  calu u_calu (
    .clk_i, .rst_i,
    .wr_sel_i(calu_sel), .wr_en_i(calu_we), .wr_dat_i(aluout_reg),
    .rd_sel_i(calu_sel), .rd_dat_o(calu_rd),
    .op_i(ctrl.calu_op), .exec_i(state_reg == Q3 && is_calu),
    .caluout_o(caluout_o), .c_o(calu_c), .dc_o(calu_dc), .z_o(calu_z));

  // write-back at the end of Q4
  assign ram_we  = q4 && ctrl.wr_f;
  assign upd_c   = q4 && ctrl.upd_c;
  assign upd_dc  = q4 && ctrl.upd_dc;
  assign upd_z   = q4 && ctrl.upd_z;
  assign flag_c  = is_calu ? calu_c  : alu_c_reg;
  assign flag_dc = is_calu ? calu_dc : alu_dc_reg;
  assign flag_z  = is_calu ? calu_z  : alu_z_reg;

  data_memory u_dmem (
    .clk_i, .rst_i,
    .f_i(inst_reg[6:0]), .adr_o(ram_adr), .rd_dat_o(ram_i_node),
    .wr_en_i(ram_we), .wr_dat_i(aluout_reg),
    .upd_c_i(upd_c), .upd_dc_i(upd_dc), .upd_z_i(upd_z),
    .c_i(flag_c), .dc_i(flag_dc), .z_i(flag_z),
    .pcl_i(pc_reg[7:0]), .pcl_we_o(pcl_we), .pclath_o(pclath),
    .status_o(status_reg),
    .calu_sel_o(calu_sel), .calu_we_o(calu_we), .calu_rd_dat_i(calu_rd));

  always_ff @(posedge clk_i) begin
    if (rst_i)                  w_reg <= '0;
    else if (q4 && ctrl.wr_w)   w_reg <= aluout_reg;
  end

  always_comb begin
    unique case (ctrl.skip)
      SKIP_IF_ZERO:    skip_taken = alu_z_reg;
      SKIP_IF_NONZERO: skip_taken = ~alu_z_reg;
      default:         skip_taken = 1'b0;
    endcase
  end

  assign flush = ctrl.jump || ctrl.call || ctrl.ret || skip_taken || pcl_we;

  program_counter #(.STACK_DEPTH(8)) u_pc (
    .clk_i, .rst_i, .adv_i(q4),
    .jump_i(ctrl.jump), .call_i(ctrl.call), .ret_i(ctrl.ret),
    .pcl_we_i(pcl_we), .pcl_dat_i(aluout_reg), .pclath_i(pclath[4:0]),
    .k11_i(inst_reg[10:0]), .pc_o(pc_reg));

  fetch_pipeline u_fetch (
    .clk_i, .rst_i, .load_i(q4), .flush_i(flush),
    .prog_dat_i, .inst_o(inst_reg));

  assign prog_adr_o  = pc_reg;
  assign ram_we_o    = ram_we;
  assign ram_adr_o   = ram_adr;
  assign ram_dat_o   = aluout_reg;
  assign state_o     = state_reg;
  assign w_o         = w_reg;
  assign status_o    = status_reg;
  assign inst_done_o = q4;
  assign flush_o     = q4 && flush;

  // the sequencer never leaves the four phases once out of reset
  assert property (@(posedge clk_i) disable iff (rst_i)
                   state_reg != Q_RESET |-> ##1 state_reg != Q_RESET);
endmodule
