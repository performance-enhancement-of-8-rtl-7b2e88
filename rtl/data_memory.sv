// data_memory: register file and data address map of the core.
//
// A file address is the instruction's 7-bit field f, extended by the bank
// bit RP0 of STATUS, or, when f selects INDF (0x00), the 8-bit FSR
// (indirect addressing). The map, following the PIC16x84 in both banks:
//   0x00 INDF   0x02 PCL   0x03 STATUS   0x04 FSR   0x0A PCLATH
//   0x0C..0x4F  general purpose RAM (68 bytes, same bytes in both banks)
//   0x50..0x55  CALU dedicated registers (inp1 H/L, inp2 H/L, out H/L)
// Other addresses read as zero and ignore writes. PCL is not stored here:
// it reads the program counter's low byte and a write is passed on to the
// program counter (pcl_we_o). The CALU registers live in the calu module;
// this block decodes their addresses and routes data to and from them.
//
// Reads are combinational (rd_dat_o, for the address given by f_i). A write
// (wr_en_i) and the flag update (upd_*_i) happen on the same clock edge.
// When an instruction writes STATUS and also sets flags, the flags win, as
// on the PIC16x84; TO and PD are read-only and reset to 1 (there is no
// sleep or watchdog logic to change them), and the upper three PCLATH
// bits read as zero. The placement of
// the CALU registers in the map is this design's choice.
module data_memory
  import pic_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_i,
  input  logic [6:0] f_i,          // instruction file field
  output logic [7:0] adr_o,        // effective 8-bit address
  output logic [7:0] rd_dat_o,
  input  logic       wr_en_i,
  input  logic [7:0] wr_dat_i,
  // flag update from the ALU or CALU
  input  logic       upd_c_i,
  input  logic       upd_dc_i,
  input  logic       upd_z_i,
  input  logic       c_i,
  input  logic       dc_i,
  input  logic       z_i,
  // program counter side
  input  logic [7:0] pcl_i,
  output logic       pcl_we_o,
  output logic [7:0] pclath_o,
  output logic [7:0] status_o,
  // CALU register port
  output logic [2:0] calu_sel_o,
  output logic       calu_we_o,
  input  logic [7:0] calu_rd_dat_i
);
  logic [7:0] gpr [GPR_N];
  logic [7:0] status_reg, fsr_reg, pclath_reg;
  logic [6:0] a7;
  logic       is_gpr, is_calu;
  logic [6:0] gpr_idx;
  logic [7:0] status_nxt;

  assign adr_o   = (f_i == A_INDF) ? fsr_reg : {status_reg[ST_RP0], f_i};
  assign a7      = adr_o[6:0];
  assign is_gpr  = (a7 >= GPR_FIRST) && (a7 <= GPR_LAST);
  assign is_calu = (a7 >= A_CALUINP1H) && (a7 <= A_CALUOUTL);
  assign gpr_idx = a7 - GPR_FIRST;

  assign calu_sel_o = 3'(a7 - A_CALUINP1H);
  assign calu_we_o  = wr_en_i && is_calu;
  assign pcl_we_o   = wr_en_i && (a7 == A_PCL);

  always_comb begin
    if (is_gpr)      rd_dat_o = gpr[gpr_idx];
    else if (is_calu) rd_dat_o = calu_rd_dat_i;
    else begin
      unique case (a7)
        A_PCL:    rd_dat_o = pcl_i;
        A_STATUS: rd_dat_o = status_reg;
        A_FSR:    rd_dat_o = fsr_reg;
        A_PCLATH: rd_dat_o = pclath_reg;
        default:  rd_dat_o = 8'h00;   // INDF through FSR=0, unimplemented
      endcase
    end
  end

  always_comb begin
    status_nxt = status_reg;
    if (wr_en_i && a7 == A_STATUS)
      status_nxt = {wr_dat_i[7:5], status_reg[ST_TO], status_reg[ST_PD], wr_dat_i[2:0]};
    if (upd_c_i)  status_nxt[ST_C]  = c_i;
    if (upd_dc_i) status_nxt[ST_DC] = dc_i;
    if (upd_z_i)  status_nxt[ST_Z]  = z_i;
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      status_reg <= STATUS_RESET;
      fsr_reg    <= '0;
      pclath_reg <= '0;
    end else begin
      status_reg <= status_nxt;
      if (wr_en_i && a7 == A_FSR)    fsr_reg    <= wr_dat_i;
      if (wr_en_i && a7 == A_PCLATH) pclath_reg <= {3'b000, wr_dat_i[4:0]};
    end
  end

  // general purpose RAM: not reset
  always_ff @(posedge clk_i) begin
    if (wr_en_i && is_gpr) gpr[gpr_idx] <= wr_dat_i;
  end

  assign pclath_o = pclath_reg;
  assign status_o = status_reg;
endmodule
