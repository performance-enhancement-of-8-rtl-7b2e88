// soft_computational_engine: the enhanced 8-bit RISC processor, top level.
//
// Connects the core (timing and control, instruction decoder, program
// counter, fetch pipeline, data memory, 8-bit ALU and the 16-bit
// co-operative ALU) to its program memory. Programs are loaded through the
// program memory write port while the core is held in reset (rst_i high).
// The core then starts at address 0; every instruction takes four clocks
// (one per Q phase), a taken branch eight. The data memory write bus
// (ram_*_o) is brought out where a serial or parallel I/O interface would
// attach; no such interface is part of this design. The remaining outputs
// expose architectural state for observation.
module soft_computational_engine
  import pic_pkg::*;
#(
  parameter int unsigned PMEM_DEPTH = 1024
) (
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic              pmem_we_i,
  input  logic [PC_W-1:0]   pmem_wadr_i,
  input  logic [INST_W-1:0] pmem_wdat_i,
  output logic              ram_we_o,
  output logic [7:0]        ram_adr_o,
  output logic [7:0]        ram_dat_o,
  output logic [2:0]        state_o,
  output logic [PC_W-1:0]   pc_o,
  output logic [7:0]        w_o,
  output logic [7:0]        status_o,
  output logic [15:0]       caluout_o,
  output logic              inst_done_o,
  output logic              flush_o
);
  logic [PC_W-1:0]   prog_adr;
  logic [INST_W-1:0] prog_dat;
  qstate_t           state;

  program_memory #(.DEPTH(PMEM_DEPTH)) u_pmem (
    .clk_i, .prog_adr_i(prog_adr), .prog_dat_o(prog_dat),
    .we_i(pmem_we_i), .wadr_i(pmem_wadr_i), .wdat_i(pmem_wdat_i));

  pic_core u_core (
    .clk_i, .rst_i,
    .prog_adr_o(prog_adr), .prog_dat_i(prog_dat),
    .ram_we_o, .ram_adr_o, .ram_dat_o,
    .state_o(state), .w_o, .status_o, .caluout_o,
    .inst_done_o, .flush_o);

  assign state_o = state;
  assign pc_o    = prog_adr;
endmodule
