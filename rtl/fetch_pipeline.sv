// fetch_pipeline: instruction register of the two-stage pipeline.
//
// While one instruction executes, the next word is fetched from program
// memory. At the end of the instruction cycle (load_i, Q4) the fetched
// word moves into inst_o and executes next. When the executing instruction
// changed the flow (jump, call, return, skip, write to PCL) the prefetched
// word is wrong: flush_i replaces it with a NOP, costing one cycle. Reset
// loads a NOP so that the first cycle only fetches address 0. This is the
// fetch/execute overlap of the PIC16x84 base core.
module fetch_pipeline
  import pic_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic              load_i,
  input  logic              flush_i,
  input  logic [INST_W-1:0] prog_dat_i,
  output logic [INST_W-1:0] inst_o
);
  logic [INST_W-1:0] inst_reg;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      inst_reg <= OP_NOP;
    end else if (load_i) begin
      inst_reg <= flush_i ? OP_NOP : prog_dat_i;
    end
  end

  assign inst_o    = inst_reg;
endmodule
