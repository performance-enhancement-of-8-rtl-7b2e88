// program_memory: instruction store of the core.
//
// DEPTH words of 15 bits. The core's address is 13 bits wide; the low
// $clog2(DEPTH) bits select a word, so a smaller memory repeats through the
// address space. Reads are synchronous: prog_dat_o shows the word at
// prog_adr_i one clock after the address, which the core's four-clock
// instruction cycle easily allows. A write port (we_i, wadr_i, wdat_i)
// loads programs. The depth default of 1024 words is that of the
// PIC16x84 the core is based on; the reference gives no size.
module program_memory
  import pic_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic              clk_i,
  input  logic [PC_W-1:0]   prog_adr_i,
  output logic [INST_W-1:0] prog_dat_o,
  input  logic              we_i,
  input  logic [PC_W-1:0]   wadr_i,
  input  logic [INST_W-1:0] wdat_i
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [INST_W-1:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (we_i) mem[wadr_i[AW-1:0]] <= wdat_i;
    prog_dat_o <= mem[prog_adr_i[AW-1:0]];
  end
endmodule
