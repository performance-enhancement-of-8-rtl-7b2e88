// program_counter: 13-bit program counter with return stack.
//
// pc_o is the address being fetched; while an instruction executes it
// already points one past that instruction (two-stage pipeline). On a
// clock edge with adv_i high (end of Q4) the counter loads, in priority
// order: the popped return address (ret_i), the jump target
// {pclath[4:3], k11} (jump_i or call_i; call_i also pushes pc_o), a
// computed address {pclath[4:0], pcl_dat_i} after a write to PCL
// (pcl_we_i), or pc_o + 1. The stack is a circular buffer of STACK_DEPTH
// entries with no overflow indication, as on the PIC16x84 the core is
// based on; the 13-bit width is the width of pc_reg in the reference
// simulations. rst_i (synchronous) clears the counter, the stack pointer and the
// stack, so that a return without a call goes to address 0.
module program_counter
  import pic_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic            clk_i,
  input  logic            rst_i,
  input  logic            adv_i,
  input  logic            jump_i,
  input  logic            call_i,
  input  logic            ret_i,
  input  logic            pcl_we_i,
  input  logic [7:0]      pcl_dat_i,
  input  logic [4:0]      pclath_i,
  input  logic [10:0]     k11_i,
  output logic [PC_W-1:0] pc_o
);
  localparam int unsigned SP_W = (STACK_DEPTH > 1) ? $clog2(STACK_DEPTH) : 1;

  logic [PC_W-1:0] pc_reg;
  logic [PC_W-1:0] inc_pc_node;
  logic [PC_W-1:0] stack [STACK_DEPTH];
  logic [SP_W-1:0] sp;
  logic [SP_W-1:0] sp_top;

  assign inc_pc_node = pc_reg + 1'b1;
  assign sp_top      = sp - 1'b1;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      pc_reg <= '0;
      sp     <= '0;
      for (int i = 0; i < STACK_DEPTH; i++) stack[i] <= '0;
    end else if (adv_i) begin
      if (ret_i) begin
        pc_reg <= stack[sp_top];
        sp     <= sp_top;
      end else if (jump_i || call_i) begin
        pc_reg <= {pclath_i[4:3], k11_i};
        if (call_i) begin
          stack[sp] <= pc_reg;
          sp        <= sp + 1'b1;
        end
      end else if (pcl_we_i) begin
        pc_reg <= {pclath_i, pcl_dat_i};
      end else begin
        pc_reg <= inc_pc_node;
      end
    end
  end

  assign pc_o = pc_reg;
endmodule
