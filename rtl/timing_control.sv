// timing_control: Q-phase sequencer of the core.
//
// One instruction cycle is four clocks, Q1 to Q4. After reset the
// sequencer sits in the reset state and then cycles Q1, Q2, Q3, Q4, Q1 ...
// The state codes (100, 000, 001, 011, 010) are those seen on state_reg in
// the reference simulations. What each phase does is decided in the core:
// operand read at Q2, ALU/CALU evaluation at Q3, write-back, program
// counter update and instruction fetch at Q4. rst_i is synchronous.
module timing_control
  import pic_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_i,
  output qstate_t state_o
);
  qstate_t state_reg;

  always_ff @(posedge clk_i) begin
    if (rst_i) state_reg <= Q_RESET;
    else begin
      unique case (state_reg)
        Q_RESET: state_reg <= Q1;
        Q1:      state_reg <= Q2;
        Q2:      state_reg <= Q3;
        Q3:      state_reg <= Q4;
        Q4:      state_reg <= Q1;
        default: state_reg <= Q_RESET;
      endcase
    end
  end

  assign state_o = state_reg;
endmodule
