// pic_pkg: types and constants shared by the enhanced 8-bit RISC core.
//
// The core is a PIC16x84-style mid-range processor whose instruction word
// is widened from 14 to 15 bits. Bit 14 clear selects the base instruction
// set (encoded as on the PIC16x84); the two new word instructions ADD16 and
// SUB16 have bit 14 set. The instruction cycle is four clocks, Q1..Q4, with
// the state codes 100 (reset), 000, 001, 011, 010 as seen on state_reg in
// the reference simulations. Addresses of the CALU's dedicated registers
// in the data memory map are this design's own choice (0x50..0x55, mirrored
// in both banks), since the reference gives none.
package pic_pkg;

  localparam int unsigned PC_W   = 13;  // program address width
  localparam int unsigned INST_W = 15;  // extended instruction width

  // Q-phase sequencer states
  typedef enum logic [2:0] {
    Q_RESET = 3'b100,
    Q1      = 3'b000,
    Q2      = 3'b001,
    Q3      = 3'b011,
    Q4      = 3'b010
  } qstate_t;

  // New CALU instructions (full 15-bit match)
  localparam logic [INST_W-1:0] OP_ADD16 = 15'b100011100001100;
  localparam logic [INST_W-1:0] OP_SUB16 = 15'b100010000001100;
  localparam logic [INST_W-1:0] OP_NOP   = 15'b000000000000000;

  // Special function register addresses (7-bit, bank-relative)
  localparam logic [6:0] A_INDF   = 7'h00;
  localparam logic [6:0] A_PCL    = 7'h02;
  localparam logic [6:0] A_STATUS = 7'h03;
  localparam logic [6:0] A_FSR    = 7'h04;
  localparam logic [6:0] A_PCLATH = 7'h0A;

  // General purpose RAM window (as on the PIC16x84: 68 bytes)
  localparam logic [6:0] GPR_FIRST = 7'h0C;
  localparam logic [6:0] GPR_LAST  = 7'h4F;
  localparam int unsigned GPR_N    = 68;

  // CALU dedicated registers
  localparam logic [6:0] A_CALUINP1H = 7'h50;
  localparam logic [6:0] A_CALUINP1L = 7'h51;
  localparam logic [6:0] A_CALUINP2H = 7'h52;
  localparam logic [6:0] A_CALUINP2L = 7'h53;
  localparam logic [6:0] A_CALUOUTH  = 7'h54;
  localparam logic [6:0] A_CALUOUTL  = 7'h55;

  // STATUS bit positions
  localparam int unsigned ST_C   = 0;
  localparam int unsigned ST_DC  = 1;
  localparam int unsigned ST_Z   = 2;
  localparam int unsigned ST_PD  = 3;
  localparam int unsigned ST_TO  = 4;
  localparam int unsigned ST_RP0 = 5;
  localparam logic [7:0] STATUS_RESET = 8'h18;

  typedef enum logic [4:0] {
    ALU_PASSA, // a
    ALU_PASSB, // b
    ALU_ZERO,  // 0
    ALU_ADD,   // a + b
    ALU_SUB,   // a - b
    ALU_AND,
    ALU_IOR,
    ALU_XOR,
    ALU_COM,   // ~a
    ALU_INC,   // a + 1
    ALU_DEC,   // a - 1
    ALU_RLF,   // rotate left through carry
    ALU_RRF,   // rotate right through carry
    ALU_SWAP,  // swap nibbles
    ALU_BCF,   // a & ~(1<<bit)
    ALU_BSF,   // a | (1<<bit)
    ALU_BTST   // a & (1<<bit)
  } alu_op_t;

  typedef enum logic [1:0] {
    SKIP_NONE,
    SKIP_IF_ZERO,    // DECFSZ, INCFSZ, BTFSC
    SKIP_IF_NONZERO  // BTFSS
  } skip_t;

  typedef enum logic [1:0] {
    CALU_NONE,
    CALU_ADD,
    CALU_SUB
  } calu_op_t;

  // Decoded controls of one instruction
  typedef struct packed {
    alu_op_t    alu_op;
    logic       src_lit;   // first operand is the 8-bit literal, not a file
    logic       wr_w;      // result to W
    logic       wr_f;      // result to file register
    logic       upd_c;
    logic       upd_dc;
    logic       upd_z;
    skip_t      skip;
    logic       jump;      // GOTO
    logic       call;      // CALL
    logic       ret;       // RETURN, RETLW, RETFIE
    calu_op_t   calu_op;
    logic       illegal;   // unknown encoding, executed as NOP
  } ctrl_t;

endpackage
