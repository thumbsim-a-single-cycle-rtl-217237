// thumb_pkg: types and constants shared by the single-cycle Thumb machine.
//
// Holds the encodings of the internal control signals (ALU operation, shift
// operation, shift-amount source, register selector, second-operand source,
// three-valued write enables), the decoded control word, the condition codes
// and the architectural constants (register numbers, memory size, halt value).
// The numeric values of the control enumerations are this design's own choice;
// only the condition codes have a fixed encoding, because they are taken
// directly from bits 11:8 of the instruction.
package thumb_pkg;

  typedef logic [31:0] word_t;
  typedef logic [15:0] half_t;

  // Flags are kept in the order N, Z, C, V (bit 3 down to bit 0).
  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } flags_t;

  localparam int unsigned REG_SP = 13;
  localparam int unsigned REG_LR = 14;
  localparam int unsigned REG_PC = 15;

  // Value loaded into LR at reset; the machine halts when the PC holds it.
  localparam word_t MAGIC = 32'h0FFF_FFFE;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_EOR, ALU_ADC, ALU_SBC, ALU_NEG, ALU_ORR,
    ALU_MUL, ALU_MOV, ALU_MVN, ALU_BIC, ALU_ADR, ALU_BIT7, ALU_BIT9
  } alu_op_e;

  typedef enum logic [1:0] {SH_LSL, SH_LSR, SH_ASR, SH_ROR} shift_op_e;

  typedef enum logic [2:0] {
    SA_0, SA_1, SA_2, SA_12, SA_IMM, SA_IMR, SA_REG
  } shift_sel_e;

  typedef enum logic [3:0] {
    RS_X, RS_Y, RS_Z, RS_W, RS_XX, RS_YY, RS_SP, RS_LR, RS_PC
  } reg_sel_e;

  typedef enum logic [2:0] {
    R2_REGB, R2_RIMM3, R2_IMM5, R2_IMM7, R2_IMM8, R2_SIMM8, R2_IMM11, R2_SIMM11
  } rand2_sel_e;

  typedef enum logic [1:0] {P_YES, P_NO, P_MAYBE} perhaps_e;

  typedef enum logic [3:0] {
    COND_EQ = 4'd0,  COND_NE = 4'd1,  COND_CS = 4'd2,  COND_CC = 4'd3,
    COND_MI = 4'd4,  COND_PL = 4'd5,  COND_VS = 4'd6,  COND_VC = 4'd7,
    COND_HI = 4'd8,  COND_LS = 4'd9,  COND_GE = 4'd10, COND_LT = 4'd11,
    COND_GT = 4'd12, COND_LE = 4'd13, COND_AL = 4'd14, COND_NV = 4'd15
  } cond_e;

  // One row of a decoding table: the "decoded" control signals.
  // 'valid' is low for opcodes the machine does not implement.
  typedef struct packed {
    logic       valid;
    reg_sel_e   reg_sel_a;
    reg_sel_e   reg_sel_b;
    reg_sel_e   reg_sel_c;
    rand2_sel_e rand2;
    shift_op_e  shift_op;
    shift_sel_e shift_amt;
    alu_op_e    alu_sel;
    logic       mem_rd;
    logic       mem_wr;
    logic       w_flags;
    perhaps_e   w_reg;
    perhaps_e   w_link;
  } ctrl_t;

endpackage
