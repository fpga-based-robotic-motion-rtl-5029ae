// tumbl_pkg: types and constants shared by the stages of the Tumbl co-processor.
//
// Tumbl is a 4-stage (fetch, decode, execute, memory/writeback) scalar RISC core that runs a
// reduced MicroBlaze instruction set extended with conditional execution (IT/ITT/ITE), count
// leading zeroes, branches with link without a delay slot and a HALT instruction. The enums and
// structs below carry the execution context from one stage to the next; their names and members
// follow the record types of the original VHDL description. Opcode values follow the MicroBlaze
// encoding, with the Tumbl-specific opcodes (CMPI/CMPUI, IT*, HALT) as listed in the instruction
// set table. Where that table is ambiguous (unsigned IT variants, immediate branch/logic opcodes)
// the MicroBlaze rule "bit 3 of the opcode selects an immediate operand" and the CMP/CMPU
// pattern "bit 0 of the opcode selects unsigned" are this design's choice.
package tumbl_pkg;

  // ---------------------------------------------------------------- enumerations
  typedef enum logic [4:0] {
    A_NOP, A_ADD, A_CMP, A_CMPU, A_OR, A_AND, A_XOR, A_SHIFT, A_SEXT8, A_SEXT16,
    A_MFS, A_MTS, A_MUL, A_BSLL, A_BSRL, A_BSRA, A_CLZ
  } alu_action_e;

  typedef enum logic [1:0] {ALU_IN_REGA, ALU_IN_NOT_REGA, ALU_IN_PC, ALU_IN_ZERO} alu_in1_e;
  typedef enum logic [1:0] {ALU_IN_REGB, ALU_IN_NOT_REGB, ALU_IN_IMM, ALU_IN_NOT_IMM} alu_in2_e;
  typedef enum logic [1:0] {CIN_ZERO, CIN_ONE, FROM_MSR, FROM_IN1} alu_cin_e;
  typedef enum logic       {KEEP_CARRY, UPDATE_CARRY} msr_action_e;
  typedef enum logic [1:0] {NO_BR, BR, BRL} branch_action_e;
  // Condition codes; the 3-bit encoding in the instruction word is EQ=0 .. GE=5.
  typedef enum logic [2:0] {COND_EQ = 3'd0, COND_NE = 3'd1, COND_LT = 3'd2, COND_LE = 3'd3,
                            COND_GT = 3'd4, COND_GE = 3'd5, COND_ALL = 3'd7} cond_e;
  typedef enum logic [1:0] {NO_IT, IT, ITT, ITE} it_action_e;
  typedef enum logic [1:0] {NO_WRB, WRB_EX, WRB_MEM} wrb_action_e;
  typedef enum logic [1:0] {NO_MEM, WR_MEM, RD_MEM} mem_action_e;
  typedef enum logic [1:0] {WORD, HALFWORD, BYTE} transfer_size_e;
  // Kind of branch target computation (this design's addition to BRANCH_ACTION_Type).
  typedef enum logic [1:0] {TGT_PC_REL, TGT_ABS, TGT_RA_IMM} target_e;

  // ---------------------------------------------------------------- records
  typedef struct packed {
    logic [31:0]    program_counter;
    logic [4:0]     rdix_rA;
    logic [4:0]     rdix_rB;
    logic [4:0]     curr_rD;
    logic           use_rA;         // operand a comes from Ra (for load-use stall detection)
    logic           use_rB;         // operand b comes from Rb
    logic           use_rD;         // Rd is a source (stores)
    alu_action_e    alu_Action;
    alu_in1_e       alu_Op1;
    alu_in2_e       alu_Op2;
    alu_cin_e       alu_Cin;
    logic [15:0]    IMM16;
    logic           is_imm;         // this is the IMM prefix instruction
    logic           unsigned_cmp;   // unsigned variant of IT*/CMPU
    msr_action_e    msr_Action;
    branch_action_e branch_Action;
    target_e        branch_Target;
    logic           delay;          // branch uses a delay slot
    logic           rti;            // return from interrupt: sets MSR[IE]
    it_action_e     it_Action;
    mem_action_e    mem_Action;
    transfer_size_e transfer_Size;
    wrb_action_e    wrb_Action;
    cond_e          condition;
    logic           halt;
    logic [4:0]     halt_code;
  } id2ex_t;

  typedef struct packed {
    logic [4:0] rdix_rA;
    logic [4:0] rdix_rB;
    logic [4:0] rdix_rD;
  } id2gprf_t;

  typedef struct packed {
    logic [31:0] data_rA;
    logic [31:0] data_rB;
    logic [31:0] data_rD;
  } gprf2ex_t;

  typedef struct packed {
    logic        locked;
    logic [15:0] IMM_hi16;
  } imm_lock_t;

  typedef struct packed {
    logic IE;
    logic C;
  } msr_t;

  typedef struct packed {
    logic        take_branch;
    logic [31:0] branch_target;
  } ex2if_t;

  typedef struct packed {
    logic       flush_first;   // kill the next instruction (IMM pairs count as one)
    logic       flush_second;  // kill the one after it
    logic       it_start;      // a conditional execution instruction was executed
    logic [1:0] it_count;      // how many following instructions it governs (1 or 2)
  } ex2ctrl_t;

  typedef struct packed {
    logic       halt;
    logic [4:0] halt_code;
  } halt_t;

  typedef struct packed {
    mem_action_e    mem_Action;
    wrb_action_e    wrb_Action;
    logic [31:0]    exeq_result;   // ALU result or effective address
    logic [31:0]    data_rD;       // store data, already placed on its byte lanes
    logic [3:0]     byte_Enable;   // lanes: [3] = byte at offset 0 (big-endian)
    transfer_size_e transfer_Size;
    logic [4:0]     wrix_rD;
  } ex2mem_t;

  typedef struct packed {
    wrb_action_e wrb_Action;
    logic [4:0]  wrix_rD;
    logic [31:0] data_rD;
  } wrb_t;

  typedef struct packed {
    wrb_action_e    wrb_Action;
    logic [31:0]    exeq_result;
    transfer_size_e transfer_Size;
    logic [4:0]     wrix_rD;
    logic           ext;          // load data comes from the external memory interface
  } mem_reg_t;

  // External memory interface, in the shape of the master CPU's bus (active-high here).
  typedef struct packed {
    logic        rd;
    logic [14:0] addr;     // 32-bit word address
    logic [3:0]  bls;      // byte lane write strobes, [0] = bits 7:0
    logic [31:0] data;
  } core2dmemb_t;

  typedef struct packed {
    logic        clken;
    logic [31:0] data;
    logic        int_req;
  } dmemb2core_t;

  // ---------------------------------------------------------------- opcodes (bits 0-5)
  localparam logic [5:0] OP_ADD   = 6'b000000;  // ADD..RSUBKC: 000xxx, immediate 001xxx
  localparam logic [5:0] OP_MUL   = 6'b010000;
  localparam logic [5:0] OP_BS    = 6'b010001;
  localparam logic [5:0] OP_CMP   = 6'b010010;
  localparam logic [5:0] OP_CMPU  = 6'b010011;
  localparam logic [5:0] OP_IT    = 6'b010100;
  localparam logic [5:0] OP_ITU   = 6'b010101;
  localparam logic [5:0] OP_MULI  = 6'b011000;
  localparam logic [5:0] OP_BSI   = 6'b011001;
  localparam logic [5:0] OP_CMPI  = 6'b011010;
  localparam logic [5:0] OP_CMPUI = 6'b011011;
  localparam logic [5:0] OP_ITI   = 6'b011100;
  localparam logic [5:0] OP_ITUI  = 6'b011101;
  localparam logic [5:0] OP_OR    = 6'b100000;
  localparam logic [5:0] OP_AND   = 6'b100001;
  localparam logic [5:0] OP_XOR   = 6'b100010;
  localparam logic [5:0] OP_ANDN  = 6'b100011;
  localparam logic [5:0] OP_SHIFT = 6'b100100;  // CLZ, SRA, SRC, SRL, SEXT8, SEXT16
  localparam logic [5:0] OP_MSR   = 6'b100101;  // MTS, MFS
  localparam logic [5:0] OP_BR    = 6'b100110;
  localparam logic [5:0] OP_BRC   = 6'b100111;
  localparam logic [5:0] OP_ORI   = 6'b101000;
  localparam logic [5:0] OP_ANDI  = 6'b101001;
  localparam logic [5:0] OP_XORI  = 6'b101010;
  localparam logic [5:0] OP_ANDNI = 6'b101011;
  localparam logic [5:0] OP_IMM   = 6'b101100;
  localparam logic [5:0] OP_RTS   = 6'b101101;
  localparam logic [5:0] OP_BRI   = 6'b101110;
  localparam logic [5:0] OP_BRCI  = 6'b101111;
  localparam logic [5:0] OP_LBU   = 6'b110000;
  localparam logic [5:0] OP_LHU   = 6'b110001;
  localparam logic [5:0] OP_LW    = 6'b110010;
  localparam logic [5:0] OP_SB    = 6'b110100;
  localparam logic [5:0] OP_SH    = 6'b110101;
  localparam logic [5:0] OP_SW    = 6'b110110;
  localparam logic [5:0] OP_LBUI  = 6'b111000;
  localparam logic [5:0] OP_LHUI  = 6'b111001;
  localparam logic [5:0] OP_LWI   = 6'b111010;
  localparam logic [5:0] OP_SBI   = 6'b111100;
  localparam logic [5:0] OP_SHI   = 6'b111101;
  localparam logic [5:0] OP_SWI   = 6'b111110;
  localparam logic [5:0] OP_HALT  = 6'b111111;

  localparam logic [31:0] INTERRUPT_VECTOR = 32'h0000_0010;
  localparam logic [31:0] NOP_INSTR        = 32'h8000_0000;  // OR r0, r0, r0

endpackage
