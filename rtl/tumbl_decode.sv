// tumbl_decode: instruction decode stage of the Tumbl core (combinational).
//
// Parses a 32-bit instruction word (MicroBlaze bit numbering: bit 0 is the MSB, so opcode =
// instr[31:26], Rd = instr[25:21], Ra = instr[20:16], Rb = instr[15:11], Imm = instr[15:0]) into
// the execution context: ALU action and operand sources, carry source, MSR action, branch kind,
// conditional-execution kind and condition, memory action and size, writeback action and the
// HALT code. It also drives the read indices of the general purpose register file.
// Purely combinational; the core control block registers the result between decode and execute.
// The instruction set is the one of the Tumbl reference manual. Choices made here where the
// manual is ambiguous: ADD/ADDC/RSUB/RSUBC update the carry and the K variants keep it (as in
// MicroBlaze); unsigned IT variants use opcodes 010101/011101; unknown opcodes decode as NOP.
module tumbl_decode
  import tumbl_pkg::*;
#(
  parameter bit USE_HW_MUL         = 1'b1,
  parameter bit USE_BARREL         = 1'b1,
  parameter bit COMPATIBILITY_MODE = 1'b0
) (
  input  logic [31:0] pc_i,
  input  logic [31:0] instr_i,
  output id2ex_t      id2ex_o,
  output id2gprf_t    id2gprf_o
);

  logic [5:0]  opc;
  logic [4:0]  rd, ra, rb;
  logic [15:0] imm;
  logic [10:0] fn;

  assign opc = instr_i[31:26];
  assign rd  = instr_i[25:21];
  assign ra  = instr_i[20:16];
  assign rb  = instr_i[15:11];
  assign imm = instr_i[15:0];
  assign fn  = instr_i[10:0];

  assign id2gprf_o.rdix_rA = ra;
  assign id2gprf_o.rdix_rB = rb;
  assign id2gprf_o.rdix_rD = rd;

  always_comb begin
    id2ex_t d;
    d                 = '0;
    d.program_counter = pc_i;
    d.rdix_rA         = ra;
    d.rdix_rB         = rb;
    d.curr_rD         = rd;
    d.IMM16           = imm;
    d.alu_Action      = A_NOP;
    d.alu_Op1         = ALU_IN_REGA;
    d.alu_Op2         = opc[3] ? ALU_IN_IMM : ALU_IN_REGB;
    d.alu_Cin         = CIN_ZERO;
    d.msr_Action      = KEEP_CARRY;
    d.branch_Action   = NO_BR;
    d.branch_Target   = TGT_PC_REL;
    d.it_Action       = NO_IT;
    d.mem_Action      = NO_MEM;
    d.transfer_Size   = WORD;
    d.wrb_Action      = NO_WRB;
    d.condition       = COND_ALL;
    d.use_rA          = 1'b1;
    d.use_rB          = !opc[3];

    unique casez (opc)
      6'b00????: begin  // ADD, RSUB, ADDC, RSUBC, ADDK, ... and their immediate forms
        d.alu_Action = A_ADD;
        d.alu_Op1    = opc[0] ? ALU_IN_NOT_REGA : ALU_IN_REGA;
        d.alu_Cin    = opc[1] ? FROM_MSR : (opc[0] ? CIN_ONE : CIN_ZERO);
        d.msr_Action = opc[2] ? KEEP_CARRY : UPDATE_CARRY;
        d.wrb_Action = WRB_EX;
      end
      OP_MUL, OP_MULI: if (USE_HW_MUL) begin
        d.alu_Action = A_MUL;
        d.wrb_Action = WRB_EX;
      end
      OP_BS, OP_BSI: if (USE_BARREL) begin
        // bit 10 of the function field: shift left; bit 9: arithmetic
        d.alu_Action = imm[10] ? A_BSLL : (imm[9] ? A_BSRA : A_BSRL);
        d.wrb_Action = WRB_EX;
      end
      OP_CMP, OP_CMPU, OP_CMPI, OP_CMPUI: begin
        d.alu_Action   = opc[0] ? A_CMPU : A_CMP;
        d.alu_Op1      = ALU_IN_NOT_REGA;
        d.alu_Cin      = CIN_ONE;
        d.unsigned_cmp = opc[0];
        d.wrb_Action   = WRB_EX;
      end
      OP_IT, OP_ITU, OP_ITI, OP_ITUI: if (!COMPATIBILITY_MODE) begin
        d.alu_Action   = opc[0] ? A_CMPU : A_CMP;
        d.unsigned_cmp = opc[0];
        d.condition    = cond_e'(rd[2:0]);
        unique case (rd[4:3])
          2'b00:   d.it_Action = IT;
          2'b01:   d.it_Action = ITT;
          2'b10:   d.it_Action = ITE;
          default: d.it_Action = NO_IT;
        endcase
      end
      OP_OR, OP_ORI: begin
        d.alu_Action = A_OR;
        d.wrb_Action = WRB_EX;
      end
      OP_AND, OP_ANDI: begin
        d.alu_Action = A_AND;
        d.wrb_Action = WRB_EX;
      end
      OP_XOR, OP_XORI: begin
        d.alu_Action = A_XOR;
        d.wrb_Action = WRB_EX;
      end
      OP_ANDN, OP_ANDNI: begin
        d.alu_Action = A_AND;
        d.alu_Op2    = opc[3] ? ALU_IN_NOT_IMM : ALU_IN_NOT_REGB;
        d.wrb_Action = WRB_EX;
      end
      OP_SHIFT: begin
        d.use_rB     = 1'b0;
        d.wrb_Action = WRB_EX;
        unique case (fn)
          11'h000: d.alu_Action = COMPATIBILITY_MODE ? A_NOP : A_CLZ;
          11'h001: begin d.alu_Action = A_SHIFT; d.alu_Cin = FROM_IN1; d.msr_Action = UPDATE_CARRY; end
          11'h021: begin d.alu_Action = A_SHIFT; d.alu_Cin = FROM_MSR; d.msr_Action = UPDATE_CARRY; end
          11'h041: begin d.alu_Action = A_SHIFT; d.alu_Cin = CIN_ZERO; d.msr_Action = UPDATE_CARRY; end
          11'h060: d.alu_Action = A_SEXT8;
          11'h061: d.alu_Action = A_SEXT16;
          default: d.wrb_Action = NO_WRB;
        endcase
      end
      OP_MSR: begin
        d.use_rB = 1'b0;
        if (imm[15:14] == 2'b11) begin
          d.alu_Action = A_MTS;
        end else if (imm[15:14] == 2'b10) begin
          d.alu_Action = A_MFS;
          d.use_rA     = 1'b0;
          d.wrb_Action = WRB_EX;
        end
      end
      OP_BR, OP_BRI: begin
        // Ra field: [4] delay slot, [3] absolute, [2] link
        d.use_rA        = 1'b0;
        d.branch_Action = ra[2] ? BRL : BR;
        d.branch_Target = ra[3] ? TGT_ABS : TGT_PC_REL;
        d.delay         = ra[4];
        d.wrb_Action    = ra[2] ? WRB_EX : NO_WRB;
      end
      OP_BRC, OP_BRCI: begin
        // Rd field: [4] delay slot, [2:0] condition evaluated on Ra
        d.branch_Action = BR;
        d.branch_Target = TGT_PC_REL;
        d.delay         = rd[4];
        d.condition     = cond_e'(rd[2:0]);
      end
      OP_RTS: begin
        // Rd field: [4] delay slot, [0] return from interrupt
        d.use_rB        = 1'b0;
        d.branch_Action = BR;
        d.branch_Target = TGT_RA_IMM;
        d.delay         = rd[4];
        d.rti           = rd[0];
        d.alu_Op2       = ALU_IN_IMM;
      end
      OP_IMM: begin
        d.use_rA = 1'b0;
        d.is_imm = 1'b1;
      end
      OP_LBU, OP_LHU, OP_LW, OP_LBUI, OP_LHUI, OP_LWI: begin
        d.alu_Action    = A_ADD;
        d.mem_Action    = RD_MEM;
        d.wrb_Action    = WRB_MEM;
        d.transfer_Size = opc[1] ? WORD : (opc[0] ? HALFWORD : BYTE);
      end
      OP_SB, OP_SH, OP_SW, OP_SBI, OP_SHI, OP_SWI: begin
        d.alu_Action    = A_ADD;
        d.mem_Action    = WR_MEM;
        d.use_rD        = 1'b1;
        d.transfer_Size = opc[1] ? WORD : (opc[0] ? HALFWORD : BYTE);
      end
      OP_HALT: if (!COMPATIBILITY_MODE) begin
        d.use_rA    = 1'b0;
        d.use_rB    = 1'b0;
        d.halt      = 1'b1;
        d.halt_code = imm[4:0];
      end
      default: begin
        d.use_rA = 1'b0;
        d.use_rB = 1'b0;
      end
    endcase

    // Writes to R0 are discarded.
    if (rd == 5'd0 && d.wrb_Action != NO_WRB) d.wrb_Action = NO_WRB;
    id2ex_o = d;
  end

endmodule
