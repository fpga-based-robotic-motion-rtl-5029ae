// tumbl_exec: execution stage of the Tumbl core (combinational).
//
// Takes the registered execution context from decode, the register file values and the two
// forwarding sources, and produces in the same cycle: the ALU result (add/subtract with carry,
// compare, logic, one-bit shifts, sign extension, MSR access, multiply, barrel shift, count
// leading zeroes), the branch decision and target, the conditional-execution decision of
// IT/ITT/ITE, the memory request for the memory/writeback stage, the next IMM prefix state and
// the next machine status register.
//
// Operand forwarding: a source register written by the instruction now in the memory stage is
// taken from that stage's ALU result; one written by the instruction now being written back is
// taken from the register file write port. A source loaded by the instruction in the memory
// stage is not available yet: stall_o asks the control block to hold the front of the pipeline
// for one cycle (load-use stall). All of this follows the core description; the exact
// comparison (instead of the bare sign of the difference) for conditions and the big-endian
// byte lane order (byte address offset 0 = bits 31:24, as in MicroBlaze) are this design's choice.
//
// MUL returns the low 32 bits of the product (there is no high-word multiply). The forwarding
// function reads only the
// destination, writeback kind and result fields of the memory-stage record.
//
// int_take_i replaces the instruction in this stage by the interrupt entry: branch with link to
// address 0x10, R14 := address of the replaced instruction, MSR[IE] := 0.
module tumbl_exec
  import tumbl_pkg::*;
#(
  parameter bit USE_HW_MUL         = 1'b1,
  parameter bit USE_BARREL         = 1'b1
) (
  input  id2ex_t    id2ex_i,
  input  logic      valid_i,      // a real instruction is in this stage
  input  logic      kill_i,       // conditional execution turns it into a NOP
  input  logic      int_take_i,
  input  gprf2ex_t  gprf2ex_i,
  input  ex2mem_t   mem_stage_i,  // instruction currently in memory/writeback
  input  wrb_t      mem_wrb_i,    // register file write in this cycle
  input  imm_lock_t imm_lock_i,
  input  msr_t      msr_i,
  output ex2if_t    ex2if_o,
  output ex2ctrl_t  ex2ctrl_o,
  output halt_t     halt_o,
  output imm_lock_t imm_lock_o,
  output msr_t      msr_o,
  output ex2mem_t   ex2mem_o,
  output logic      stall_o
);

  logic        live;
  logic [31:0] a, b, d, imm32, op1, op2, result;
  logic        cin, cout;
  logic [32:0] sum;
  logic        lt_s, lt_u, lt, eq, cond_true, cmp_a_zero;
  logic        haz_a, haz_b, haz_d;

  assign live = valid_i && !kill_i && !int_take_i;

  // ---------------------------------------------------------------- operand forwarding
  function automatic logic [31:0] fwd(input logic [4:0] idx, input logic [31:0] from_gprf,
                                      input ex2mem_t m, input wrb_t w);
    if (idx == 5'd0)                                      return 32'd0;
    else if (m.wrb_Action == WRB_EX && m.wrix_rD == idx)  return m.exeq_result;
    else if (w.wrb_Action != NO_WRB && w.wrix_rD == idx)  return w.data_rD;
    else                                                  return from_gprf;
  endfunction

  assign a = fwd(id2ex_i.rdix_rA, gprf2ex_i.data_rA, mem_stage_i, mem_wrb_i);
  assign b = fwd(id2ex_i.rdix_rB, gprf2ex_i.data_rB, mem_stage_i, mem_wrb_i);
  assign d = fwd(id2ex_i.curr_rD, gprf2ex_i.data_rD, mem_stage_i, mem_wrb_i);

  // Load-use hazard: the value is still being read from memory.
  assign haz_a = id2ex_i.use_rA && id2ex_i.rdix_rA != 5'd0 && id2ex_i.rdix_rA == mem_stage_i.wrix_rD;
  assign haz_b = id2ex_i.use_rB && id2ex_i.rdix_rB != 5'd0 && id2ex_i.rdix_rB == mem_stage_i.wrix_rD;
  assign haz_d = id2ex_i.use_rD && id2ex_i.curr_rD != 5'd0 && id2ex_i.curr_rD == mem_stage_i.wrix_rD;
  assign stall_o = valid_i && !kill_i && !int_take_i && mem_stage_i.wrb_Action == WRB_MEM &&
                   (haz_a || haz_b || haz_d);

  // ---------------------------------------------------------------- operands
  assign imm32 = imm_lock_i.locked ? {imm_lock_i.IMM_hi16, id2ex_i.IMM16}
                                   : {{16{id2ex_i.IMM16[15]}}, id2ex_i.IMM16};

  always_comb begin
    unique case (id2ex_i.alu_Op1)
      ALU_IN_REGA:     op1 = a;
      ALU_IN_NOT_REGA: op1 = ~a;
      ALU_IN_PC:       op1 = id2ex_i.program_counter;
      default:         op1 = '0;
    endcase
    unique case (id2ex_i.alu_Op2)
      ALU_IN_REGB:     op2 = b;
      ALU_IN_NOT_REGB: op2 = ~b;
      ALU_IN_IMM:      op2 = imm32;
      default:         op2 = ~imm32;
    endcase
    unique case (id2ex_i.alu_Cin)
      CIN_ZERO: cin = 1'b0;
      CIN_ONE:  cin = 1'b1;
      FROM_MSR: cin = msr_i.C;
      default:  cin = a[31];
    endcase
  end

  assign sum  = {1'b0, op1} + {1'b0, op2} + {32'd0, cin};
  assign cout = sum[32];

  // Comparison of a with operand b (register or immediate, never negated here).
  logic [31:0] cmp_b;
  assign cmp_b = (id2ex_i.alu_Op2 == ALU_IN_REGB) ? b : imm32;
  assign lt_s  = $signed(a) < $signed(cmp_b);
  assign lt_u  = a < cmp_b;
  assign lt    = id2ex_i.unsigned_cmp ? lt_u : lt_s;
  assign eq    = a == cmp_b;
  assign cmp_a_zero = a == 32'd0;

  // Condition evaluation (table of conditions): IT* compares Ra with b, BRC tests Ra alone.
  always_comb begin
    logic c_lt, c_eq;
    if (id2ex_i.it_Action != NO_IT) begin
      c_lt = lt;
      c_eq = eq;
    end else begin
      c_lt = a[31];
      c_eq = cmp_a_zero;
    end
    unique case (id2ex_i.condition)
      COND_EQ: cond_true = c_eq;
      COND_NE: cond_true = !c_eq;
      COND_LT: cond_true = c_lt;
      COND_LE: cond_true = c_lt || c_eq;
      COND_GT: cond_true = !c_lt && !c_eq;
      COND_GE: cond_true = !c_lt;
      default: cond_true = 1'b1;
    endcase
  end

  // ---------------------------------------------------------------- ALU
  function automatic logic [5:0] clz32(input logic [31:0] v);
    logic [5:0] n;
    n = 6'd32;
    for (int i = 0; i < 32; i++) if (v[i]) n = 6'(31 - i);
    return n;
  endfunction

  logic [31:0] product;
  assign product = USE_HW_MUL ? a * op2 : 32'd0;

  always_comb begin
    result = '0;
    unique case (id2ex_i.alu_Action)
      A_ADD:    result = sum[31:0];
      // CMP/CMPU: b - a, with the MSB corrected to (a > b)
      A_CMP:    result = {$signed(a) > $signed(cmp_b), sum[30:0]};
      A_CMPU:   result = {a > cmp_b, sum[30:0]};
      A_OR:     result = a | op2;
      A_AND:    result = a & op2;
      A_XOR:    result = a ^ op2;
      A_SHIFT:  result = {cin, a[31:1]};
      A_SEXT8:  result = {{24{a[7]}}, a[7:0]};
      A_SEXT16: result = {{16{a[15]}}, a[15:0]};
      A_MFS:    result = {29'd0, msr_i.C, msr_i.IE, 1'b0};
      A_MUL:    result = product;
      A_BSLL:   result = USE_BARREL ? a << op2[4:0] : '0;
      A_BSRL:   result = USE_BARREL ? a >> op2[4:0] : '0;
      A_BSRA:   result = USE_BARREL ? 32'($signed(a) >>> op2[4:0]) : '0;
      A_CLZ:    result = {26'd0, clz32(a)};
      default:  result = '0;
    endcase
    // Branch with link stores the branch address, or the delay slot address with a delay slot.
    if (id2ex_i.branch_Action == BRL)
      result = id2ex_i.delay ? id2ex_i.program_counter + 32'd4 : id2ex_i.program_counter;
  end

  // ---------------------------------------------------------------- branches
  logic [31:0] target;
  always_comb begin
    unique case (id2ex_i.branch_Target)
      TGT_ABS:    target = op2;
      TGT_RA_IMM: target = a + imm32;
      default:    target = id2ex_i.program_counter + op2;
    endcase
  end

  always_comb begin
    ex2if_o = '0;
    if (int_take_i) begin
      ex2if_o.take_branch   = 1'b1;
      ex2if_o.branch_target = INTERRUPT_VECTOR;
    end else if (live && id2ex_i.branch_Action != NO_BR && cond_true) begin
      ex2if_o.take_branch   = 1'b1;
      ex2if_o.branch_target = target;
    end
  end

  // ---------------------------------------------------------------- conditional execution
  always_comb begin
    ex2ctrl_o = '0;
    if (live && id2ex_i.it_Action != NO_IT) begin
      ex2ctrl_o.it_start     = 1'b1;
      unique case (id2ex_i.it_Action)
        IT: begin
          ex2ctrl_o.it_count    = 2'd1;
          ex2ctrl_o.flush_first = !cond_true;
        end
        ITT: begin
          ex2ctrl_o.it_count     = 2'd2;
          ex2ctrl_o.flush_first  = !cond_true;
          ex2ctrl_o.flush_second = !cond_true;
        end
        default: begin  // ITE
          ex2ctrl_o.it_count     = 2'd2;
          ex2ctrl_o.flush_first  = !cond_true;
          ex2ctrl_o.flush_second = cond_true;
        end
      endcase
    end
  end

  // ---------------------------------------------------------------- state outputs
  assign halt_o.halt      = live && id2ex_i.halt;
  assign halt_o.halt_code = id2ex_i.halt_code;

  assign imm_lock_o.locked   = live && id2ex_i.is_imm;
  assign imm_lock_o.IMM_hi16 = id2ex_i.IMM16;

  always_comb begin
    msr_o = msr_i;
    if (int_take_i) begin
      msr_o.IE = 1'b0;
    end else if (live) begin
      if (id2ex_i.alu_Action == A_MTS) begin
        msr_o.C  = a[2];
        msr_o.IE = a[1];
      end else if (id2ex_i.msr_Action == UPDATE_CARRY) begin
        msr_o.C = (id2ex_i.alu_Action == A_SHIFT) ? a[0] : cout;
      end
      if (id2ex_i.rti && ex2if_o.take_branch) msr_o.IE = 1'b1;
    end
  end


  // ---------------------------------------------------------------- memory request
  always_comb begin
    ex2mem_o               = '0;
    ex2mem_o.exeq_result   = result;
    ex2mem_o.wrix_rD       = id2ex_i.curr_rD;
    ex2mem_o.transfer_Size = id2ex_i.transfer_Size;
    unique case (id2ex_i.transfer_Size)
      BYTE: begin
        ex2mem_o.data_rD     = {4{d[7:0]}};
        ex2mem_o.byte_Enable = 4'b1000 >> result[1:0];
      end
      HALFWORD: begin
        ex2mem_o.data_rD     = {2{d[15:0]}};
        ex2mem_o.byte_Enable = result[1] ? 4'b0011 : 4'b1100;
      end
      default: begin
        ex2mem_o.data_rD     = d;
        ex2mem_o.byte_Enable = 4'b1111;
      end
    endcase
    if (int_take_i) begin
      ex2mem_o.wrb_Action  = WRB_EX;
      ex2mem_o.wrix_rD     = 5'd14;
      ex2mem_o.exeq_result = id2ex_i.program_counter;
    end else if (live) begin
      ex2mem_o.mem_Action = id2ex_i.mem_Action;
      ex2mem_o.wrb_Action = id2ex_i.wrb_Action;
    end
  end

endmodule
