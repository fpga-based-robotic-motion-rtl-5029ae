// tumbl_core: core component of the Tumbl co-processor.
//
// Connects the four pipeline stages (fetch, decode, execute, memory/writeback) and holds every
// piece of state between them: the program counter, the fetch->decode, decode->execute,
// execute->memory and memory->writeback registers, the machine status register (carry C and
// interrupt enable IE), the IMM prefix, the conditional-execution state and the HALT state.
// The register file and the memories are outside (see tumbl), reached through the ports below.
//
// Timing: every instruction takes one cycle per stage. The instruction memory is synchronous,
// so the instruction fetched at pc is decoded in the next cycle. A taken branch is resolved in
// the execution stage: the instruction fetched after the branch is always discarded, and the
// instruction in decode is discarded too unless the branch has a delay slot, so a branch costs
// 3 cycles, or 2 with a delay slot. A load followed by an instruction that uses the loaded value
// costs one stall cycle. IT/ITT/ITE make the next one or two instructions NOPs according to their
// condition; an IMM prefix and its instruction count as one.
//
// Clocking and control: the pipeline advances while core_clken_o is high. It is low while
// halt_i is high (external halt), while the core has executed HALT (until trace_kick_i), in
// trace mode (trace_i) except in cycles with trace_kick_i, and while the external memory
// interface is busy with the master CPU (collision). rst_i is synchronous and active high.
// An interrupt (int_i, level) is taken when MSR[IE] is set and the instruction in the
// execution stage is not in a delay slot, not after an IMM prefix and not under conditional
// execution: that instruction is replaced by a branch with link to 0x10 that saves its address
// in R14 and clears IE; RTI/RTID sets IE again. The interrupt rules, HALT, trace and collision
// behaviour follow the core description; the replacement scheme is this design's choice.
module tumbl_core
  import tumbl_pkg::*;
#(
  parameter int unsigned IMEM_ABITS         = 9,
  parameter int unsigned DMEM_ABITS         = 10,
  parameter bit          USE_HW_MUL         = 1'b1,
  parameter bit          USE_BARREL         = 1'b1,
  parameter bit          COMPATIBILITY_MODE = 1'b0
) (
  input  logic                  clk_i,
  input  logic                  rst_i,
  input  logic                  halt_i,
  input  logic                  int_i,
  input  logic                  trace_i,
  input  logic                  trace_kick_i,
  // instruction memory (synchronous read)
  output logic                  imem_clken_o,
  output logic [IMEM_ABITS-1:0] imem_addr_o,
  input  logic [31:0]           imem_data_i,
  // data memory (synchronous read, byte writes)
  output logic                  dmem_clken_o,
  output logic [3:0]            dmem_we_o,
  output logic [DMEM_ABITS-1:0] dmem_addr_o,
  output logic [31:0]           dmem_wdata_o,
  input  logic [31:0]           dmem_rdata_i,
  // general purpose register file
  output logic                  gprf_clken_o,
  output id2gprf_t              id2gprf_o,
  output wrb_t                  mem_wrb_o,
  input  gprf2ex_t              gprf2ex_i,
  // external memory interface
  output logic                  xmemb_sel_o,
  output core2dmemb_t           xmemb_o,
  input  dmemb2core_t           xmemb_i,
  // state
  output logic [31:0]           pc_o,
  output logic                  halted_o,
  output logic [4:0]            halt_code_o,
  output logic                  stall_o,
  output logic                  int_taken_o,
  output logic                  it_killed_o
);

  // ---------------------------------------------------------------- state
  logic [31:0] pc_if;
  logic        id_valid;
  logic [31:0] id_pc;
  id2ex_t      ex_reg;
  logic        ex_valid, ex_in_delay;
  ex2mem_t     mem_stage;
  mem_reg_t    wb_reg;
  msr_t        msr;
  imm_lock_t   imm_lock;
  logic [1:0]  it_cnt, it_flush;
  logic        halted;
  logic [4:0]  halt_code;

  // ---------------------------------------------------------------- stages
  id2ex_t    dec;
  id2gprf_t  dec_gprf;
  ex2if_t    ex2if;
  ex2ctrl_t  ex2ctrl;
  halt_t     ex_halt;
  imm_lock_t imm_lock_nx;
  msr_t      msr_nx;
  ex2mem_t   ex2mem;
  logic      stall, kill, int_take, mem_int;
  mem_reg_t  mem_reg_nx;
  logic      mem_clken, run, core_en, adv;
  logic [31:0] next_pc;

  tumbl_fetch #(.IMEM_ABITS(IMEM_ABITS)) u_fetch (
    .prog_cntr_i(pc_if), .ex2if_i(ex2if), .imem_addr_o(imem_addr_o), .next_pc_o(next_pc)
  );

  tumbl_decode #(
    .USE_HW_MUL(USE_HW_MUL), .USE_BARREL(USE_BARREL), .COMPATIBILITY_MODE(COMPATIBILITY_MODE)
  ) u_decode (
    .pc_i(id_pc), .instr_i(imem_data_i), .id2ex_o(dec), .id2gprf_o(dec_gprf)
  );

  assign kill     = ex_valid && it_cnt != 2'd0 && it_flush[0];
  assign int_take = (int_i || mem_int) && msr.IE && ex_valid && !kill && it_cnt == 2'd0 &&
                    !imm_lock.locked && !ex_in_delay;

  tumbl_exec #(
    .USE_HW_MUL(USE_HW_MUL), .USE_BARREL(USE_BARREL)
  ) u_exec (
    .id2ex_i(ex_reg), .valid_i(ex_valid), .kill_i(kill), .int_take_i(int_take),
    .gprf2ex_i(gprf2ex_i), .mem_stage_i(mem_stage), .mem_wrb_i(mem_wrb_o),
    .imm_lock_i(imm_lock), .msr_i(msr), .ex2if_o(ex2if), .ex2ctrl_o(ex2ctrl), .halt_o(ex_halt),
    .imm_lock_o(imm_lock_nx), .msr_o(msr_nx), .ex2mem_o(ex2mem), .stall_o(stall)
  );

  tumbl_mem #(.DMEM_ABITS(DMEM_ABITS)) u_mem (
    .ex2mem_i(mem_stage), .mem_reg_i(wb_reg), .run_i(run), .dmem_rdata_i(dmem_rdata_i),
    .dmemb_i(xmemb_i), .dmem_we_o(dmem_we_o), .dmem_addr_o(dmem_addr_o),
    .dmem_wdata_o(dmem_wdata_o), .xmemb_sel_o(xmemb_sel_o), .dmemb_o(xmemb_o),
    .mem_reg_o(mem_reg_nx), .mem_wrb_o(mem_wrb_o), .clken_o(mem_clken), .int_o(mem_int)
  );

  // ---------------------------------------------------------------- clock enables
  assign run     = !rst_i && !halt_i && (trace_i ? trace_kick_i : !halted);
  assign core_en = run && mem_clken;
  assign adv     = core_en && !stall;

  assign imem_clken_o = adv || rst_i;
  assign dmem_clken_o = core_en;
  assign gprf_clken_o = core_en;
  // During a load-use stall the register file re-reads the operands of the stalled instruction,
  // so that a value written in the stall cycle is not lost.
  assign id2gprf_o = stall ? '{rdix_rA: ex_reg.rdix_rA, rdix_rB: ex_reg.rdix_rB,
                               rdix_rD: ex_reg.curr_rD}
                           : dec_gprf;

  // ---------------------------------------------------------------- pipeline registers
  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      pc_if       <= '0;
      id_valid    <= 1'b0;
      id_pc       <= '0;
      ex_reg      <= '0;
      ex_valid    <= 1'b0;
      ex_in_delay <= 1'b0;
      mem_stage   <= '0;
      wb_reg      <= '0;
      msr         <= '{IE: 1'b1, C: 1'b0};
      imm_lock    <= '0;
      it_cnt      <= '0;
      it_flush    <= '0;
      halted      <= 1'b0;
      halt_code   <= '0;
    end else begin
      if (trace_kick_i) halted <= 1'b0;
      if (core_en) begin
        wb_reg    <= mem_reg_nx;
        mem_stage <= stall ? '0 : ex2mem;
      end
      if (adv) begin
        pc_if       <= next_pc;
        id_pc       <= pc_if;
        id_valid    <= !ex2if.take_branch;
        ex_reg      <= dec;
        ex_valid    <= id_valid && !(ex2if.take_branch && (int_take || !ex_reg.delay));
        ex_in_delay <= ex2if.take_branch && !int_take && ex_reg.delay;
        msr         <= msr_nx;
        imm_lock    <= imm_lock_nx;
        if (ex2if.take_branch) begin
          it_cnt <= '0;
        end else if (ex2ctrl.it_start) begin
          it_cnt   <= ex2ctrl.it_count;
          it_flush <= {ex2ctrl.flush_second, ex2ctrl.flush_first};
        end else if (ex_valid && it_cnt != 2'd0 && !ex_reg.is_imm) begin
          it_cnt   <= it_cnt - 2'd1;
          it_flush <= {1'b0, it_flush[1]};
        end
        if (ex_halt.halt) begin
          halted    <= 1'b1;
          halt_code <= ex_halt.halt_code;
        end
      end
    end
  end

  assign pc_o        = ex_reg.program_counter;
  assign halted_o    = halted;
  assign halt_code_o = halt_code;
  assign stall_o     = core_en && stall;
  assign int_taken_o = adv && int_take;
  assign it_killed_o = adv && kill;

endmodule
