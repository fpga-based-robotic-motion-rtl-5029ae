// tumbl_mem: memory and writeback stage of the Tumbl core (combinational).
//
// For the instruction in the memory stage it drives either the internal data memory (byte
// addresses whose bits above the data memory size are all zero) or the external memory
// interface (every other address), and it prepares the writeback record that is registered for
// one cycle (MEM_REG). In the following cycle the register file is written: with the ALU result,
// or with the word, half-word or byte that the synchronous memory returned (zero-extended, big
// endian byte order). A load therefore takes two cycles before its value can be forwarded,
// every other instruction one.
// The external request is issued only while run_i is high (the core is not frozen by a halt or
// by trace mode), so a frozen core does not repeat accesses to peripherals.
// The address split and the two-cycle load follow the core description; the byte order is the
// MicroBlaze one and is this design's choice.
module tumbl_mem
  import tumbl_pkg::*;
#(
  parameter int unsigned DMEM_ABITS = 10
) (
  input  ex2mem_t               ex2mem_i,
  input  mem_reg_t              mem_reg_i,     // writeback record of the previous cycle
  input  logic                  run_i,
  input  logic [31:0]           dmem_rdata_i,
  input  dmemb2core_t           dmemb_i,
  output logic [3:0]            dmem_we_o,
  output logic [DMEM_ABITS-1:0] dmem_addr_o,
  output logic [31:0]           dmem_wdata_o,
  output logic                  xmemb_sel_o,
  output core2dmemb_t           dmemb_o,
  output mem_reg_t              mem_reg_o,
  output wrb_t                  mem_wrb_o,
  output logic                  clken_o,       // external interface lets the core advance
  output logic                  int_o
);

  logic internal, access;
  assign internal = ex2mem_i.exeq_result[31:DMEM_ABITS+2] == '0;
  assign access   = ex2mem_i.mem_Action != NO_MEM;

  // Internal data memory
  assign dmem_addr_o  = ex2mem_i.exeq_result[DMEM_ABITS+1:2];
  assign dmem_we_o    = (access && internal && ex2mem_i.mem_Action == WR_MEM) ? ex2mem_i.byte_Enable : 4'b0000;
  assign dmem_wdata_o = ex2mem_i.data_rD;

  // External memory interface
  assign xmemb_sel_o  = access && !internal && run_i;
  assign dmemb_o.rd   = xmemb_sel_o && ex2mem_i.mem_Action == RD_MEM;
  assign dmemb_o.addr = ex2mem_i.exeq_result[16:2];
  assign dmemb_o.bls  = (xmemb_sel_o && ex2mem_i.mem_Action == WR_MEM) ? ex2mem_i.byte_Enable : 4'b0000;
  assign dmemb_o.data = ex2mem_i.data_rD;
  assign clken_o      = dmemb_i.clken || !xmemb_sel_o;
  assign int_o        = dmemb_i.int_req;

  // Writeback record for the next cycle
  always_comb begin
    mem_reg_o.wrb_Action    = ex2mem_i.wrb_Action;
    mem_reg_o.exeq_result   = ex2mem_i.exeq_result;
    mem_reg_o.transfer_Size = ex2mem_i.transfer_Size;
    mem_reg_o.wrix_rD       = ex2mem_i.wrix_rD;
    mem_reg_o.ext           = !internal;
  end

  // Register file write of this cycle
  always_comb begin
    logic [31:0] raw, val;
    raw = mem_reg_i.ext ? dmemb_i.data : dmem_rdata_i;
    unique case (mem_reg_i.transfer_Size)
      BYTE: unique case (mem_reg_i.exeq_result[1:0])
        2'd0:    val = {24'd0, raw[31:24]};
        2'd1:    val = {24'd0, raw[23:16]};
        2'd2:    val = {24'd0, raw[15:8]};
        default: val = {24'd0, raw[7:0]};
      endcase
      HALFWORD: val = mem_reg_i.exeq_result[1] ? {16'd0, raw[15:0]} : {16'd0, raw[31:16]};
      default:  val = raw;
    endcase
    mem_wrb_o.wrb_Action = mem_reg_i.wrb_Action;
    mem_wrb_o.wrix_rD    = mem_reg_i.wrix_rD;
    mem_wrb_o.data_rD    = (mem_reg_i.wrb_Action == WRB_MEM) ? val : mem_reg_i.exeq_result;
  end

endmodule
