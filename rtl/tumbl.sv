// tumbl: top module of the Tumbl co-processor.
//
// Wraps the core component with its general purpose register file and its instruction and data
// memories. Both memories are dual-port block RAMs: one port belongs to the core, the other is
// open to the master CPU (imem_*/dmem_* ports, on the core clock), so that the master can
// load the program and exchange data through the data memory at any time without stopping the
// core. The external memory interface (xmemb_*) leads to the peripherals and is shared with the
// master CPU by the arbiter outside this module.
//
// Memory map seen by the core: instruction memory at 0x0000_0000 (2**IMEM_ABITS words, fetch
// only), data memory at 0x0000_0000 (2**DMEM_ABITS words), every data address above the data
// memory goes to the external interface. Status outputs: pc_o is the program counter of the
// instruction in the execution stage, halted_o/halt_code_o report a HALT instruction.
// The generics and their defaults (9 and 10 address bits, multiplier and barrel shifter on,
// compatibility mode off) are the ones of the core description. The master-side memory ports are
// synchronous read (one cycle) with byte write enables.
module tumbl
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
  input  logic                  imem_en_i,
  input  logic [3:0]            imem_we_i,
  input  logic [IMEM_ABITS-1:0] imem_addr_i,
  input  logic [31:0]           imem_data_i,
  output logic [31:0]           imem_data_o,
  input  logic                  dmem_en_i,
  input  logic [3:0]            dmem_we_i,
  input  logic [DMEM_ABITS-1:0] dmem_addr_i,
  input  logic [31:0]           dmem_data_i,
  output logic [31:0]           dmem_data_o,
  input  dmemb2core_t           xmemb_i,
  output logic                  xmemb_sel_o,
  output core2dmemb_t           xmemb_o,
  output logic [31:0]           pc_o,
  output logic                  halted_o,
  output logic [4:0]            halt_code_o,
  output logic                  stall_o,      // load-use stall in this cycle
  output logic                  int_taken_o,  // interrupt entered in this cycle
  output logic                  it_killed_o   // an instruction was skipped by IT/ITT/ITE
);

  logic                  imem_clken, dmem_clken, gprf_clken;
  logic [IMEM_ABITS-1:0] imem_addr;
  logic [31:0]           imem_rdata, dmem_rdata, dmem_wdata;
  logic [3:0]            dmem_we;
  logic [DMEM_ABITS-1:0] dmem_addr;
  id2gprf_t              id2gprf;
  wrb_t                  mem_wrb;
  gprf2ex_t              gprf2ex;

  tumbl_core #(
    .IMEM_ABITS(IMEM_ABITS), .DMEM_ABITS(DMEM_ABITS), .USE_HW_MUL(USE_HW_MUL),
    .USE_BARREL(USE_BARREL), .COMPATIBILITY_MODE(COMPATIBILITY_MODE)
  ) u_core (
    .clk_i, .rst_i, .halt_i, .int_i, .trace_i, .trace_kick_i,
    .imem_clken_o(imem_clken), .imem_addr_o(imem_addr), .imem_data_i(imem_rdata),
    .dmem_clken_o(dmem_clken), .dmem_we_o(dmem_we), .dmem_addr_o(dmem_addr),
    .dmem_wdata_o(dmem_wdata), .dmem_rdata_i(dmem_rdata),
    .gprf_clken_o(gprf_clken), .id2gprf_o(id2gprf), .mem_wrb_o(mem_wrb), .gprf2ex_i(gprf2ex),
    .xmemb_sel_o, .xmemb_o, .xmemb_i,
    .pc_o, .halted_o, .halt_code_o, .stall_o, .int_taken_o,
    .it_killed_o
  );

  tumbl_gprf u_gprf (
    .clk_i, .rst_i, .clken_i(gprf_clken), .id2gprf_i(id2gprf), .mem_wrb_i(mem_wrb),
    .gprf2ex_o(gprf2ex)
  );

  dpram #(.AW(IMEM_ABITS), .DW(32)) u_imem (
    .clk(clk_i), .en_a(imem_clken), .we_a(4'b0000), .addr_a(imem_addr), .din_a(32'd0),
    .dout_a(imem_rdata),
    .en_b(imem_en_i), .we_b(imem_we_i), .addr_b(imem_addr_i),
    .din_b(imem_data_i), .dout_b(imem_data_o)
  );

  dpram #(.AW(DMEM_ABITS), .DW(32)) u_dmem (
    .clk(clk_i), .en_a(dmem_clken), .we_a(dmem_we & {4{dmem_clken}}), .addr_a(dmem_addr),
    .din_a(dmem_wdata), .dout_a(dmem_rdata),
    .en_b(dmem_en_i), .we_b(dmem_we_i), .addr_b(dmem_addr_i),
    .din_b(dmem_data_i), .dout_b(dmem_data_o)
  );

endmodule
