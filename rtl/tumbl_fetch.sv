// tumbl_fetch: instruction fetch stage of the Tumbl core (combinational).
//
// The program counter register itself lives in the core control block. This stage addresses the
// instruction memory with the current program counter (word address, IMEM_ABITS bits; there is
// no range check) and computes the next program counter: the branch target when the execution
// stage takes a branch, otherwise the current value plus 4. The program counter is 32 bits wide
// whatever the memory size, as in the core description.
module tumbl_fetch
  import tumbl_pkg::*;
#(
  parameter int unsigned IMEM_ABITS = 9
) (
  input  logic [31:0]           prog_cntr_i,
  input  ex2if_t                ex2if_i,
  output logic [IMEM_ABITS-1:0] imem_addr_o,
  output logic [31:0]           next_pc_o
);

  assign imem_addr_o = prog_cntr_i[IMEM_ABITS+1:2];
  assign next_pc_o   = ex2if_i.take_branch ? ex2if_i.branch_target : prog_cntr_i + 32'd4;

endmodule
