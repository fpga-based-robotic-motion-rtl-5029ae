// tumbl_asm: instruction encoders for testbenches that build Tumbl programs.
//
// enc_a builds a register-form instruction (opcode, Rd, Ra, Rb, 11-bit function field) and
// enc_b an immediate-form one (opcode, Rd, Ra, 16-bit immediate), in the bit layout of the
// Tumbl instruction set (opcode in bits 31:26). Opcode constants come from tumbl_pkg.
package tumbl_asm;
  function automatic logic [31:0] enc_a(logic [5:0] op, logic [4:0] rd, logic [4:0] ra,
                                        logic [4:0] rb, logic [10:0] fn = 11'd0);
    return {op, rd, ra, rb, fn};
  endfunction
  function automatic logic [31:0] enc_b(logic [5:0] op, logic [4:0] rd, logic [4:0] ra,
                                        logic [15:0] imm);
    return {op, rd, ra, imm};
  endfunction
endpackage
