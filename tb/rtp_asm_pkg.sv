// rtp_asm_pkg: a small assembler for the testbenches.
//
// Each function returns one 32-bit instruction word in the processor's
// format: opcode [31:26], Rd [25:21], Rs [20:16], Rt [15:11], imm16 [15:0].
// Branch offsets are relative to the instruction after the branch; the
// helper `br` takes the branch's own address and the target address.
package rtp_asm_pkg;
  import rtp_pkg::*;

  function automatic logic [31:0] r3(opcode_t op, int rd, int rs, int rt);
    return {op, 1'b0, rd[3:0], 1'b0, rs[3:0], 1'b0, rt[3:0], 11'd0};
  endfunction

  function automatic logic [31:0] ri(opcode_t op, int rd, int rs, int imm);
    return {op, 1'b0, rd[3:0], 1'b0, rs[3:0], imm[15:0]};
  endfunction

  function automatic logic [31:0] movi(int rd, int imm);
    return ri(OP_ORI, rd, 0, imm);
  endfunction

  function automatic logic [31:0] mov(int rd, int rs);
    return r3(OP_OR, rd, rs, 0);
  endfunction

  function automatic logic [31:0] nop();
    return 32'd0;
  endfunction

  function automatic logic [31:0] deadi(int t, int imm);
    return ri(OP_DEADI, t, 0, imm);
  endfunction

  function automatic logic [31:0] dead(int t, int rs);
    return ri(OP_DEAD, t, rs, 0);
  endfunction

  // be/bne at address `at` to address `target`
  function automatic logic [31:0] br(opcode_t op, int rd, int rs, int at, int target);
    return ri(op, rd, rs, target - at - 1);
  endfunction

  function automatic logic [31:0] jmp(int target);
    return ri(OP_J, 0, 0, target);
  endfunction

endpackage
