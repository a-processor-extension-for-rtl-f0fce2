// rtp_decode: instruction decoder.
//
// Combinational. Splits a 32-bit instruction into its register fields and
// 16-bit immediate and derives the control bundle (rtp_pkg::ctrl_t) that
// the single-cycle core uses in the same cycle:
//   three-register ALU ops   Rd <- Rs op Rt
//   immediate ALU ops        Rd <- Rs op imm16
//   lb / lbi                 Rd <- zero-extended byte at Rs+Rt / Rs+imm16
//   sb / sbi                 byte at Rs+Rt / Rs+imm16 <- low byte of Rd
//   be / bne                 if Rd ==/!= Rs: PC <- PC+1+imm16
//   j                        PC <- imm16
//   dead / deadi             wait for timer Rd[1:0], reload with Rs / imm16
// Loads and stores form their address in the ALU with ALU_ADD. Unused
// opcodes execute as nop and raise `illegal`. The instruction list
// follows the published instruction set; opcode numbers, field placement
// details and the branch-target rule are this design's choices.
module rtp_decode
  import rtp_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);

  opcode_t op;
  assign op = opcode_t'(instr[31:26]);

  always_comb begin
    ctrl           = '0;
    ctrl.rd        = instr[24:21];
    ctrl.rs        = instr[19:16];
    ctrl.rt        = instr[14:11];
    ctrl.imm       = instr[15:0];
    ctrl.timer     = instr[22:21];
    ctrl.alu_op    = ALU_ADD;

    unique case (op)
      OP_NOP: ;
      OP_ADD:   begin ctrl.alu_op = ALU_ADD;  ctrl.reg_write = 1'b1; end
      OP_ADDI:  begin ctrl.alu_op = ALU_ADD;  ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_SUB:   begin ctrl.alu_op = ALU_SUB;  ctrl.reg_write = 1'b1; end
      OP_SUBI:  begin ctrl.alu_op = ALU_SUB;  ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_AND:   begin ctrl.alu_op = ALU_AND;  ctrl.reg_write = 1'b1; end
      OP_ANDI:  begin ctrl.alu_op = ALU_AND;  ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_OR:    begin ctrl.alu_op = ALU_OR;   ctrl.reg_write = 1'b1; end
      OP_ORI:   begin ctrl.alu_op = ALU_OR;   ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_NAND:  begin ctrl.alu_op = ALU_NAND; ctrl.reg_write = 1'b1; end
      OP_NANDI: begin ctrl.alu_op = ALU_NAND; ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_NOR:   begin ctrl.alu_op = ALU_NOR;  ctrl.reg_write = 1'b1; end
      OP_NORI:  begin ctrl.alu_op = ALU_NOR;  ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_XOR:   begin ctrl.alu_op = ALU_XOR;  ctrl.reg_write = 1'b1; end
      OP_XORI:  begin ctrl.alu_op = ALU_XOR;  ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_XNOR:  begin ctrl.alu_op = ALU_XNOR; ctrl.reg_write = 1'b1; end
      OP_XNORI: begin ctrl.alu_op = ALU_XNOR; ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_SLL:   begin ctrl.alu_op = ALU_SLL;  ctrl.reg_write = 1'b1; end
      OP_SLLI:  begin ctrl.alu_op = ALU_SLL;  ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_SRL:   begin ctrl.alu_op = ALU_SRL;  ctrl.reg_write = 1'b1; end
      OP_SRLI:  begin ctrl.alu_op = ALU_SRL;  ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_LB:    begin ctrl.load = 1'b1;  ctrl.reg_write = 1'b1; end
      OP_LBI:   begin ctrl.load = 1'b1;  ctrl.reg_write = 1'b1; ctrl.use_imm = 1'b1; end
      OP_SB:    begin ctrl.store = 1'b1; end
      OP_SBI:   begin ctrl.store = 1'b1; ctrl.use_imm = 1'b1; end
      OP_BE:    ctrl.branch_eq = 1'b1;
      OP_BNE:   ctrl.branch_ne = 1'b1;
      OP_J:     ctrl.jump = 1'b1;
      OP_DEAD:  ctrl.dead = 1'b1;
      OP_DEADI: begin ctrl.dead = 1'b1; ctrl.use_imm = 1'b1; end
      default:  ctrl.illegal = 1'b1;
    endcase
  end

endmodule
