// tb_rtp_decode: self-checking test of the instruction decoder.
// For every opcode and random field values, checks the decoded fields and
// control bits against a table of what each instruction must do.
module tb_rtp_decode;
  import rtp_pkg::*;
  import rtp_asm_pkg::*;

  logic [31:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  rtp_decode dut (.instr(instr), .ctrl(ctrl));

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (instr %h)", what, got, exp, instr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // opcode, is-imm, writes-reg, alu op, load, store, be, bne, j, dead
    for (int o = 0; o < 64; o++) begin
      for (int n = 0; n < 20; n++) begin
        int rd, rs, rt, imm;
        int e_imm, e_wr, e_alu, e_ld, e_st, e_be, e_bne, e_j, e_dead, e_ill;
        opcode_t op;
        rd = $urandom_range(0, 15); rs = $urandom_range(0, 15); rt = $urandom_range(0, 15);
        imm = $urandom_range(0, 65535);
        op = opcode_t'(o);
        e_imm = 0; e_wr = 0; e_alu = int'(ALU_ADD); e_ld = 0; e_st = 0;
        e_be = 0; e_bne = 0; e_j = 0; e_dead = 0; e_ill = 0;
        case (o)
          0: ;
          1:  begin e_wr = 1; e_alu = 0; end
          2:  begin e_wr = 1; e_alu = 0; e_imm = 1; end
          3:  begin e_wr = 1; e_alu = 1; end
          4:  begin e_wr = 1; e_alu = 1; e_imm = 1; end
          5:  begin e_wr = 1; e_alu = 2; end
          6:  begin e_wr = 1; e_alu = 2; e_imm = 1; end
          7:  begin e_wr = 1; e_alu = 3; end
          8:  begin e_wr = 1; e_alu = 3; e_imm = 1; end
          9:  begin e_wr = 1; e_alu = 4; end
          10: begin e_wr = 1; e_alu = 4; e_imm = 1; end
          11: begin e_wr = 1; e_alu = 5; end
          12: begin e_wr = 1; e_alu = 5; e_imm = 1; end
          13: begin e_wr = 1; e_alu = 6; end
          14: begin e_wr = 1; e_alu = 6; e_imm = 1; end
          15: begin e_wr = 1; e_alu = 7; end
          16: begin e_wr = 1; e_alu = 7; e_imm = 1; end
          17: begin e_wr = 1; e_alu = 8; end
          18: begin e_wr = 1; e_alu = 8; e_imm = 1; end
          19: begin e_wr = 1; e_alu = 9; end
          20: begin e_wr = 1; e_alu = 9; e_imm = 1; end
          21: begin e_wr = 1; e_ld = 1; end
          22: begin e_wr = 1; e_ld = 1; e_imm = 1; end
          23: e_st = 1;
          24: begin e_st = 1; e_imm = 1; end
          25: e_be = 1;
          26: e_bne = 1;
          27: e_j = 1;
          28: e_dead = 1;
          29: begin e_dead = 1; e_imm = 1; end
          default: e_ill = 1;
        endcase
        if (e_imm || o >= 25) instr = ri(op, rd, rs, imm);
        else                  instr = r3(op, rd, rs, rt);
        #1;
        chk(int'(ctrl.rd), rd, "rd");
        chk(int'(ctrl.rs), rs, "rs");
        if (e_imm || o >= 25) begin
          chk(int'(ctrl.imm), imm, "imm");
          chk(int'(ctrl.timer), rd % 4, "timer");
        end else begin
          chk(int'(ctrl.rt), rt, "rt");
        end
        chk(int'(ctrl.use_imm), e_imm, "use_imm");
        chk(int'(ctrl.reg_write), e_wr, "reg_write");
        if (e_wr && !e_ld) chk(int'(ctrl.alu_op), e_alu, "alu_op");
        if (e_ld || e_st) chk(int'(ctrl.alu_op), int'(ALU_ADD), "address add");
        chk(int'(ctrl.load), e_ld, "load");
        chk(int'(ctrl.store), e_st, "store");
        chk(int'(ctrl.branch_eq), e_be, "be");
        chk(int'(ctrl.branch_ne), e_bne, "bne");
        chk(int'(ctrl.jump), e_j, "j");
        chk(int'(ctrl.dead), e_dead, "dead");
        chk(int'(ctrl.illegal), e_ill, "illegal");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
