// tb_rtp_core: self-checking test of the single-cycle core.
//
// The testbench models the instruction and data memories itself. It runs a
// directed program that sends each result to $14 and records every write
// to $14 together with its clock cycle. It then checks
//   * the value of every instruction class (ALU register and immediate
//     forms, shifts, loads/stores, $0, $15, branches, jump),
//   * that ordinary instructions take one cycle each,
//   * deadline timing: two writes separated by a deadline of N on the same
//     timer are exactly N cycles apart (the 8-cycle worked example, a loop
//     paced by deadlines, a register-valued reload) and a deadline whose
//     timer has already run out costs one cycle and no stall.
module tb_rtp_core;
  import rtp_pkg::*;
  import rtp_asm_pkg::*;

  logic clk = 0, rst;
  logic [8:0]  pc;
  logic [31:0] imem_data;
  logic [15:0] dmem_addr, r14, r14_wdata;
  logic [7:0]  dmem_rdata, dmem_wdata;
  logic dmem_we, serial_in, r14_written, stall;

  logic [31:0] prog [512];
  logic [7:0]  dmem [65536];
  int n_instr = 0;

  int checks = 0, failures = 0;
  int cycle = 0;
  int ev_cycle [$];
  logic [15:0] ev_val [$];
  int stall_cycles = 0;

  rtp_core dut (.*);

  assign imem_data  = prog[pc];
  assign dmem_rdata = dmem[dmem_addr];

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst) begin
      if (dmem_we) dmem[dmem_addr] <= dmem_wdata;
      if (r14_written) begin
        ev_cycle.push_back(cycle);
        ev_val.push_back(r14_wdata);
      end
      if (stall) stall_cycles++;
      cycle <= cycle + 1;
    end
  end

  function automatic int emit(logic [31:0] w);
    prog[n_instr] = w;
    n_instr++;
    return n_instr - 1;
  endfunction

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, at, loop_at, end_at, k;
    logic [15:0] A, B;
    logic [15:0] expv [$];
    int i_alu_first, n_alu;
    int i_fig2, i_loop, i_regdead, i_overrun;

    foreach (prog[i]) prog[i] = 32'd0;
    foreach (dmem[i]) dmem[i] = 8'd0;
    A = 16'h1234; B = 16'h0F0F;
    serial_in = 1;

    // ---- ALU, one result per cycle ------------------------------------
    void'(emit(movi(1, int'(A))));
    void'(emit(movi(2, int'(B))));
    void'(emit(movi(3, 4)));
    i_alu_first = 0;
    void'(emit(r3(OP_ADD,  14, 1, 2)));  expv.push_back(A + B);
    void'(emit(r3(OP_SUB,  14, 1, 2)));  expv.push_back(A - B);
    void'(emit(r3(OP_AND,  14, 1, 2)));  expv.push_back(A & B);
    void'(emit(r3(OP_OR,   14, 1, 2)));  expv.push_back(A | B);
    void'(emit(r3(OP_NAND, 14, 1, 2)));  expv.push_back(~(A & B));
    void'(emit(r3(OP_NOR,  14, 1, 2)));  expv.push_back(~(A | B));
    void'(emit(r3(OP_XOR,  14, 1, 2)));  expv.push_back(A ^ B);
    void'(emit(r3(OP_XNOR, 14, 1, 2)));  expv.push_back(~(A ^ B));
    void'(emit(r3(OP_SLL,  14, 1, 3)));  expv.push_back(16'h2340);
    void'(emit(r3(OP_SRL,  14, 1, 3)));  expv.push_back(16'h0123);
    void'(emit(ri(OP_ADDI, 14, 1, 16'hffff))); expv.push_back(16'h1233);
    void'(emit(ri(OP_SUBI, 14, 1, 2)));  expv.push_back(16'h1232);
    void'(emit(ri(OP_ANDI, 14, 1, 16'h00ff))); expv.push_back(16'h0034);
    void'(emit(ri(OP_ORI,  14, 1, 16'h8000))); expv.push_back(16'h9234);
    void'(emit(ri(OP_NANDI,14, 1, 16'h00ff))); expv.push_back(16'hffcb);
    void'(emit(ri(OP_NORI, 14, 1, 16'h00ff))); expv.push_back(16'hed00);
    void'(emit(ri(OP_XORI, 14, 1, 16'hffff))); expv.push_back(16'hedcb);
    void'(emit(ri(OP_XNORI,14, 1, 16'h00ff))); expv.push_back(16'h1234 ^ 16'hff00);
    void'(emit(ri(OP_SLLI, 14, 1, 8)));  expv.push_back(16'h3400);
    void'(emit(ri(OP_SRLI, 14, 1, 8)));  expv.push_back(16'h0012);
    n_alu = expv.size();
    // ---- loads and stores ---------------------------------------------
    void'(emit(ri(OP_SBI, 1, 0, 100)));         // mem[100] = 0x34
    void'(emit(ri(OP_LBI, 14, 0, 100)));  expv.push_back(16'h0034);
    void'(emit(movi(4, 96)));
    void'(emit(r3(OP_SB, 2, 3, 4)));            // mem[4+96] = 0x0f
    void'(emit(r3(OP_LB, 14, 4, 3)));     expv.push_back(16'h000f);
    void'(emit(movi(5, 16'h00f0)));
    void'(emit(ri(OP_SBI, 5, 4, 5)));           // mem[101] = 0xf0
    void'(emit(ri(OP_LBI, 14, 4, 5)));    expv.push_back(16'h00f0);  // zero-extended
    // ---- $0 and $15 -----------------------------------------------------
    void'(emit(ri(OP_ADDI, 0, 1, 5)));
    void'(emit(mov(14, 0)));              expv.push_back(16'h0000);
    void'(emit(mov(14, 15)));             expv.push_back(16'hffff);
    void'(emit(ri(OP_ADDI, 15, 0, 7)));
    void'(emit(r3(OP_AND, 14, 15, 1)));   expv.push_back(A);
    // ---- branches and jump ----------------------------------------------
    void'(emit(movi(6, 0)));
    void'(emit(movi(5, 3)));
    loop_at = emit(ri(OP_ADDI, 6, 6, 1));
    at = n_instr; void'(emit(br(OP_BNE, 6, 5, at, loop_at)));
    void'(emit(mov(14, 6)));              expv.push_back(16'd3);
    at = n_instr; void'(emit(br(OP_BE, 6, 5, at, at + 2)));
    void'(emit(movi(14, 16'hdead)));
    void'(emit(movi(14, 16'hbeef)));      expv.push_back(16'hbeef);
    at = n_instr; void'(emit(br(OP_BE, 6, 0, at, at + 2)));   // not taken
    void'(emit(movi(14, 16'h0101)));      expv.push_back(16'h0101);
    at = n_instr; void'(emit(jmp(at + 2)));
    void'(emit(movi(14, 16'h0bad)));
    void'(emit(movi(14, 16'h600d)));      expv.push_back(16'h600d);
    // ---- deadline: 8 cycles between two writes (worked example) --------
    void'(emit(deadi(0, 3)));
    void'(emit(deadi(0, 8)));
    i_fig2 = expv.size();
    void'(emit(ri(OP_ADDI, 14, 14, 1)));  expv.push_back(16'h600e);
    void'(emit(deadi(0, 8)));
    void'(emit(ri(OP_ADDI, 14, 14, 1)));  expv.push_back(16'h600f);
    // ---- deadline-paced loop, period 10, on timer 1 --------------------
    void'(emit(movi(6, 0)));
    i_loop = expv.size();
    loop_at = emit(deadi(1, 10));
    void'(emit(ri(OP_ADDI, 6, 6, 1)));
    void'(emit(mov(14, 6)));
    at = n_instr; void'(emit(br(OP_BNE, 6, 5, at, loop_at)));
    expv.push_back(16'd1); expv.push_back(16'd2); expv.push_back(16'd3);
    // ---- register reload value, timer 2 --------------------------------
    void'(emit(movi(7, 13)));
    void'(emit(dead(2, 7)));
    i_regdead = expv.size();
    void'(emit(movi(14, 16'h0aaa)));      expv.push_back(16'h0aaa);
    void'(emit(dead(2, 7)));
    void'(emit(movi(14, 16'h0bbb)));      expv.push_back(16'h0bbb);
    // ---- overrun: code longer than the deadline, no stall --------------
    void'(emit(deadi(3, 2)));
    i_overrun = expv.size();
    void'(emit(movi(14, 16'h0c01)));      expv.push_back(16'h0c01);
    void'(emit(nop())); void'(emit(nop())); void'(emit(nop()));
    void'(emit(deadi(3, 2)));
    void'(emit(movi(14, 16'h0c02)));      expv.push_back(16'h0c02);
    end_at = n_instr; void'(emit(jmp(end_at)));

    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (k = 0; k < 1500 && pc != 9'(end_at); k++) @(posedge clk);
    chk(int'(pc), end_at, "program reached its end");
    repeat (3) @(posedge clk);

    chk(ev_val.size(), expv.size(), "number of $14 writes");
    for (k = 0; k < expv.size() && k < ev_val.size(); k++)
      chk(int'(ev_val[k]), int'(expv[k]), $sformatf("$14 write %0d", k));
    if (ev_val.size() == expv.size()) begin
      for (k = 1; k < n_alu; k++)
        chk(ev_cycle[k] - ev_cycle[k-1], 1, "one cycle per ALU instruction");
      chk(ev_cycle[3], 6, "cycle of first ALU result after reset");
      chk(ev_cycle[i_fig2 + 1] - ev_cycle[i_fig2], 8, "worked example: 8 cycles apart");
      chk(ev_cycle[i_loop + 1] - ev_cycle[i_loop], 10, "deadline loop period 1");
      chk(ev_cycle[i_loop + 2] - ev_cycle[i_loop + 1], 10, "deadline loop period 2");
      chk(ev_cycle[i_regdead + 1] - ev_cycle[i_regdead], 13, "dead with register value");
      chk(ev_cycle[i_overrun + 1] - ev_cycle[i_overrun], 5, "overrun deadline costs one cycle");
    end
    chk(int'(dmem[100]), 16'h0f, "memory byte 100");
    chk(int'(dmem[101]), 16'hf0, "memory byte 101");
    checks++;
    if (stall_cycles == 0) begin failures++; $display("FAIL no stall ever happened"); end
    $display("stall cycles: %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
