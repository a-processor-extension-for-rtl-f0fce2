// tb_rtp_core_random: random-program test of the core against a
// cycle-accurate instruction-set model.
//
// The whole 512-word instruction memory is filled with random instructions
// (all 64 opcodes, so unused ones too, random registers, small deadline
// values, short forward branches and jumps), the data memory with random bytes, and the
// serial input toggles at random. Every cycle the model executes the
// instruction at its PC as the instruction set defines it: one
// instruction per cycle, a deadline waits while its timer is above 1 and
// then reloads it, timers count down to zero. The testbench compares the
// PC, the stall output, all sixteen registers, the four timers and every
// store with the model.
module tb_rtp_core_random;
  import rtp_pkg::*;

  localparam int CYCLES = 200000;

  logic clk = 0, rst;
  logic [8:0]  pc;
  logic [31:0] imem_data;
  logic [15:0] dmem_addr, r14, r14_wdata;
  logic [7:0]  dmem_rdata, dmem_wdata;
  logic dmem_we, serial_in, r14_written, stall;

  logic [31:0] prog [512];
  logic [7:0]  dmem [65536];

  // model state
  int unsigned m_pc;
  logic [15:0] m_r [16];
  logic [15:0] m_t [4];
  logic [7:0]  m_mem [65536];

  int checks = 0, failures = 0;
  int n_stall = 0, n_dead = 0, n_taken = 0, n_store = 0, n_load = 0;

  rtp_core dut (.*);

  assign imem_data  = prog[pc];
  assign dmem_rdata = dmem[dmem_addr];

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst && dmem_we) dmem[dmem_addr] <= dmem_wdata;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  function automatic logic [15:0] rd_reg(int i, logic s);
    if (i == 0) return 16'h0;
    if (i == 15) return {16{s}};
    return m_r[i];
  endfunction

  // Branches only go forward and jumps only a short way ahead, so the
  // program keeps moving through memory (and wraps around) instead of
  // settling in a tight loop.
  function automatic logic [31:0] random_instr(int at);
    int op = $urandom_range(0, 35);
    logic [31:0] w = $urandom;
    if (op > 31) op = $urandom_range(21, 29);    // more loads, stores, branches, deadlines
    w[31:26] = 6'(op);
    if (op == 25 || op == 26) w[15:0] = 16'($urandom_range(0, 12));
    if (op == 27) w[15:0] = 16'((at + $urandom_range(1, 12)) % 512);
    if (op == 29) w[15:0] = 16'($urandom_range(0, 40));
    return w;
  endfunction

  // One cycle of the instruction-set model, using the serial input value
  // that the core sees in the same cycle.
  task automatic model_step(logic s, output logic m_stall);
    logic [31:0] w = prog[m_pc];
    int op = int'(w[31:26]);
    int rd = int'(w[24:21]), rs = int'(w[19:16]), rt = int'(w[14:11]);
    int tsel = int'(w[22:21]);
    logic [15:0] imm = w[15:0];
    logic [15:0] a = rd_reg(rs, s), bt = rd_reg(rt, s), dv = rd_reg(rd, s);
    logic [15:0] b, res;
    logic wr = 0, reload = 0;
    int unsigned next_pc = (m_pc + 1) % 512;
    logic is_imm = (op % 2 == 0) && op >= 2 && op <= 20;
    b = is_imm ? imm : bt;
    m_stall = 0;
    res = 0;
    case (op)
      1, 2:   begin res = a + b; wr = 1; end
      3, 4:   begin res = a - b; wr = 1; end
      5, 6:   begin res = a & b; wr = 1; end
      7, 8:   begin res = a | b; wr = 1; end
      9, 10:  begin res = ~(a & b); wr = 1; end
      11, 12: begin res = ~(a | b); wr = 1; end
      13, 14: begin res = a ^ b; wr = 1; end
      15, 16: begin res = ~(a ^ b); wr = 1; end
      17, 18: begin res = a << b[3:0]; wr = 1; end
      19, 20: begin res = a >> b[3:0]; wr = 1; end
      21: begin res = {8'h0, m_mem[16'(a + bt)]}; wr = 1; n_load++; end
      22: begin res = {8'h0, m_mem[16'(a + imm)]}; wr = 1; n_load++; end
      23: begin
        checks++; n_store++;
        if (!(dmem_we && dmem_addr == 16'(a + bt) && dmem_wdata == dv[7:0])) fail("sb");
        m_mem[16'(a + bt)] = dv[7:0];
      end
      24: begin
        checks++; n_store++;
        if (!(dmem_we && dmem_addr == 16'(a + imm) && dmem_wdata == dv[7:0])) fail("sbi");
        m_mem[16'(a + imm)] = dv[7:0];
      end
      25: if (dv == a) begin next_pc = (m_pc + 1 + int'(imm)) % 512; n_taken++; end
      26: if (dv != a) begin next_pc = (m_pc + 1 + int'(imm)) % 512; n_taken++; end
      27: next_pc = int'(imm) % 512;
      28, 29: begin
        n_dead++;
        if (m_t[tsel] > 1) begin m_stall = 1; next_pc = m_pc; n_stall++; end
        else reload = 1;
      end
      default: ;
    endcase
    if (op != 23 && op != 24) begin
      checks++;
      if (dmem_we) fail($sformatf("unexpected store, op %0d", op));
    end
    // clock edge
    for (int i = 0; i < 4; i++) begin
      if (reload && i == tsel) m_t[i] = (op == 29) ? imm : a;
      else if (m_t[i] != 0) m_t[i]--;
    end
    if (wr && rd != 0 && rd != 15) m_r[rd] = res;
    m_pc = next_pc;
  endtask

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    fail("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ms;
    foreach (prog[i]) prog[i] = random_instr(i);
    // A register-valued deadline takes $13, which the instruction before it
    // limits to 0..63 so that random register contents cannot stall the
    // program for tens of thousands of cycles.
    for (int i = 1; i < 512; i++)
      if (prog[i][31:26] == 6'(OP_DEAD)) begin
        prog[i][20:16] = 5'd13;
        prog[i-1] = {6'(OP_ANDI), 5'd13, 1'b0, 4'($urandom), 16'h003f};
      end
    foreach (dmem[i]) begin dmem[i] = 8'($urandom); m_mem[i] = dmem[i]; end
    foreach (m_r[i]) m_r[i] = 0;
    foreach (m_t[i]) m_t[i] = 0;
    m_pc = 0;
    serial_in = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < CYCLES; c++) begin
      serial_in = ($urandom_range(0, 15) == 0) ? ~serial_in : serial_in;
      #1;
      checks++;
      if (int'(pc) != m_pc) begin
        fail($sformatf("cycle %0d: pc %0d, model %0d", c, pc, m_pc));
        m_pc = int'(pc);
      end
      model_step(serial_in, ms);
      checks++;
      if (stall != ms) fail($sformatf("cycle %0d: stall %b, model %b", c, stall, ms));
      @(posedge clk); #1;
      for (int i = 1; i < 15; i++) begin
        checks++;
        if (dut.u_regfile.regs[i] != m_r[i]) begin
          fail($sformatf("cycle %0d: $%0d = %h, model %h", c, i, dut.u_regfile.regs[i], m_r[i]));
          m_r[i] = dut.u_regfile.regs[i];
        end
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (dut.u_timers.count[i] != m_t[i]) begin
          fail($sformatf("cycle %0d: $t%0d = %0d, model %0d", c, i, dut.u_timers.count[i], m_t[i]));
          m_t[i] = dut.u_timers.count[i];
        end
      end
      #3;
    end
    $display("deadlines %0d (stall cycles %0d), taken branches %0d, loads %0d, stores %0d",
             n_dead, n_stall, n_taken, n_load, n_store);
    checks++;
    if (n_stall == 0 || n_taken == 0 || n_load == 0 || n_store == 0) fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
