// tb_rtp_top_uart: end-to-end test of the system as a serial receiver
// with automatic baud-rate detection.
//
// The program receives 8-E-1 frames (start bit, eight data bits LSB first,
// even parity, one stop bit) on $15 and shows each good byte on $14. It
// samples every bit in its middle using deadlines on $t1: half a bit
// time from the falling edge of the start bit, then one full bit time per
// bit, with the bit times held in registers ($5 half, $6 full). Parity is
// accumulated over data, parity and stop bit; with even parity and a stop
// bit of 1 the sum is all ones for a good frame. On a bad sum the program
// measures the low time of the next start bit with a three-instruction
// loop (so it adds 3 to $6 per iteration, counting in clock cycles) and
// takes that as the new bit time.
//
// The program starts with a wrong bit time (112 clocks) while the line runs
// at 160 clocks per bit. The testbench checks that the parity error is
// detected and the baud-rate detection runs, that the learnt bit time is
// within one loop iteration of 160, that every later byte appears on $14
// intact, and that each of their bits is sampled in the middle half of the
// bit. As the detection measures the start bit up to the next rising
// edge, it needs frames whose least significant data bit is 1, so every
// frame after the first is sent with bit 0 set. The byte during which the
// rate is learnt is itself not received correctly, so only frames from
// the fourth on are checked.
module tb_rtp_top_uart;
  import rtp_pkg::*;
  import rtp_asm_pkg::*;

  localparam int BIT     = 160;   // clocks per bit on the line
  localparam int BIT0    = 112;   // wrong initial bit time of the program
  localparam int GAP     = 12;    // idle bits between frames
  localparam int NFRAMES = 12;
  localparam int GOOD_FROM = 3;   // frames from here on must be received

  logic clk = 0, rst;
  logic prog_we, host_we;
  logic [8:0] prog_addr;
  logic [31:0] prog_wdata;
  logic [12:0] host_addr;
  logic [7:0] host_wdata, host_rdata;
  logic serial_in;
  logic [15:0] leds;
  logic hsync, hblank, vsync, vblank, pixel;

  rtp_top dut (.*);

  always #20 clk = ~clk;

  logic [31:0] prog [$];
  int checks = 0, failures = 0;
  int cyc = 0;
  int pc_autobaud, pc_sample;
  int n_autobaud = 0, n_samples_checked = 0, n_stall = 0;
  int frame_idx = -1, frame_start = 0;
  logic [7:0] sent [NFRAMES];
  logic [7:0] got [$];

  task automatic emit(logic [31:0] w);
    prog.push_back(w);
  endtask

  task automatic chk(int got_v, int exp, string what);
    checks++;
    if (got_v != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got_v, exp);
    end
  endtask

  task automatic build_program();
    int idle, start, bitl, ab, wait_start, measure;
    emit(movi(6, BIT0));
    emit(ri(OP_SRLI, 5, 6, 1));
    emit(movi(3, 16'h0400));               // mask after the stop bit
    idle = prog.size();
    emit(br(OP_BNE, 15, 0, idle, idle));   // wait for the start bit
    start = prog.size();
    emit(dead(1, 5));                      // $t1 <- half a bit
    emit(movi(7, 0));                      // byte being received
    emit(movi(2, 1));                      // bit mask
    emit(movi(4, 0));                      // parity sum
    emit(dead(1, 6));                      // middle of the start bit
    bitl = prog.size();
    emit(dead(1, 6));                      // middle of the next bit
    pc_sample = prog.size();
    emit(mov(1, 15));                      // sample
    emit(r3(OP_XOR, 4, 4, 1));
    emit(r3(OP_AND, 1, 1, 2));
    emit(r3(OP_OR, 7, 7, 1));
    emit(ri(OP_SLLI, 2, 2, 1));
    emit(br(OP_BNE, 2, 3, prog.size(), bitl));
    ab = prog.size() + 3;
    emit(br(OP_BE, 4, 0, prog.size(), ab)); // parity error
    emit(ri(OP_ANDI, 14, 7, 16'h00ff));    // show the byte
    emit(jmp(idle));
    pc_autobaud = prog.size();
    emit(movi(6, 0));
    wait_start = prog.size();
    emit(br(OP_BNE, 15, 0, wait_start, wait_start));
    measure = prog.size();
    emit(mov(1, 15));                      // three-cycle loop
    emit(ri(OP_ADDI, 6, 6, 3));
    emit(br(OP_BE, 1, 0, prog.size(), measure));
    emit(ri(OP_SRLI, 5, 6, 1));
    emit(jmp(start));
  endtask

  // Transmitter
  task automatic send_frame(logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ^b, b, 1'b0};
    frame_start = cyc;
    frame_idx++;
    for (int k = 0; k < 11; k++) begin
      serial_in = f[k];
      repeat (BIT) @(posedge clk);
    end
    serial_in = 1;
    repeat (GAP * BIT) @(posedge clk);
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (dut.u_core.stall) n_stall++;
      if (int'(dut.u_core.pc) == pc_autobaud) n_autobaud++;
      if (dut.u_core.r14_written) begin
        got.push_back(dut.u_core.r14_wdata[7:0]);
      end

      if (int'(dut.u_core.pc) == pc_sample && frame_idx >= GOOD_FROM) begin
        int pos;
        pos = (cyc - frame_start) % BIT;
        checks++; n_samples_checked++;
        if (pos < BIT / 4 || pos > 3 * BIT / 4) begin
          failures++;
          $display("FAIL frame %0d sampled at %0d clocks into a bit", frame_idx, pos);
        end
      end
    end
  end

  initial begin
    repeat (NFRAMES * (11 + GAP) * BIT + 5000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_program();
    rst = 1; prog_we = 0; host_we = 0; prog_addr = 0; prog_wdata = 0;
    host_addr = 0; host_wdata = 0; serial_in = 1;
    @(posedge clk);
    foreach (prog[i]) begin
      #1 prog_we = 1; prog_addr = 9'(i); prog_wdata = prog[i];
      @(posedge clk);
    end
    #1 prog_we = 0;
    @(posedge clk); #1 rst = 0;
    repeat (20 * BIT) @(posedge clk);

    sent[0] = 8'hff;
    for (int i = 1; i < NFRAMES; i++) sent[i] = 8'($urandom) | 8'h01;
    for (int i = 0; i < NFRAMES; i++) send_frame(sent[i]);

    $display("autobaud entries %0d, learnt bit time %0d, bytes shown %0d, stall cycles %0d",
             n_autobaud, dut.u_core.u_regfile.regs[6], got.size(), n_stall);
    chk(int'(n_autobaud > 0), 1, "baud-rate detection ran");
    checks++;
    if (dut.u_core.u_regfile.regs[6] < BIT - 3 || dut.u_core.u_regfile.regs[6] > BIT + 3) begin
      failures++; $display("FAIL learnt bit time %0d", dut.u_core.u_regfile.regs[6]);
    end
    chk(int'(got.size() >= NFRAMES - GOOD_FROM), 1, "enough bytes shown");
    // the last NFRAMES-GOOD_FROM bytes shown are the last frames sent
    for (int i = 0; i < NFRAMES - GOOD_FROM && i < got.size(); i++)
      chk(int'(got[got.size() - 1 - i]), int'(sent[NFRAMES - 1 - i]),
          $sformatf("byte of frame %0d", NFRAMES - 1 - i));
    chk(int'(n_samples_checked >= 10 * (NFRAMES - GOOD_FROM)), 1, "samples seen");
    chk(int'(n_stall > 0), 1, "deadline stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
