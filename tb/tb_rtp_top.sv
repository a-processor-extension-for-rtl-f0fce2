// tb_rtp_top: end-to-end test of the whole system as a text-mode VGA
// controller, at the default sizes.
//
// The testbench assembles a video program, loads it, an 80x30 screen of
// character codes and a 256-character 8x16 font through the load ports,
// releases reset and watches the video outputs for two full frames
// (2 x 525 lines x 800 clocks). All timing is made by the program with
// deadline instructions on two timers: $t1 paces the parts of each scan
// line, $t0 paces one character (eight pixels) every eight cycles.
//
// The font is stored line-major: the byte for scan line l of character c
// is at FONT + 256*l + c, so the character loop needs no shift.
//
// Deadline values: each deadline on $t1 sets the length of the block that
// starts with the instruction after it. The sync writes come one
// instruction after a deadline, but the first pixel byte of a line is
// written five instructions after the deadline that opens the active
// region, so that deadline and the one before it are shifted by four
// cycles (44 and 644 instead of 48 and 640) to keep the back porch at 48
// and the active region at 640 pixel clocks.
//
// Checks, against a model computed here from the screen and font:
//   line period 800, hsync 96 wide, back porch 48, active 640 with
//   hblank low, front porch 16; 525 lines per frame, vsync 2 lines wide,
//   10 lines of vertical front porch before it and 33 after; every pixel of
//   the 480 active lines; no pixel outside the active region. It also
//   counts the mechanisms it relies on (deadline stalls, deadlines that
//   find their timer already expired, byte loads, shift-register reloads,
//   taken and not-taken branches) and fails if one never happens.
module tb_rtp_top;
  import rtp_pkg::*;
  import rtp_asm_pkg::*;

  localparam int FONT   = 16'h1000;
  localparam int HS     = 1 << HS_BIT;
  localparam int HB     = 1 << HB_BIT;
  localparam int VS     = 1 << VS_BIT;
  localparam int VB     = 1 << VB_BIT;
  localparam int LINE   = 800;
  localparam int FRAME  = 525 * LINE;

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

  always #20 clk = ~clk;   // 25 MHz

  logic [31:0] prog [$];
  logic [7:0]  screen [2400];
  logic [7:0]  font   [4096];

  int checks = 0, failures = 0;
  int n_stall = 0, n_dead_nowait = 0, n_load = 0, n_shift_load = 0;
  int n_taken = 0, n_not_taken = 0;

  function automatic int here();
    return prog.size();
  endfunction

  task automatic emit(logic [31:0] w);
    prog.push_back(w);
  endtask

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) fail($sformatf("%s: got %0d expected %0d", what, got, exp));
  endtask

  // One group of vertical-blanking lines: `count` lines with the vertical
  // bits `vbits` held in $9.
  task automatic emit_vblank_lines(int count, int vbits);
    int top;
    emit(movi(9, vbits));
    emit(movi(2, count));
    emit(movi(1, 0));
    top = here();
    emit(deadi(1, 96));
    emit(ri(OP_ORI, 14, 9, HS + HB));    // hsync on
    emit(deadi(1, 44));
    emit(ri(OP_ORI, 14, 9, HB));         // hsync off, back porch
    emit(deadi(1, 644));
    emit(mov(14, 9));                    // "active" part of a blank line
    emit(deadi(1, 16));
    emit(ri(OP_ORI, 14, 9, HB));         // front porch
    emit(ri(OP_ADDI, 1, 1, 1));
    emit(br(OP_BNE, 1, 2, here(), top));
  endtask

  task automatic build_program();
    int frame, row, line, chr;
    emit(movi(12, 2400));                // screen size
    emit(movi(13, FONT + 16 * 256));     // end of font line bases
    frame = here();
    emit_vblank_lines(10, VB);           // vertical front porch
    emit_vblank_lines(2, VB + VS);       // vertical sync
    emit_vblank_lines(33, VB);           // vertical back porch
    emit(movi(2, 0));                    // screen address of the row
    row = here();
    emit(movi(3, FONT));                 // font base of scan line 0
    line = here();
    emit(deadi(1, 96));
    emit(movi(14, HS + HB));             // hsync on
    emit(deadi(1, 44));
    emit(movi(14, HB));                  // hsync off, back porch
    emit(deadi(1, 644));
    emit(r3(OP_ADD, 4, 2, 0));           // character pointer
    emit(ri(OP_ADDI, 5, 2, 80));         // end of row
    chr = here();
    emit(ri(OP_LBI, 6, 4, 0));           // character code
    emit(deadi(0, 8));                   // one character every 8 cycles
    emit(r3(OP_LB, 14, 6, 3));           // font byte into the shift register
    emit(ri(OP_ADDI, 4, 4, 1));
    emit(br(OP_BNE, 4, 5, here(), chr));
    emit(deadi(1, 16));
    emit(movi(14, HB));                  // front porch
    emit(ri(OP_ADDI, 3, 3, 256));        // next scan line of the font
    emit(br(OP_BNE, 3, 13, here(), line));
    emit(ri(OP_ADDI, 2, 2, 80));         // next row of characters
    emit(br(OP_BNE, 2, 12, here(), row));
    emit(jmp(frame));
  endtask

  // Expected pixel of active line y (0..479), column x (0..639)
  function automatic logic model_pixel(int y, int x);
    int c = int'(screen[(y / 16) * 80 + x / 8]);
    logic [7:0] f = font[(y % 16) * 256 + c];
    return f[7 - x % 8];
  endfunction

  // Mechanism counters, from the core's internal signals
  always @(posedge clk) if (!rst) begin
    if (dut.u_core.stall) n_stall++;
    if (dut.u_core.ctrl.dead && dut.u_core.expired && !dut.u_core.stall &&
        $past(!dut.u_core.stall)) n_dead_nowait++;
    if (dut.u_core.ctrl.load) n_load++;
    if (dut.u_core.r14_written) n_shift_load++;
    if (dut.u_core.ctrl.branch_eq || dut.u_core.ctrl.branch_ne) begin
      if (dut.u_core.take_branch) n_taken++; else n_not_taken++;
    end
  end

  initial begin
    repeat (2 * FRAME + 20000) @(posedge clk);
    fail("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last_hs_rise, hs_rise_cnt, line_in_frame, active_y, frames;
    int hs_rise_at, hb_fall_at, hb_rise_at, vs_rise_at, vs_fall_at, last_vs_rise;
    int vb_lines, act_lines, pre_vs_lines, post_vs_lines, x;
    logic p_hs, p_hb, p_vs, p_vb, in_vs_seen;

    for (int i = 0; i < 2400; i++) screen[i] = 8'((i * 7 + i / 80 + 3) % 256);
    for (int i = 0; i < 4096; i++) font[i] = 8'((i * 29 + (i >> 8) * 101 + 17) % 256);
    build_program();

    rst = 1; prog_we = 0; host_we = 0; prog_addr = 0; prog_wdata = 0;
    host_addr = 0; host_wdata = 0; serial_in = 1;
    @(posedge clk);
    foreach (prog[i]) begin
      #1 prog_we = 1; prog_addr = 9'(i); prog_wdata = prog[i];
      @(posedge clk);
    end
    for (int i = 0; i < 6496; i++) begin
      #1 host_we = 1;
      host_addr = 13'(i < 2400 ? i : FONT + i - 2400);
      host_wdata = i < 2400 ? screen[i] : font[i - 2400];
      @(posedge clk);
    end
    #1 prog_we = 0; host_we = 0;
    // read back a few bytes through the host port
    for (int i = 0; i < 2400; i += 97) begin
      host_addr = 13'(i); #1;
      chk(int'(host_rdata), int'(screen[i]), "host read-back");
    end
    @(posedge clk); #1 rst = 0;

    cyc = 0; last_hs_rise = -1; hs_rise_cnt = 0; line_in_frame = -1;
    active_y = 0; frames = 0; last_vs_rise = -1; in_vs_seen = 0;
    vb_lines = 0; act_lines = 0; pre_vs_lines = 0; post_vs_lines = 0;
    hs_rise_at = 0; hb_fall_at = -1; hb_rise_at = -1; vs_rise_at = -1; vs_fall_at = -1;
    p_hs = 0; p_hb = 0; p_vs = 0; p_vb = 0;

    while (frames < 2) begin
      @(negedge clk);
      cyc++;
      // hsync edges
      if (hsync && !p_hs) begin
        if (last_hs_rise >= 0) chk(cyc - last_hs_rise, LINE, "line period");
        last_hs_rise = cyc; hs_rise_at = cyc;
        hb_fall_at = -1; hb_rise_at = -1;
      end
      if (!hsync && p_hs) chk(cyc - hs_rise_at, 96, "hsync width");
      // hblank edges (only in active lines)
      if (!hblank && p_hb && !vblank) begin
        hb_fall_at = cyc;
        chk(cyc - hs_rise_at, 144, "hsync start to active video");
      end
      if (hblank && !p_hb && !vblank && hb_fall_at >= 0) begin
        chk(cyc - hb_fall_at, 640, "active video length");
        chk(LINE - (cyc - hs_rise_at), 16, "front porch");
      end
      // vsync edges
      if (vsync && !p_vs) begin
        if (last_vs_rise >= 0) chk(cyc - last_vs_rise, FRAME, "frame period");
        if (in_vs_seen) begin
          chk(pre_vs_lines, 10, "lines of vertical front porch");
          chk(act_lines, 480, "active lines per frame");
          chk(post_vs_lines, 33, "lines of vertical back porch");
          frames++;
        end
        last_vs_rise = cyc; vs_rise_at = cyc; in_vs_seen = 1;
        chk(vblank, 1, "vblank during vsync");
        act_lines = 0; pre_vs_lines = 0; post_vs_lines = 0; active_y = 0;
      end
      if (!vsync && p_vs) chk(cyc - vs_rise_at, 2 * LINE, "vsync width");
      // count lines at each hsync rise
      if (hsync && !p_hs && in_vs_seen) begin
        if (vsync) ;
        else if (vblank && act_lines == 0) post_vs_lines++;
        else if (vblank) pre_vs_lines++;
        else act_lines++;
      end
      // pixels
      if (in_vs_seen && !vblank && !hblank) begin
        x = cyc - hb_fall_at;
        if (x >= 0 && x < 640) begin
          checks++;
          if (pixel !== model_pixel(act_lines - 1, x))
            fail($sformatf("pixel line %0d x %0d: %b", act_lines - 1, x, pixel));
        end
      end else if (pixel !== 1'b0) begin
        fail($sformatf("pixel outside active region at cycle %0d", cyc));
      end
      p_hs = hsync; p_hb = hblank; p_vs = vsync; p_vb = vblank;
    end

    $display("program %0d words; stall cycles %0d, deadlines without wait %0d, loads %0d, shift loads %0d, branches taken %0d / not %0d",
             prog.size(), n_stall, n_dead_nowait, n_load, n_shift_load, n_taken, n_not_taken);
    chk(int'(n_stall > 0), 1, "deadline stalls happened");
    chk(int'(n_dead_nowait > 0), 1, "deadline on an expired timer happened");
    chk(int'(n_load > 0), 1, "loads happened");
    chk(int'(n_shift_load > 0), 1, "shift register loads happened");
    chk(int'(n_taken > 0 && n_not_taken > 0), 1, "branches taken and not taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
