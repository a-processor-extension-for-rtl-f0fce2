// tb_rtp_regfile: self-checking test of the register file.
// Checks reset, writes and three-port reads against a reference array,
// that $0 stays zero, that $15 reads the serial input on all bits and
// ignores writes, and the $14 output and its write strobe.
module tb_rtp_regfile;
  logic clk = 0, rst;
  logic [3:0] rd_idx, rs_idx, rt_idx, waddr;
  logic [15:0] rd_data, rs_data, rt_data, wdata, r14;
  logic we, serial_in, r14_written;
  logic [15:0] ref_r [16];
  int checks = 0, failures = 0;

  rtp_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] expect_rd(int i, logic s);
    if (i == 0) return 16'h0;
    if (i == 15) return {16{s}};
    return ref_r[i];
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; waddr = 0; wdata = 0; serial_in = 0;
    rd_idx = 0; rs_idx = 0; rt_idx = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    foreach (ref_r[i]) ref_r[i] = 0;
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i); #1; chk(rd_data, expect_rd(i, 0), "after reset");
    end
    for (int n = 0; n < 600; n++) begin
      we = 1'($urandom);
      waddr = 4'($urandom);
      wdata = 16'($urandom);
      serial_in = 1'($urandom);
      rd_idx = 4'($urandom); rs_idx = 4'($urandom); rt_idx = 4'($urandom);
      #1;
      chk(rd_data, expect_rd(rd_idx, serial_in), "rd port");
      chk(rs_data, expect_rd(rs_idx, serial_in), "rs port");
      chk(rt_data, expect_rd(rt_idx, serial_in), "rt port");
      chk({15'd0, r14_written}, {15'd0, we && waddr == 14}, "r14_written");
      @(posedge clk); #1;
      if (we && waddr != 0 && waddr != 15) ref_r[waddr] = wdata;
      chk(r14, ref_r[14], "r14 output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
