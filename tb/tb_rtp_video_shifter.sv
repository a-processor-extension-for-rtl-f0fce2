// tb_rtp_video_shifter: self-checking test of the pixel shift register.
// Loads a byte every eight cycles, as the video software does, and checks
// that the pixel stream is the bytes sent MSB first, one bit per cycle,
// starting the cycle after each load; then checks that zeros follow when
// no new byte arrives and that a load in mid-byte takes over at once.
module tb_rtp_video_shifter;
  logic clk = 0, rst, load, pixel;
  logic [7:0] din;
  int checks = 0, failures = 0;

  rtp_video_shifter dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b expected %b", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    rst = 1; load = 0; din = 0;
    @(posedge clk); #1; rst = 0;
    chk(pixel, 0, "after reset");
    for (int n = 0; n < 100; n++) begin
      b = 8'($urandom);
      load = 1; din = b;
      @(posedge clk); #1;
      load = 0; din = 8'($urandom);
      for (int k = 7; k >= 0; k--) begin
        chk(pixel, b[k], $sformatf("byte %0d bit %0d", n, k));
        if (k != 0) begin @(posedge clk); #1; end
      end
    end
    @(posedge clk); #1;
    for (int k = 0; k < 10; k++) begin
      chk(pixel, 0, "zeros after last byte");
      @(posedge clk); #1;
    end
    load = 1; din = 8'hf0; @(posedge clk); #1; load = 0;
    chk(pixel, 1, "reload 1"); @(posedge clk); #1;
    chk(pixel, 1, "reload 2"); @(posedge clk); #1;
    load = 1; din = 8'h40; @(posedge clk); #1; load = 0;
    chk(pixel, 0, "mid-byte reload msb");
    @(posedge clk); #1;
    chk(pixel, 1, "mid-byte reload bit 6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
