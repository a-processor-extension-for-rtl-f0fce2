// tb_rtp_imem: self-checking test of the instruction memory.
// Writes random words to random addresses through the load port, then
// reads the whole memory back combinationally and compares.
module tb_rtp_imem;
  localparam int DEPTH = 512;
  logic clk = 0;
  logic [8:0] raddr, waddr;
  logic [31:0] rdata, wdata;
  logic we;
  logic [31:0] ref_m [DEPTH];
  int checks = 0, failures = 0;

  rtp_imem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = 9'(i); wdata = $urandom; ref_m[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 300; i++) begin
      we = 1; waddr = 9'($urandom); wdata = $urandom; ref_m[waddr] = wdata;
      raddr = 9'($urandom);
      #1;
      checks++;
      if (rdata !== ref_m[raddr] && !(raddr == waddr)) begin
        failures++; $display("FAIL read during writes at %0d", raddr);
      end
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 9'(i); #1;
      checks++;
      if (rdata !== ref_m[i]) begin
        failures++; $display("FAIL addr %0d: %h expected %h", i, rdata, ref_m[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
