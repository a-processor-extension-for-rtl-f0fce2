// tb_rtp_dmem: self-checking test of the byte-wide data memory.
// Fills memory with a known pattern, makes random writes, and compares
// both combinational read ports with a reference array.
module tb_rtp_dmem;
  localparam int DEPTH = 8192;
  logic clk = 0;
  logic [12:0] raddr, waddr, haddr;
  logic [7:0] rdata, wdata, hrdata;
  logic we;
  logic [7:0] ref_m [DEPTH];
  int checks = 0, failures = 0;

  rtp_dmem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0; haddr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = 13'(i); wdata = 8'((i * 37 + 11) % 256); ref_m[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); waddr = 13'($urandom); wdata = 8'($urandom);
      raddr = 13'($urandom); haddr = 13'($urandom);
      #1;
      checks += 2;
      if (rdata !== ref_m[raddr]) begin failures++; $display("FAIL rdata @%0d", raddr); end
      if (hrdata !== ref_m[haddr]) begin failures++; $display("FAIL hrdata @%0d", haddr); end
      @(posedge clk); #1;
      if (we) ref_m[waddr] = wdata;
    end
    we = 0;
    for (int i = 0; i < DEPTH; i += 7) begin
      raddr = 13'(i); haddr = 13'(DEPTH - 1 - i); #1;
      checks += 2;
      if (rdata !== ref_m[i]) begin failures++; $display("FAIL final rdata @%0d", i); end
      if (hrdata !== ref_m[DEPTH-1-i]) begin failures++; $display("FAIL final hrdata"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
