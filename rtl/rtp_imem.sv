// rtp_imem: on-chip instruction memory.
//
// DEPTH words of 32 bits. The fetch port reads combinationally, so the
// core can fetch, execute and retire one instruction per clock without a
// pipeline. A synchronous write port loads the program (for example while
// the core is held in reset). The processor is a Harvard machine with both
// memories on chip; the depth is this design's choice (512 words fits one
// 18 Kbit FPGA block RAM).
module rtp_imem #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
