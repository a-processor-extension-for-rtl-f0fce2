// rtp_dmem: on-chip byte-wide data memory.
//
// DEPTH bytes. Port 1 (raddr/rdata) is the core's load port and reads
// combinationally, so lb/lbi complete in one cycle. The write port is
// synchronous and serves sb/sbi (the top multiplexes a host loader onto
// it). A second combinational read port (haddr/hrdata) lets a host inspect
// memory. Byte-wide data follows the published design; the size (8 KiB,
// enough for an 80x30 text screen and a 256-character 8x16 font) and the
// host port are this design's choices.
module rtp_dmem #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] haddr,
  output logic [7:0]    hrdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata  = mem[raddr];
  assign hrdata = mem[haddr];

endmodule
